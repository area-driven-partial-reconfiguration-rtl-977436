// tmr_voter: bitwise two-out-of-three majority of three copies of a signal.
//
// y[i] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]). Purely
// combinational. `mismatch` is high when any bit of the three copies
// disagrees, so a corrupted copy can be reported even though its effect is
// masked. Majority voting over three identical modules is the textbook TMR
// scheme; the mismatch output is this design's addition.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = (a != b) || (a != c);
endmodule
