// op_mul: two-input multiplier, y = a * b truncated to W bits, one stage.
//
// The largest operator of the polynomial datapath. Registered when `en` is
// high, held otherwise, cleared by synchronous active-low reset. Keeping the
// low W bits of the product and registering it are this design's choices; the
// 16-bit word follows the published case study.
module op_mul #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= a * b;
  end
endmodule
