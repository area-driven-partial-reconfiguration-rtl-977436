// op_cadd: constant adder, y = a + COEF, one pipeline stage.
//
// Wraps modulo 2^W like the other 16-bit operators. Registered when `en` is
// high, held otherwise, cleared by synchronous active-low reset. The constant
// 5 and the 16-bit word follow the published case study; the output register
// is this design's choice.
module op_cadd #(
  parameter int unsigned W    = 16,
  parameter int unsigned COEF = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  logic [W-1:0] coef_w;
  assign coef_w = W'(COEF);

  always_ff @(posedge clk) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= a + coef_w;
  end
endmodule
