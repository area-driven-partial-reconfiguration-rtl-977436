// op_cmul: constant-coefficient multiplier, y = a * COEF, one pipeline stage.
//
// Integer arithmetic on DATA_W bits: the product is truncated to its low
// DATA_W bits, as every operator of the datapath keeps a 16-bit word. The
// result is registered when `en` is high; `en` low holds it (the datapath is
// paused while a configuration fault is injected). Synchronous active-low
// reset clears the register. The 16-bit word length and the coefficient 3
// follow the published case study; the output register and the truncation
// are this design's choices.
module op_cmul #(
  parameter int unsigned W    = 16,
  parameter int unsigned COEF = 3
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
    else if (en) y <= a * coef_w;
  end
endmodule
