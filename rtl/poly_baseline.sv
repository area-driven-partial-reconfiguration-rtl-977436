// poly_baseline: pipelined evaluation of F(x) = 3x^2 + 5x + 5 on 16 bits.
//
// The polynomial is computed in Horner form ((3x + 5) * x) + 5 by a constant
// multiplier, an adder, a two-input multiplier and a second adder, each with a
// registered output. The input x runs alongside the first two operators
// through two delay registers so that it meets 3x + 5 at the two-input
// multiplier. One new x is accepted per enabled cycle; y = F(x) appears
// POLY_LATENCY = 4 enabled cycles later, modulo 2^16. `en` low freezes the
// whole pipeline. All internal nodes are brought out on `taps` for the
// checker of the reconfigurable version.
//
// The operator chain, the two delay registers and the 16-bit integer word
// follow the published baseline; the register after every operator (which the
// two delay registers imply) and the wrap-around arithmetic are this design's
// reading of it.
module poly_baseline
  import seu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  word_t      x,
  output word_t      y,
  output poly_taps_t taps
);
  word_t x_d1, x_d2, m3, a1, p;

  // Delay line for the second multiplier operand.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else if (en) begin
      x_d1 <= x;
      x_d2 <= x_d1;
    end
  end

  op_cmul #(.W(DATA_W), .COEF(COEF_MUL))  u_cmul (.clk, .rst_n, .en, .a(x),  .y(m3));
  op_cadd #(.W(DATA_W), .COEF(COEF_ADD1)) u_add1 (.clk, .rst_n, .en, .a(m3), .y(a1));
  op_mul  #(.W(DATA_W))                   u_mul  (.clk, .rst_n, .en, .a(a1), .b(x_d2), .y(p));
  op_cadd #(.W(DATA_W), .COEF(COEF_ADD2)) u_add2 (.clk, .rst_n, .en, .a(p),  .y(y));

  assign taps = '{x: x, x_d2: x_d2, m3: m3, a1: a1, p: p, y: y};
endmodule
