// rp_checker: the reconfigurable partition that holds a spare copy of one
// operator of the polynomial datapath at a time.
//
// On the FPGA this region is rewritten by partial reconfiguration with the
// bitstream of the operator under check. Here the loaded bitstream is
// represented by `cfg`: all four operator variants are present and `cfg`
// chooses the one whose result leaves the partition, which is the behaviour
// the region has after that bitstream was loaded. The result is registered
// like the operator it duplicates, so `y` lines up with the primary
// operator's output one enabled cycle after the operands. Operand `b` is
// used only by the two-input multiplier. `cfg` may change only while the
// comparison is disabled (it changes when a reconfiguration completes).
//
// The partition and its role follow the published reconfigurable design;
// modelling reconfiguration as a selection among resident copies is this
// design's choice.
module rp_checker
  import seu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  op_e   cfg,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t y_cmul, y_add1, y_mul, y_add2;

  op_cmul #(.W(DATA_W), .COEF(COEF_MUL))  u_cmul (.clk, .rst_n, .en, .a(a), .y(y_cmul));
  op_cadd #(.W(DATA_W), .COEF(COEF_ADD1)) u_add1 (.clk, .rst_n, .en, .a(a), .y(y_add1));
  op_mul  #(.W(DATA_W))                   u_mul  (.clk, .rst_n, .en, .a(a), .b(b), .y(y_mul));
  op_cadd #(.W(DATA_W), .COEF(COEF_ADD2)) u_add2 (.clk, .rst_n, .en, .a(a), .y(y_add2));

  always_comb begin
    unique case (cfg)
      OP_CMUL: y = y_cmul;
      OP_ADD1: y = y_add1;
      OP_MUL:  y = y_mul;
      OP_ADD2: y = y_add2;
      default: y = y_cmul;
    endcase
  end
endmodule
