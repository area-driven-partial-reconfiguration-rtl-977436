// poly_reconfig: the polynomial datapath protected by partial duplication.
//
// Instead of duplicating the whole datapath, one operator at a time is
// duplicated in a reconfigurable partition (rp_checker). The "select input"
// multiplexer routes the operands of the operator chosen by `sel_in` to the
// partition; the "select output" multiplexer picks that operator's result
// (chosen by `sel_out`) from the primary datapath; a comparator flags any
// difference as `dmr_error`. The primary output `y` is never delayed or
// altered by the checking.
//
// Timing: operands are sampled on an enabled clock edge and both copies
// register their results on that edge, so the comparison is combinational
// on the registered results. `dmr_error` is only raised while `cmp_en` is
// high and has been high on the previous enabled edge too, so that a change
// of operator (with `cmp_en` low during the reconfiguration) never compares
// results that belong to different operators. `rp_cfg` is the operator whose
// bitstream is loaded in the partition.
//
// The two multiplexers, the partition, the comparator and its DMR error
// output follow the published reconfigurable design; the compare-enable
// qualification is this design's addition.
module poly_reconfig
  import seu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  word_t      x,
  input  op_e        sel_in,
  input  op_e        sel_out,
  input  op_e        rp_cfg,
  input  logic       cmp_en,
  output word_t      y,
  output logic       dmr_error,
  output poly_taps_t taps
);
  word_t rp_a, rp_b, rp_y, prim_y;
  logic  cmp_armed;

  poly_baseline u_dp (.clk, .rst_n, .en, .x, .y, .taps);

  // Select input: operands of the operator under check.
  always_comb begin
    rp_b = '0;
    unique case (sel_in)
      OP_CMUL: rp_a = taps.x;
      OP_ADD1: rp_a = taps.m3;
      OP_MUL:  begin rp_a = taps.a1; rp_b = taps.x_d2; end
      OP_ADD2: rp_a = taps.p;
      default: rp_a = taps.x;
    endcase
  end

  rp_checker u_rp (.clk, .rst_n, .en, .cfg(rp_cfg), .a(rp_a), .b(rp_b), .y(rp_y));

  // Select output: result of the same operator in the primary datapath.
  always_comb begin
    unique case (sel_out)
      OP_CMUL: prim_y = taps.m3;
      OP_ADD1: prim_y = taps.a1;
      OP_MUL:  prim_y = taps.p;
      OP_ADD2: prim_y = taps.y;
      default: prim_y = taps.m3;
    endcase
  end

  // The partition's register holds a valid duplicate once it has been
  // loaded from the selected operands with comparison enabled.
  always_ff @(posedge clk) begin
    if (!rst_n)        cmp_armed <= 1'b0;
    else if (!cmp_en)  cmp_armed <= 1'b0;
    else if (en)       cmp_armed <= 1'b1;
  end

  assign dmr_error = cmp_en && cmp_armed && (rp_y != prim_y);
endmodule
