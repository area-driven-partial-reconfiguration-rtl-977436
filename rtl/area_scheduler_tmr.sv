// area_scheduler_tmr: the area-driven scheduler in triple modular
// redundancy.
//
// The scheduler decides when the circuit is reconfigured and scrubbed, so
// it belongs to the protected part of the device. Three identical
// area_scheduler copies receive the same inputs; every output is taken by
// bitwise majority (tmr_voter), so an upset that corrupts one copy cannot
// reach the outputs. `tmr_mismatch` is high while the copies disagree. The
// copies are not re-synchronised: a copy that has diverged stays masked
// until the next reset, and a second diverging copy would no longer be
// masked. Interface and timing are those of area_scheduler.
//
// Protecting the control part with TMR follows the published system; the
// voting granularity (on the outputs of whole scheduler copies) and the
// mismatch flag are this design's choices.
module area_scheduler_tmr
  import seu_pkg::*;
#(
  parameter int unsigned AREA [N_OPS] = '{AREA_CMUL, AREA_ADD1, AREA_MUL, AREA_ADD2},
  parameter int unsigned CNT_W = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [31:0] unit_cycles,
  input  logic        dmr_error,
  output op_e         sel,
  output op_e         rp_cfg,
  output logic        cmp_en,
  output logic        pr_req,
  output pr_kind_e    pr_kind,
  output op_e         pr_target,
  input  logic        pr_done,
  output logic [31:0] n_loads,
  output logic [31:0] n_scrubs,
  output logic        tmr_mismatch
);
  typedef struct packed {
    op_e         sel;
    op_e         rp_cfg;
    logic        cmp_en;
    logic        pr_req;
    pr_kind_e    pr_kind;
    op_e         pr_target;
    logic [31:0] n_loads;
    logic [31:0] n_scrubs;
  } sched_out_t;

  sched_out_t copy [3];
  sched_out_t voted;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    area_scheduler #(.AREA(AREA), .CNT_W(CNT_W)) u_sched (
      .clk, .rst_n, .enable, .unit_cycles, .dmr_error,
      .sel(copy[i].sel), .rp_cfg(copy[i].rp_cfg), .cmp_en(copy[i].cmp_en),
      .pr_req(copy[i].pr_req), .pr_kind(copy[i].pr_kind), .pr_target(copy[i].pr_target),
      .pr_done, .n_loads(copy[i].n_loads), .n_scrubs(copy[i].n_scrubs));
  end

  tmr_voter #(.W($bits(sched_out_t))) u_vote (
    .a(copy[0]), .b(copy[1]), .c(copy[2]), .y(voted), .mismatch(tmr_mismatch));

  assign sel       = voted.sel;
  assign rp_cfg    = voted.rp_cfg;
  assign cmp_en    = voted.cmp_en;
  assign pr_req    = voted.pr_req;
  assign pr_kind   = voted.pr_kind;
  assign pr_target = voted.pr_target;
  assign n_loads   = voted.n_loads;
  assign n_scrubs  = voted.n_scrubs;
endmodule
