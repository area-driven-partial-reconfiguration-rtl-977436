// seu_framework_top: programmable-logic part of the SEU mitigation system.
//
// Holds the test harness with the protected circuit (user_ip), the
// area-driven scheduler that decides which operator of the circuit is
// duplicated in the reconfigurable checker partition and when a scrub is
// needed (area_scheduler, triplicated in area_scheduler_tmr), and the
// multiplexer that lets the SEM core and
// the HWICAP share the configuration port (icap_mux). The processor, the
// SEM core, the HWICAP, the AXI timers and the ICAP primitive sit outside:
// their signals are ports.
//
//   s_axi_*     AXI4-Lite slave of the harness (register map in user_ip)
//   sem_* / hw_* / icap_*  the two ICAP masters and the ICAP primitive
//   sem_busy    the SEM core is injecting a bit flip: the CUT is frozen
//   pr_req, pr_kind, pr_target, pr_done   reconfiguration requests of the
//               scheduler, served by the processor through the HWICAP:
//               PR_MODULE writes the partial bitstream of pr_target
//               (RP_BITSTREAM_BYTES) into the checker partition, PR_SCRUB
//               rewrites the whole design (FULL_BITSTREAM_BYTES); pr_done
//               pulses for one cycle when the write is complete
//   irq_*       event pulses for time-stamping (error start and end, DMR
//               error, reconfiguration request)
//   tmr_mismatch  the three scheduler copies disagree (one is corrupted and
//               masked)
//
// The partitioning into harness, scheduler and ICAP sharing, and TMR for the
// control part, follow the published framework; realising the scheduling in logic rather than in
// processor software is this design's choice.
module seu_framework_top
  import seu_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [19:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  input  logic        sem_busy,
  input  logic        sem_csib,
  input  logic        sem_rdwrb,
  input  logic [31:0] sem_i,
  output logic [31:0] sem_o,
  input  logic        hw_csib,
  input  logic        hw_rdwrb,
  input  logic [31:0] hw_i,
  output logic [31:0] hw_o,
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o,
  output logic        icap_owner,
  output logic        pr_req,
  output pr_kind_e    pr_kind,
  output op_e         pr_target,
  input  logic        pr_done,
  output logic        dmr_error,
  output logic        oracle_error,
  output logic        irq_oracle_set,
  output logic        irq_oracle_clr,
  output logic        irq_dmr,
  output logic        irq_pr,
  output logic        tmr_mismatch
);
  op_e         sel, rp_cfg;
  logic        cmp_en, sched_enable, icap_sel;
  logic [31:0] unit_cycles, n_loads, n_scrubs;
  logic        pr_req_q;

  user_ip #(.DEPTH(DEPTH)) u_ip (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .ext_pause(sem_busy),
    .sel, .rp_cfg, .cmp_en, .n_loads, .n_scrubs,
    .sched_enable, .unit_cycles, .icap_sel,
    .dmr_error, .oracle_error, .irq_oracle_set, .irq_oracle_clr, .irq_dmr);

  area_scheduler_tmr u_sched (
    .clk, .rst_n, .enable(sched_enable), .unit_cycles, .dmr_error,
    .sel, .rp_cfg, .cmp_en, .pr_req, .pr_kind, .pr_target, .pr_done,
    .n_loads, .n_scrubs, .tmr_mismatch);

  icap_mux u_icap (
    .clk, .rst_n, .sel_req(icap_sel), .owner(icap_owner),
    .sem_csib, .sem_rdwrb, .sem_i, .sem_o,
    .hw_csib, .hw_rdwrb, .hw_i, .hw_o,
    .icap_csib, .icap_rdwrb, .icap_i, .icap_o);

  always_ff @(posedge clk) begin
    if (!rst_n) pr_req_q <= 1'b0;
    else        pr_req_q <= pr_req;
  end
  assign irq_pr = pr_req && !pr_req_q;
endmodule
