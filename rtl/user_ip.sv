// user_ip: test harness around the circuit under test (CUT), on AXI4-Lite.
//
// An input block RAM is filled by the processor and then read in a cycle,
// word after word and back to the start after LEN words, so the CUT
// (poly_reconfig, the protected design) and the Gold circuit (poly_baseline,
// a fault-free reference kept in the protected part) always process the
// same data. Their results are written side by side into a CUT RAM and a
// Gold RAM for debugging, and an oracle comparator flags every result on
// which they differ: the ground truth from which availability is measured.
// The CUT's own DMR error (from its partial duplication) is counted too, so
// that self-aware availability can be told apart from true availability.
// While a configuration bit is being injected (`ext_pause` or CTRL.pause)
// the input pointer and both pipelines are frozen and resume afterwards.
//
// Timing: one input per enabled cycle. A result leaves the CUT POLY_LATENCY
// enabled cycles after its operand is read from the RAM, plus one cycle of
// RAM read; it is compared and stored the cycle after it appears.
//
// AXI4-Lite slave, 32-bit data, 20-bit byte address, one transaction of each
// direction at a time, whole-word accesses (byte strobes are ignored):
//   0x00000 CTRL   rw  [0] run  [1] pause  [2] scheduler enable
//                      [3] ICAP owner (0 SEM core, 1 HWICAP)
//                      [4] write 1: clear counters and sticky flags and
//                          restart storing results at RAM word 0
//   0x00004 STATUS ro  [0] oracle error seen  [1] DMR error seen  [2] run
//                      [3] comparison on  [5:4] operator under check
//                      [7:6] operator in the checker partition
//   0x00008 LEN    rw  number of input words read in a cycle (1..DEPTH)
//   0x0000C UNIT   rw  clock cycles of checking per unit of area
//   0x00010 OUTCNT ro  results produced since the last clear
//   0x00014 ORACNT ro  results on which CUT and Gold differed
//   0x00018 DMRCNT ro  results produced while the DMR error was raised
//   0x0001C LOADS  ro  checker-partition reconfigurations
//   0x00020 SCRUBS ro  on-demand scrubs
//   0x40000 + 4i   wo  input RAM word i (low 16 bits)
//   0x80000 + 4i   ro  CUT RAM word i
//   0xC0000 + 4i   ro  Gold RAM word i
// Writes to read-only space answer SLVERR; other accesses OKAY.
//
// The input, CUT and Gold RAMs, the comparator and the oracle error, cyclic
// reading of the input and pausing during injection follow the published
// framework. The register map, the RAM depth and the counters are this
// design's choices.
module user_ip
  import seu_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // fault injection in progress: freeze the CUT
  input  logic        ext_pause,
  // from the area-driven scheduler
  input  op_e         sel,
  input  op_e         rp_cfg,
  input  logic        cmp_en,
  input  logic [31:0] n_loads,
  input  logic [31:0] n_scrubs,
  // to the scheduler and the ICAP multiplexer
  output logic        sched_enable,
  output logic [31:0] unit_cycles,
  output logic        icap_sel,
  // status
  output logic        dmr_error,
  output logic        oracle_error,
  output logic        irq_oracle_set,  // pulse: results turned wrong
  output logic        irq_oracle_clr,  // pulse: results correct again
  output logic        irq_dmr          // pulse: DMR error raised
);
  localparam logic [1:0] RG_REG = 2'd0, RG_IN = 2'd1, RG_CUT = 2'd2, RG_GOLD = 2'd3;

  // ---------------------------------------------------------------- registers
  logic          run, pause_r;
  logic [31:0]   len;
  logic [31:0]   out_cnt, ora_cnt, dmr_cnt;
  logic          ora_sticky, dmr_sticky;
  logic          clear;

  // ---------------------------------------------------------------- datapath
  logic          en, en_q;
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW-1:0] last_idx;
  word_t         x, cut_y, gold_y;
  logic [POLY_LATENCY:0] vld;
  logic          out_wr;
  poly_taps_t    cut_taps, gold_taps;

  assign en = run && !pause_r && !ext_pause;
  assign last_idx = (len == 0 || len > DEPTH) ? AW'(DEPTH - 1) : AW'(len - 1);

  always_ff @(posedge clk) begin
    if (!rst_n || !run) begin
      rd_ptr <= '0;
      vld    <= '0;
    end else if (en) begin
      rd_ptr <= (rd_ptr == last_idx) ? '0 : rd_ptr + 1'b1;
      vld    <= {vld[POLY_LATENCY-1:0], 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  // In the cycle after an enabled edge a fresh result sits at both outputs.
  assign out_wr = en_q && vld[POLY_LATENCY];

  logic          in_we;
  logic [AW-1:0] in_waddr;
  word_t         in_wdata;
  logic          dbg_re;
  logic [AW-1:0] dbg_raddr;
  word_t         cut_rd, gold_rd;

  bram_sdp #(.W(DATA_W), .DEPTH(DEPTH)) u_in_ram (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .re(en), .raddr(rd_ptr), .rdata(x));

  poly_reconfig u_cut (
    .clk, .rst_n, .en, .x, .sel_in(sel), .sel_out(sel), .rp_cfg, .cmp_en,
    .y(cut_y), .dmr_error, .taps(cut_taps));

  poly_baseline u_gold (.clk, .rst_n, .en, .x, .y(gold_y), .taps(gold_taps));

  bram_sdp #(.W(DATA_W), .DEPTH(DEPTH)) u_cut_ram (
    .clk, .we(out_wr), .waddr(wr_ptr), .wdata(cut_y),
    .re(dbg_re), .raddr(dbg_raddr), .rdata(cut_rd));

  bram_sdp #(.W(DATA_W), .DEPTH(DEPTH)) u_gold_ram (
    .clk, .we(out_wr), .waddr(wr_ptr), .wdata(gold_y),
    .re(dbg_re), .raddr(dbg_raddr), .rdata(gold_rd));

  // Oracle comparator.
  assign oracle_error = vld[POLY_LATENCY] && (cut_y != gold_y);

  logic ora_q, dmr_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      out_cnt <= '0; ora_cnt <= '0; dmr_cnt <= '0;
      ora_sticky <= 1'b0; dmr_sticky <= 1'b0;
      ora_q <= 1'b0; dmr_q <= 1'b0;
    end else begin
      ora_q <= oracle_error;
      dmr_q <= dmr_error;
      if (!run || clear) wr_ptr <= '0;
      else if (out_wr)   wr_ptr <= wr_ptr + 1'b1;   // wraps at DEPTH
      if (clear) begin
        out_cnt <= '0; ora_cnt <= '0; dmr_cnt <= '0;
        ora_sticky <= 1'b0; dmr_sticky <= 1'b0;
      end else begin
        if (out_wr) out_cnt <= out_cnt + 1'b1;
        if (out_wr && oracle_error) ora_cnt <= ora_cnt + 1'b1;
        if (out_wr && dmr_error)    dmr_cnt <= dmr_cnt + 1'b1;
        if (oracle_error) ora_sticky <= 1'b1;
        if (dmr_error)    dmr_sticky <= 1'b1;
      end
    end
  end

  assign irq_oracle_set = oracle_error && !ora_q;
  assign irq_oracle_clr = !oracle_error && ora_q;
  assign irq_dmr        = dmr_error && !dmr_q;

  // ---------------------------------------------------------- AXI4-Lite write
  logic       aw_fire;
  logic [1:0] w_region;
  logic [5:0] w_reg;

  assign aw_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = aw_fire;
  assign s_axi_wready  = aw_fire;
  assign w_region      = s_axi_awaddr[19:18];
  assign w_reg         = s_axi_awaddr[7:2];

  assign in_we    = aw_fire && (w_region == RG_IN);
  assign in_waddr = s_axi_awaddr[2 +: AW];
  assign in_wdata = s_axi_wdata[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; pause_r <= 1'b0; sched_enable <= 1'b0; icap_sel <= 1'b0;
      clear <= 1'b0;
      len <= 32'd1;
      unit_cycles <= 32'd1;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= 2'b00;
    end else begin
      clear <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (aw_fire) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= (w_region == RG_CUT || w_region == RG_GOLD) ? 2'b10 : 2'b00;
        if (w_region == RG_REG) begin
          unique case (w_reg)
            6'd0: begin
              run          <= s_axi_wdata[0];
              pause_r      <= s_axi_wdata[1];
              sched_enable <= s_axi_wdata[2];
              icap_sel     <= s_axi_wdata[3];
              clear        <= s_axi_wdata[4];
            end
            6'd2:    len         <= s_axi_wdata;
            6'd3:    unit_cycles <= s_axi_wdata;
            default: ;
          endcase
        end
      end
    end
  end

  // ----------------------------------------------------------- AXI4-Lite read
  logic        rd_pend;
  logic [19:0] ar_q;

  assign s_axi_arready = !rd_pend && !s_axi_rvalid;
  assign dbg_re        = s_axi_arvalid && s_axi_arready;
  assign dbg_raddr     = s_axi_araddr[2 +: AW];

  function automatic logic [31:0] reg_read(logic [5:0] idx);
    unique case (idx)
      6'd0: return {27'd0, 1'b0, icap_sel, sched_enable, pause_r, run};
      6'd1: return {24'd0, rp_cfg, sel, cmp_en, run, dmr_sticky, ora_sticky};
      6'd2: return len;
      6'd3: return unit_cycles;
      6'd4: return out_cnt;
      6'd5: return ora_cnt;
      6'd6: return dmr_cnt;
      6'd7: return n_loads;
      6'd8: return n_scrubs;
      default: return 32'd0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend      <= 1'b0;
      ar_q         <= '0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (dbg_re) begin
        rd_pend <= 1'b1;
        ar_q    <= s_axi_araddr;
      end
      if (rd_pend) begin
        rd_pend      <= 1'b0;
        s_axi_rvalid <= 1'b1;
        unique case (ar_q[19:18])
          RG_REG:  s_axi_rdata <= reg_read(ar_q[7:2]);
          RG_CUT:  s_axi_rdata <= {16'd0, cut_rd};
          RG_GOLD: s_axi_rdata <= {16'd0, gold_rd};
          default: s_axi_rdata <= 32'd0;
        endcase
      end
    end
  end
  assign s_axi_rresp = 2'b00;

  // Handshake rules of AXI4-Lite on the response channels.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
