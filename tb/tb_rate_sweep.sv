// tb_rate_sweep: availability of the area-driven technique against the
// ratio of reconfiguration rate to SEU rate, from 1/16 to 16 in steps of 2x.
//
// Time is scaled down: the mean time between SEUs is T_SEU clock cycles
// (2 ms at 100 MHz instead of one second) and SEU arrival times are drawn
// from an exponential distribution. An SEU corrupts one operator of the CUT
// or the checker partition with a probability proportional to its area.
// For each ratio r the check time per unit of area is set so that, on
// average, the checker partition is reconfigured r times per SEU interval.
// The processor model serves requests by writing the bitstream words
// through the HWICAP port (1,324 words per operator, 4,413 per scrub).
//
// Per point it reports availability (fraction of cycles with correct
// results), the fraction of cycles with the DMR error raised, and the bytes
// of bitstream moved, and checks that results are only wrong while a fault
// is present, that the DMR error is never raised without one, that the bytes
// moved match the reconfigurations counted over AXI, and that availability
// at the highest rate is well above that at the lowest.
module tb_rate_sweep;
  import seu_pkg::*;
  localparam int LEN = 64;
  localparam int T_SEU = 200_000;
  localparam int N_SEU = 40;
  localparam int N_PTS = 9;
  localparam int LOAD_CYC = (RP_BITSTREAM_BYTES + 3) / 4 + 30;   // transfer + handshakes
  localparam int AREA_SUM = AREA_CMUL + AREA_ADD1 + AREA_MUL + AREA_ADD2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [19:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic sem_busy = 0, sem_csib = 1, sem_rdwrb = 0, hw_csib = 1, hw_rdwrb = 0;
  logic [31:0] sem_i = '0, hw_i = '0, sem_o, hw_o, icap_i, icap_o = 32'h0;
  logic icap_csib, icap_rdwrb, icap_owner;
  logic pr_req, pr_done = 1'b0;
  pr_kind_e pr_kind;
  op_e pr_target;
  logic dmr_error, oracle_error, irq_oracle_set, irq_oracle_clr, irq_dmr, irq_pr, tmr_mismatch;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  seu_framework_top dut (.*);

  task automatic fail(input string msg);
    failures++; $display("FAIL @%0t: %s", $time, msg);
  endtask

  bit axi_busy = 0;
  task automatic axi_write(input logic [19:0] addr, input logic [31:0] data);
    while (axi_busy) @(posedge clk);
    axi_busy = 1;
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_wdata = data; s_axi_awvalid = 1; s_axi_wvalid = 1; s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    #1 s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(posedge clk);
    @(posedge clk); #1 s_axi_bready = 0;
    axi_busy = 0;
  endtask
  task automatic axi_read(input logic [19:0] addr, output logic [31:0] data);
    while (axi_busy) @(posedge clk);
    axi_busy = 1;
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1; s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1 s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(posedge clk);
    data = s_axi_rdata;
    @(posedge clk); #1 s_axi_rready = 0;
    axi_busy = 0;
  endtask

  // configuration faults
  bit fault_op [N_OPS];
  bit fault_rp;
  int since_clean = 0;
  function automatic bit any_fault();
    return fault_op[0] | fault_op[1] | fault_op[2] | fault_op[3] | fault_rp;
  endfunction
  task automatic corrupt(input int k);
    case (k)
      0: force dut.u_ip.u_cut.u_dp.u_cmul.y = 16'h3C3C;
      1: force dut.u_ip.u_cut.u_dp.u_add1.y = 16'h0001;
      2: force dut.u_ip.u_cut.u_dp.u_mul.y  = 16'hA5A5;
      3: force dut.u_ip.u_cut.u_dp.u_add2.y = 16'h7E7E;
      default: force dut.u_ip.u_cut.u_rp.y  = 16'h1111;
    endcase
    if (k < N_OPS) fault_op[k] = 1'b1; else fault_rp = 1'b1;
  endtask
  task automatic scrub_all();
    release dut.u_ip.u_cut.u_dp.u_cmul.y;
    release dut.u_ip.u_cut.u_dp.u_add1.y;
    release dut.u_ip.u_cut.u_dp.u_mul.y;
    release dut.u_ip.u_cut.u_dp.u_add2.y;
    release dut.u_ip.u_cut.u_rp.y;
    foreach (fault_op[k]) fault_op[k] = 1'b0;
    fault_rp = 1'b0;
  endtask

  // processor serving reconfiguration requests
  longint words = 0;
  bit     proc_busy = 0;
  initial forever begin
    @(posedge clk);
    if (rst_n && pr_req && !pr_done) begin
      pr_kind_e kind;
      int nwords;
      proc_busy = 1;
      kind = pr_kind;
      nwords = (kind == PR_SCRUB) ? (FULL_BITSTREAM_BYTES + 3) / 4 : (RP_BITSTREAM_BYTES + 3) / 4;
      axi_write(20'h00000, 32'h0000_000D);
      while (!icap_owner) @(posedge clk);
      for (int w = 0; w < nwords; w++) begin
        @(negedge clk); hw_csib = 1'b0; hw_i = $urandom;
        words++;
      end
      @(negedge clk) hw_csib = 1'b1;
      if (kind == PR_SCRUB) scrub_all();
      else if (fault_rp) begin release dut.u_ip.u_cut.u_rp.y; fault_rp = 1'b0; end
      @(negedge clk) pr_done = 1'b1;
      @(negedge clk) pr_done = 1'b0;
      axi_write(20'h00000, 32'h0000_0005);
      while (icap_owner) @(posedge clk);
      proc_busy = 0;
    end
  end

  // monitors
  longint cycles = 0, wrong = 0, flagged = 0;
  bit measuring = 0;
  always @(posedge clk) if (rst_n) begin
    if (any_fault()) since_clean = 0; else since_clean++;
    if (measuring) begin
      cycles++;
      if (oracle_error) wrong++;
      if (dmr_error) flagged++;
    end
    if (oracle_error && !any_fault() && since_clean > POLY_LATENCY + 2) begin
      checks++; fail("wrong result without a fault");
    end
    if (dmr_error && !any_fault()) begin
      checks++; fail("DMR error without a fault");
    end
  end

  initial begin
    repeat (150_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real avail [N_PTS];
    for (int pt = 0; pt < N_PTS; pt++) begin
      real ratio, interval, u;
      int unit, gap;
      logic [31:0] loads, scrubs;
      ratio = 2.0 ** (pt - 4);                   // 1/16 .. 16
      interval = real'(T_SEU) / ratio;           // mean cycles between reconfigurations
      unit = int'((interval - real'(LOAD_CYC)) * N_OPS / AREA_SUM);
      if (unit < 1) unit = 1;
      // fresh start
      @(negedge clk) rst_n = 1'b0;
      scrub_all();
      words = 0; cycles = 0; wrong = 0; flagged = 0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int i = 0; i < LEN; i++) axi_write(20'h40000 + 20'(4 * i), $urandom);
      axi_write(20'h00008, LEN);
      axi_write(20'h0000C, unit);
      axi_write(20'h00000, 32'h0000_0005);
      measuring = 1;
      for (int s = 0; s < N_SEU; s++) begin
        int pick, k;
        u = real'($urandom % 1000000 + 1) / 1000001.0;
        gap = int'(-real'(T_SEU) * $ln(u));
        repeat (gap) @(posedge clk);
        while (pr_req || icap_owner) @(posedge clk);
        @(negedge clk) sem_busy = 1'b1;
        repeat (20) begin @(negedge clk); sem_csib = 1'b0; sem_i = $urandom; end
        @(negedge clk) sem_csib = 1'b1;
        pick = int'($urandom % (AREA_SUM + AREA_ADD2));
        k = (pick < AREA_CMUL) ? 0 : (pick < AREA_CMUL + AREA_ADD1) ? 1 :
            (pick < AREA_CMUL + AREA_ADD1 + AREA_MUL) ? 2 : (pick < AREA_SUM) ? 3 : 4;
        corrupt(k);
        @(negedge clk) sem_busy = 1'b0;
      end
      repeat (T_SEU) @(posedge clk);
      measuring = 0;
      axi_write(20'h00000, 32'h0000_0001);      // scheduler off
      while (pr_req || proc_busy) @(posedge clk);
      axi_read(20'h0001C, loads);
      axi_read(20'h00020, scrubs);
      checks++;
      if (words != longint'(loads) * ((RP_BITSTREAM_BYTES + 3) / 4) +
                   longint'(scrubs) * ((FULL_BITSTREAM_BYTES + 3) / 4))
        fail("bitstream words do not match the reconfigurations counted");
      avail[pt] = 1.0 - real'(wrong) / real'(cycles);
      $display("fscrub/fseu = %7.4f  unit=%0d  availability=%0.3f  DMR flagged=%0.4f  loads=%0d scrubs=%0d  bytes=%0d",
               ratio, unit, avail[pt], real'(flagged) / real'(cycles), loads, scrubs, words * 4);
    end
    checks++;
    if (!(avail[N_PTS-1] > avail[0] + 0.2)) fail("availability does not rise with the reconfiguration rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
