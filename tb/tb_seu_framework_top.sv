// tb_seu_framework_top: end-to-end run of the SEU mitigation system at its
// default sizes.
//
// The testbench plays the parts outside the programmable logic:
//  - the processor: loads the input RAM over AXI4-Lite, starts the run,
//    and serves every reconfiguration request by handing the ICAP to the
//    HWICAP and writing the whole partial bitstream through it, one 32-bit
//    word per cycle (RP_BITSTREAM_BYTES for an operator,
//    FULL_BITSTREAM_BYTES for a scrub);
//  - the SEM core: at random times freezes the CUT, takes the ICAP for the
//    injection and flips the function of one operator of the CUT, chosen
//    with a probability proportional to its area (a stuck result word);
//  - an upset in one of the three scheduler copies, which voting must mask;
//  - configuration memory: a scrub repairs every fault, loading an
//    operator into the checker partition repairs a fault in the partition.
// It checks that results are wrong only while a fault is present, that
// every fault is found and repaired, that bitstream words reach the ICAP
// unchanged, and the counters read back over AXI. Each mechanism (operator
// loads, detection, scrub, masked scheduler upset, latent fault in an unchecked operator, fault in
// the checker, injection pause, ICAP hand-over, oracle error set and clear)
// must happen at least once.
module tb_seu_framework_top;
  import seu_pkg::*;
  localparam int LEN = 300;
  localparam int N_SEU = 14;

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

  function automatic bit cmp_en_now();
    return dut.cmp_en;
  endfunction

  task automatic fail(input string msg);
    failures++; $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ------------------------------------------------------------- AXI master
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

  // ------------------------------------------------- configuration faults
  bit fault_op [N_OPS];   // primary operator of the CUT is corrupted
  bit fault_rp;           // checker partition is corrupted
  int since_clean = 0;    // cycles since the last fault was repaired

  function automatic bit any_fault();
    return fault_op[0] | fault_op[1] | fault_op[2] | fault_op[3] | fault_rp;
  endfunction

  task automatic corrupt_op(input int k);
    case (k)
      0: force dut.u_ip.u_cut.u_dp.u_cmul.y = 16'h3C3C;
      1: force dut.u_ip.u_cut.u_dp.u_add1.y = 16'h0001;
      2: force dut.u_ip.u_cut.u_dp.u_mul.y  = 16'hA5A5;
      default: force dut.u_ip.u_cut.u_dp.u_add2.y = 16'h7E7E;
    endcase
    fault_op[k] = 1'b1;
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

  // ------------------------------------------------------------- counters
  int n_load_op [N_OPS];
  int n_scrub = 0, n_detect = 0, n_latent = 0, n_rp_fault = 0, n_rp_repair_by_load = 0;
  int n_sched_upset = 0, n_tmr_cycles = 0;
  int n_pause = 0, n_to_hw = 0, n_to_sem = 0, n_set = 0, n_clr = 0, n_seu = 0;
  longint words_to_icap = 0, cycles = 0, wrong_cycles = 0, flagged_cycles = 0;

  // ------------------------------------------- processor serving requests
  initial forever begin
    @(posedge clk);
    if (rst_n && pr_req && !pr_done) begin
      pr_kind_e kind;
      op_e      tgt;
      int       nwords;
      kind = pr_kind; tgt = pr_target;
      nwords = (kind == PR_SCRUB) ? (FULL_BITSTREAM_BYTES + 3) / 4 : (RP_BITSTREAM_BYTES + 3) / 4;
      axi_write(20'h00000, 32'h0000_000D);        // run, scheduler, ICAP to HWICAP
      while (!icap_owner) @(posedge clk);
      n_to_hw++;
      for (int w = 0; w < nwords; w++) begin
        @(negedge clk);
        hw_csib = 1'b0; hw_rdwrb = 1'b0; hw_i = $urandom;
        #1;
        if (icap_csib !== 1'b0 || icap_i !== hw_i || icap_rdwrb !== 1'b0) begin
          checks++; fail("bitstream word did not reach the ICAP");
        end
        words_to_icap++;
      end
      @(negedge clk) hw_csib = 1'b1;
      if (kind == PR_SCRUB) begin
        scrub_all();
        n_scrub++;
      end else begin
        if (fault_rp) begin
          release dut.u_ip.u_cut.u_rp.y;
          fault_rp = 1'b0;
          n_rp_repair_by_load++;
        end
        n_load_op[tgt]++;
      end
      @(negedge clk) pr_done = 1'b1;
      @(negedge clk) pr_done = 1'b0;
      axi_write(20'h00000, 32'h0000_0005);        // ICAP back to the SEM core
      while (icap_owner) @(posedge clk);
      n_to_sem++;
    end
  end

  // ------------------------------------------------------------- monitors
  bit measuring = 0;
  always @(posedge clk) if (rst_n) begin
    if (any_fault()) since_clean = 0; else since_clean++;
    if (irq_oracle_set) n_set++;
    if (irq_oracle_clr) n_clr++;
    if (irq_dmr) n_detect++;
    if (tmr_mismatch) n_tmr_cycles++;
    if (measuring) begin
      cycles++;
      if (oracle_error) wrong_cycles++;
      if (dmr_error) flagged_cycles++;
    end
    // results may only be wrong while a fault is present (or still in flight)
    if (oracle_error && !any_fault() && since_clean > POLY_LATENCY + 2) begin
      checks++; fail("wrong result without a fault");
    end
    if (dmr_error && !any_fault()) begin
      checks++; fail("DMR error without a fault");
    end
  end

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- main
  initial begin
    word_t in_data [LEN];
    logic [31:0] d;
    int wait_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      in_data[i] = word_t'($urandom);
      axi_write(20'h40000 + 20'(4 * i), 32'(in_data[i]));
    end
    axi_write(20'h00008, LEN);
    axi_write(20'h0000C, 32'd16);                 // 16 cycles per unit of area
    axi_write(20'h00000, 32'h0000_0005);          // run, scheduler on
    measuring = 1;
    repeat (3000) @(posedge clk);

    // SEU campaign
    for (int s = 0; s < N_SEU; s++) begin
      int gap, pick, k;
      gap = 3000 + int'($urandom % 6000);
      repeat (gap) @(posedge clk);
      while (pr_req || icap_owner) @(posedge clk);
      // the SEM core takes the ICAP while the CUT is frozen
      @(negedge clk) sem_busy = 1'b1; n_pause++;
      for (int w = 0; w < 20 + int'($urandom % 40); w++) begin
        @(negedge clk); sem_csib = 1'b0; sem_i = $urandom;
        #1 if (icap_csib !== 1'b0 || icap_i !== sem_i) begin checks++; fail("SEM word lost"); end
      end
      @(negedge clk) sem_csib = 1'b1;
      if (s == 3) begin
        if (!fault_rp) begin
          force dut.u_ip.u_cut.u_rp.y = 16'h1111;
          fault_rp = 1'b1; n_rp_fault++;
        end
      end else begin
        pick = int'($urandom % (AREA_CMUL + AREA_ADD1 + AREA_MUL + AREA_ADD2));
        k = (pick < AREA_CMUL) ? 0 : (pick < AREA_CMUL + AREA_ADD1) ? 1 :
            (pick < AREA_CMUL + AREA_ADD1 + AREA_MUL) ? 2 : 3;
        if (s == 1) k = (dut.u_sched.sel == OP_MUL) ? 0 : 2;   // one latent fault for sure
        if (!fault_op[k]) begin
          if (dut.u_sched.sel != op_e'(k)) n_latent++;
          corrupt_op(k);
        end
      end
      n_seu++;
      @(negedge clk) sem_busy = 1'b0;
      if (s == 5) begin
        // upset in one copy of the triplicated scheduler: must be masked
        while (!cmp_en_now()) @(posedge clk);
        @(negedge clk) force dut.u_sched.g_copy[2].u_sched.dwell = 48'd1;
        @(negedge clk) release dut.u_sched.g_copy[2].u_sched.dwell;
        n_sched_upset++;
      end
    end

    // every fault must be found and repaired within two rounds of checks
    wait_cyc = 0;
    while (any_fault() && wait_cyc < 200000) begin @(posedge clk); wait_cyc++; end
    checks++; if (any_fault()) fail("a fault was never repaired");
    repeat (50) @(posedge clk);
    checks++; if (oracle_error) fail("results still wrong after repair");
    measuring = 0;
    // after repair the CUT agrees with the Gold circuit again
    axi_write(20'h00000, 32'h0000_0015);          // clear counters, keep running
    repeat (3000) @(posedge clk);
    while (pr_req) @(posedge clk);
    axi_write(20'h00000, 32'h0000_0003);          // pause, scheduler off
    while (pr_req) @(posedge clk);
    axi_read(20'h00014, d);
    checks++; if (d != 0) fail($sformatf("%0d wrong results after repair", d));
    axi_read(20'h00018, d);
    checks++; if (d != 0) fail($sformatf("%0d flagged results after repair", d));

    axi_read(20'h0001C, d);
    checks++; if (int'(d) != n_load_op[0] + n_load_op[1] + n_load_op[2] + n_load_op[3]) fail("LOADS counter");
    axi_read(20'h00020, d);
    checks++; if (int'(d) != n_scrub) fail($sformatf("SCRUBS counter %0d vs %0d", d, n_scrub));
    axi_read(20'h00010, d);
    checks++; if (d < 1000) fail("too few results");
    // results stored since the clear, all produced after repair: the Gold
    // result is F of one of the input words and the CUT agrees with it
    for (int i = 0; i < 40; i++) begin
      logic [31:0] g, c;
      bit found;
      axi_read(20'hC0000 + 20'(4 * i), g);
      axi_read(20'h80000 + 20'(4 * i), c);
      found = 0;
      foreach (in_data[n]) begin
        longint v;
        v = longint'(in_data[n]);
        if (g[15:0] == word_t'((3 * v * v + 5 * v + 5) % 65536)) found = 1;
      end
      checks++; if (!found) fail($sformatf("Gold result %0d is no F(x) of the inputs", i));
      checks++; if (c[15:0] !== g[15:0]) fail($sformatf("CUT result %0d", i));
    end

    // every mechanism must have happened
    foreach (n_load_op[k]) begin
      checks++; if (n_load_op[k] == 0) fail($sformatf("operator %0d never loaded", k));
    end
    checks++; if (n_detect == 0) fail("no DMR detection");
    checks++; if (n_scrub == 0) fail("no scrub");
    checks++; if (n_latent == 0) fail("no latent fault");
    checks++; if (n_rp_fault == 0) fail("no checker fault");
    checks++; if (n_pause == 0) fail("no injection pause");
    checks++; if (n_sched_upset == 0 || n_tmr_cycles == 0) fail("no masked scheduler upset");
    checks++; if (n_to_hw == 0 || n_to_sem == 0) fail("no ICAP hand-over");
    checks++; if (n_set == 0 || n_clr == 0) fail("no oracle error set/clear");
    $display("SEUs %0d, operator loads %0d/%0d/%0d/%0d, detections %0d, scrubs %0d, latent %0d,",
             n_seu, n_load_op[0], n_load_op[1], n_load_op[2], n_load_op[3], n_detect, n_scrub, n_latent);
    $display("checker faults %0d (repaired by load %0d), pauses %0d, ICAP hand-overs %0d/%0d, scheduler upsets %0d",
             n_rp_fault, n_rp_repair_by_load, n_pause, n_to_hw, n_to_sem, n_sched_upset);
    $display("bitstream words to ICAP %0d (%0d bytes), availability %0.4f, flagged %0.4f",
             words_to_icap, words_to_icap * 4, 1.0 - real'(wrong_cycles) / real'(cycles),
             real'(flagged_cycles) / real'(cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
