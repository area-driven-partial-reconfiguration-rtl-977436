// tb_area_scheduler_tmr: runs the triplicated scheduler through the same
// checks as the single one (cyclic order, check time proportional to area,
// scrub on a DMR error and resume, counters) while one of the three copies
// is knocked out of step in the middle of the run. The outputs must not
// notice, and the mismatch flag must report the disagreement.
module tb_area_scheduler_tmr;
  import seu_pkg::*;
  localparam int unsigned A [N_OPS] = '{AREA_CMUL, AREA_ADD1, AREA_MUL, AREA_ADD2};
  localparam int unsigned UNIT = 3;
  localparam int PR_DELAY = 7;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, dmr_error = 1'b0, pr_done = 1'b0;
  logic [31:0] unit_cycles = UNIT;
  op_e sel, rp_cfg, pr_target;
  logic cmp_en, pr_req, tmr_mismatch;
  int n_mismatch = 0;
  always @(posedge clk) if (tmr_mismatch) n_mismatch++;
  pr_kind_e pr_kind;
  logic [31:0] n_loads, n_scrubs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  area_scheduler_tmr dut (.*);

  // reconfiguration engine model
  int loads_seen = 0, scrubs_seen = 0;
  op_e load_order [$];
  initial forever begin
    @(posedge clk);
    if (rst_n && pr_req && !pr_done) begin
      if (pr_kind == PR_MODULE) load_order.push_back(pr_target);
      repeat (PR_DELAY - 1) @(posedge clk);
      #1 pr_done = 1'b1;
      if (pr_kind == PR_MODULE) loads_seen++; else scrubs_seen++;
      @(posedge clk); #1 pr_done = 1'b0;
    end
  end

  // measure the checking time of each operator visit
  int run_len = 0, err_in_run = 0;
  op_e run_op;
  int visits = 0;
  bit inject = 1'b0;
  always @(posedge clk) begin
    if (cmp_en) begin
      if (run_len == 0 && !(rp_cfg == sel)) begin
        failures++; $display("checking %0d with %0d loaded", sel, rp_cfg);
      end
      run_op = sel;
      run_len++;
      if (dmr_error) err_in_run++;
    end else if (pr_req && pr_kind == PR_MODULE && run_len > 0) begin
      // end of a visit
      checks++;
      if (run_len != int'(A[run_op] * UNIT) + err_in_run) begin
        failures++;
        $display("op %0d checked %0d cycles, expected %0d", run_op, run_len, A[run_op] * UNIT + err_in_run);
      end
      visits++;
      run_len = 0; err_in_run = 0;
    end
  end

  // raise one DMR error in the middle of a multiplier visit
  always @(negedge clk) begin
    dmr_error = inject && cmp_en && sel == OP_MUL && run_len == 50;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int scrub_req_kind_ok;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) enable = 1'b1;
    wait (visits == 5);
    wait (cmp_en);
    repeat (10) @(posedge clk);
    // upset in copy 0: its check counter jumps to the end
    @(negedge clk) force dut.g_copy[0].u_sched.dwell = 48'd1;
    @(negedge clk) release dut.g_copy[0].u_sched.dwell;
    wait (visits == 8);
    inject = 1'b1;
    wait (scrubs_seen == 1);
    inject = 1'b0;
    wait (visits == 16);
    @(negedge clk) enable = 1'b0;
    repeat (300) @(posedge clk);
    // cyclic order of the partial bitstreams
    for (int i = 0; i < load_order.size(); i++) begin
      checks++;
      if (load_order[i] != op_e'(i % N_OPS)) begin
        failures++; $display("load %0d was op %0d", i, load_order[i]);
      end
    end
    checks++;
    if (n_loads != 32'(loads_seen) || n_scrubs != 32'(scrubs_seen) || scrubs_seen != 1) begin
      failures++; $display("counters loads=%0d/%0d scrubs=%0d/%0d", n_loads, loads_seen, n_scrubs, scrubs_seen);
    end
    checks++;
    if (n_mismatch == 0) begin failures++; $display("copy disagreement not reported"); end
    checks++;
    if (pr_req || cmp_en) begin failures++; $display("not idle after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
