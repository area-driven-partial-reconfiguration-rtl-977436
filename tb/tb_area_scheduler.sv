// tb_area_scheduler: runs the area-driven scheduler against a model of the
// reconfiguration engine (fixed delay per request) and checks:
//  - the operators are loaded and checked in cyclic order;
//  - each is checked for exactly AREA[k] * unit_cycles cycles (plus the
//    cycles spent on detected errors);
//  - a DMR error leads to a scrub request, after which the same operator
//    is checked again, and the counters of loads and scrubs.
module tb_area_scheduler;
  import seu_pkg::*;
  localparam int unsigned A [N_OPS] = '{AREA_CMUL, AREA_ADD1, AREA_MUL, AREA_ADD2};
  localparam int unsigned UNIT = 3;
  localparam int PR_DELAY = 7;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, dmr_error = 1'b0, pr_done = 1'b0;
  logic [31:0] unit_cycles = UNIT;
  op_e sel, rp_cfg, pr_target;
  logic cmp_en, pr_req;
  pr_kind_e pr_kind;
  logic [31:0] n_loads, n_scrubs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  area_scheduler dut (.*);

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
    if (pr_req || cmp_en) begin failures++; $display("not idle after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
