// tb_poly_reconfig: checks the partially duplicated polynomial datapath.
//  - the output is F(x) with four cycles of latency whatever operator is
//    being checked, and the DMR error stays low without faults;
//  - a wrong result forced onto one primary operator is flagged while that
//    operator is the one checked, and not while another one is;
//  - a wrong result in the checker partition itself is flagged;
//  - nothing is flagged while comparison is disabled.
module tb_poly_reconfig;
  import seu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, cmp_en = 1'b0;
  word_t x = '0, y;
  op_e sel = OP_CMUL;
  logic dmr_error;
  poly_taps_t taps;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  poly_reconfig dut (.clk, .rst_n, .en, .x, .sel_in(sel), .sel_out(sel), .rp_cfg(sel),
                     .cmp_en, .y, .dmr_error, .taps);

  function automatic word_t f_ref(word_t v);
    return word_t'((3 * longint'(v) * longint'(v) + 5 * longint'(v) + 5) % 65536);
  endfunction

  word_t hist [$];
  int    n_in = 0;
  int    n_err = 0;        // cycles with dmr_error in the current window
  bit    faulty = 1'b0;    // a fault is forced: the output is not checked

  // stimulus and output check on every cycle
  always @(negedge clk) if (rst_n) begin
    x = word_t'($urandom);
  end
  always @(posedge clk) if (rst_n) begin
    hist.push_back(x);
    n_in++;
  end
  always @(negedge clk) if (rst_n && !faulty && n_in > POLY_LATENCY) begin
    checks++;
    if (y !== f_ref(hist[hist.size() - POLY_LATENCY])) begin
      failures++; $display("output wrong: y=%h", y);
    end
  end
  always @(negedge clk) if (dmr_error) n_err++;

  task automatic window(input op_e k, input bit cmp, input int cycles);
    @(negedge clk); sel = k; cmp_en = 1'b0;      // switch with comparison off
    @(negedge clk); cmp_en = cmp;
    n_err = 0;
    repeat (cycles) @(negedge clk);
  endtask

  task automatic expect_err(input bit want, input string what);
    checks++;
    if ((n_err > 0) != want) begin
      failures++; $display("%s: dmr cycles=%0d, expected %s", what, n_err, want ? "some" : "none");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < N_OPS; k++) begin
      window(op_e'(k), 1'b1, 100);
      expect_err(1'b0, $sformatf("fault-free op %0d", k));
    end
    // stuck word on the two-input multiplier output
    faulty = 1'b1;
    force dut.u_dp.u_mul.y = 16'h5A5A;
    window(OP_CMUL, 1'b1, 100);  expect_err(1'b0, "mul fault, cmul checked");
    window(OP_ADD2, 1'b1, 100);  expect_err(1'b0, "mul fault, add2 checked");
    window(OP_MUL,  1'b1, 100);  expect_err(1'b1, "mul fault, mul checked");
    window(OP_MUL,  1'b0, 100);  expect_err(1'b0, "mul fault, comparison off");
    release dut.u_dp.u_mul.y;
    repeat (POLY_LATENCY) @(negedge clk);
    faulty = 1'b0;
    // stuck word on the constant multiplier
    faulty = 1'b1;
    force dut.u_dp.u_cmul.y = 16'h0003;
    window(OP_ADD1, 1'b1, 100);  expect_err(1'b0, "cmul fault, add1 checked");
    window(OP_CMUL, 1'b1, 100);  expect_err(1'b1, "cmul fault, cmul checked");
    release dut.u_dp.u_cmul.y;
    repeat (POLY_LATENCY) @(negedge clk);
    faulty = 1'b0;
    // stuck word on the first adder
    faulty = 1'b1;
    force dut.u_dp.u_add1.y = 16'h1234;
    window(OP_ADD1, 1'b1, 100);  expect_err(1'b1, "add1 fault, add1 checked");
    release dut.u_dp.u_add1.y;
    repeat (POLY_LATENCY) @(negedge clk);
    faulty = 1'b0;
    // fault inside the checker partition's copy of the last adder
    faulty = 1'b1;
    force dut.u_rp.u_add2.y = 16'hFFFF;
    window(OP_ADD2, 1'b1, 100);  expect_err(1'b1, "checker fault, add2 checked");
    release dut.u_rp.u_add2.y;
    repeat (POLY_LATENCY) @(negedge clk);
    faulty = 1'b0;
    window(OP_ADD2, 1'b1, 100);  expect_err(1'b0, "after repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
