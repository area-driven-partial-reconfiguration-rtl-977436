// tb_user_ip: drives the test harness over AXI4-Lite as the processor does:
// loads the input RAM, starts the cyclic run, pauses it as during a fault
// injection, and reads back the counters and the CUT and Gold RAMs. Every
// stored result is checked against F(x) = 3x^2 + 5x + 5 of the input word it
// came from. A wrong result forced into the CUT must show up in the oracle
// and DMR counters and interrupts. Also checks the latency from start to the
// first stored result.
module tb_user_ip;
  import seu_pkg::*;
  localparam int DEPTH = 256;
  localparam int LEN = 37;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [19:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic ext_pause = 1'b0;
  op_e sel = OP_MUL, rp_cfg = OP_MUL;
  logic cmp_en = 1'b1;
  logic [31:0] n_loads = 32'd11, n_scrubs = 32'd22;
  logic sched_enable, icap_sel, dmr_error, oracle_error, irq_oracle_set, irq_oracle_clr, irq_dmr;
  logic [31:0] unit_cycles;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  user_ip #(.DEPTH(DEPTH)) dut (.*);

  function automatic word_t f_ref(word_t v);
    return word_t'((3 * longint'(v) * longint'(v) + 5 * longint'(v) + 5) % 65536);
  endfunction

  task automatic axi_write(input logic [19:0] addr, input logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_wdata = data; s_axi_awvalid = 1; s_axi_wvalid = 1; s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    #1 s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(posedge clk);
    resp = s_axi_bresp;
    @(posedge clk); #1 s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [19:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1; s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_arready);
    #1 s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(posedge clk);
    data = s_axi_rdata;
    @(posedge clk); #1 s_axi_rready = 0;
  endtask

  task automatic wr(input logic [19:0] addr, input logic [31:0] data);
    logic [1:0] r;
    axi_write(addr, data, r);
  endtask

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  int n_set = 0, n_clr = 0, n_dmr = 0;
  always @(posedge clk) begin
    if (irq_oracle_set) n_set++;
    if (irq_oracle_clr) n_clr++;
    if (irq_dmr) n_dmr++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t in_data [LEN];
    logic [31:0] d, outcnt;
    logic [1:0] resp;
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      in_data[i] = word_t'($urandom);
      wr(20'h40000 + 20'(4 * i), {16'hDEAD, in_data[i]});
    end
    wr(20'h00008, LEN);
    wr(20'h0000C, 32'd9);
    expect_eq("UNIT out", unit_cycles, 9);
    axi_read(20'h00008, d); expect_eq("LEN readback", d, LEN);
    axi_write(20'h80000, 32'd1, resp); expect_eq("write to CUT RAM refused", resp, 2);
    // start: run + scheduler enable + HWICAP owns ICAP
    wr(20'h00000, 32'h0000_000D);
    lat = 0;
    while (!dut.u_cut_ram.we) begin @(posedge clk); lat++; end
    // latency: RAM read, four operators, store
    expect_eq("start-to-first-store latency", lat, POLY_LATENCY + 1);
    expect_eq("scheduler enable", sched_enable, 1);
    expect_eq("ICAP owner bit", icap_sel, 1);
    repeat (40) @(posedge clk);
    // a fault injection freezes the pipeline
    @(negedge clk) ext_pause = 1'b1;
    axi_read(20'h00010, outcnt);
    repeat (30) @(posedge clk);
    axi_read(20'h00010, d); expect_eq("no results while paused", d, outcnt);
    @(negedge clk) ext_pause = 1'b0;
    repeat (100) @(posedge clk);
    wr(20'h00000, 32'h0000_0003);    // run + pause
    axi_read(20'h00010, outcnt);
    checks++; if (outcnt < 100) begin failures++; $display("too few results %0d", outcnt); end
    axi_read(20'h00014, d); expect_eq("oracle count, fault free", d, 0);
    axi_read(20'h00018, d); expect_eq("DMR count, fault free", d, 0);
    axi_read(20'h00004, d); expect_eq("STATUS", d, {24'd0, 2'(OP_MUL), 2'(OP_MUL), 1'b1, 1'b1, 2'b00});
    axi_read(20'h0001C, d); expect_eq("LOADS", d, 11);
    axi_read(20'h00020, d); expect_eq("SCRUBS", d, 22);
    for (int i = 0; i < int'(outcnt); i++) begin
      logic [31:0] c, g;
      axi_read(20'h80000 + 20'(4 * i), c);
      axi_read(20'hC0000 + 20'(4 * i), g);
      expect_eq($sformatf("CUT RAM[%0d]", i), c, f_ref(in_data[i % LEN]));
      expect_eq($sformatf("Gold RAM[%0d]", i), g, f_ref(in_data[i % LEN]));
    end
    // corrupt the CUT's multiplier, which is the operator under check
    wr(20'h00000, 32'h0000_0011);    // clear counters, run
    force dut.u_cut.u_dp.u_mul.y = 16'h0F0F;
    repeat (60) @(posedge clk);
    release dut.u_cut.u_dp.u_mul.y;
    repeat (20) @(posedge clk);
    wr(20'h00000, 32'h0000_0003);
    axi_read(20'h00014, d);
    checks++; if (d < 50) begin failures++; $display("oracle count %0d", d); end
    axi_read(20'h00018, d);
    checks++; if (d < 50) begin failures++; $display("DMR count %0d", d); end
    axi_read(20'h00004, d); expect_eq("sticky flags", d[1:0], 3);
    expect_eq("oracle interrupts set/clear", n_set * 10 + n_clr, 11);
    expect_eq("DMR interrupt", n_dmr, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
