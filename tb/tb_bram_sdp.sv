// tb_bram_sdp: fills the RAM with random words, reads them back in random
// order with the one-cycle read latency, and checks hold when re is low and
// read-before-write on an address collision.
module tb_bram_sdp;
  localparam int DEPTH = 256;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bram_sdp #(.W(16), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      logic [15:0] prev;
      @(negedge clk);
      re = (i % 4 != 1); raddr = 8'($urandom);
      prev = rdata;
      // a write to the same address in the same cycle must not be seen
      we = (i % 8 == 0); waddr = raddr; wdata = ~model[raddr];
      @(posedge clk); #1;
      checks++;
      if (re ? (rdata !== model[raddr]) : (rdata !== prev)) begin
        failures++; $display("addr=%0d re=%b rdata=%h exp=%h", raddr, re, rdata, model[raddr]);
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
