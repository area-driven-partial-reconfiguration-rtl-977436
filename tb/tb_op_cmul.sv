// tb_op_cmul: checks the constant multiplier (x * 3 modulo 2^16) against a
// reference computed in the testbench, its one-cycle latency, hold while
// disabled, and reset.
module tb_op_cmul;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] a = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  op_cmul #(.W(16), .COEF(3)) dut (.clk, .rst_n, .en, .a, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] prev;
    repeat (2) @(posedge clk);
    #1 checks++; if (y !== 16'd0) begin failures++; $display("reset fail"); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a = (i < 4) ? 16'(i * 21845) : 16'($urandom);
      en = (i % 7 != 3);
      prev = y;
      @(posedge clk); #1;
      checks++;
      if (en ? (y !== 16'((32'(a) * 3) & 32'hFFFF)) : (y !== prev)) begin
        failures++; $display("a=%h en=%b y=%h", a, en, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
