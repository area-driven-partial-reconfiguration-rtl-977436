// tb_op_cadd: checks the constant adder (x + 5 modulo 2^16), including the
// wrap-around at the top of the range, its one-cycle latency and hold.
module tb_op_cadd;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] a = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  op_cadd #(.W(16), .COEF(5)) dut (.clk, .rst_n, .en, .a, .y);
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
      a = (i < 6) ? 16'(16'hFFFF - i) : 16'($urandom);
      en = (i % 5 != 2);
      prev = y;
      @(posedge clk); #1;
      checks++;
      if (en ? (y !== 16'((32'(a) + 5) % 65536)) : (y !== prev)) begin
        failures++; $display("a=%h en=%b y=%h", a, en, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
