// tb_op_mul: checks the two-input multiplier (low 16 bits of a * b) on
// corner and random operands, its one-cycle latency and hold.
module tb_op_mul;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  op_mul #(.W(16)) dut (.clk, .rst_n, .en, .a, .b, .y);
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] prev;
    longint unsigned ref_p;
    repeat (2) @(posedge clk);
    #1 checks++; if (y !== 16'd0) begin failures++; $display("reset fail"); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a = (i == 0) ? 16'hFFFF : 16'($urandom);
      b = (i == 0) ? 16'hFFFF : (i == 1) ? 16'd0 : 16'($urandom);
      en = (i % 9 != 4);
      prev = y;
      @(posedge clk); #1;
      ref_p = longint'(a) * longint'(b);
      checks++;
      if (en ? (y !== 16'(ref_p % 65536)) : (y !== prev)) begin
        failures++; $display("a=%h b=%h en=%b y=%h", a, b, en, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
