// tb_tmr_voter: checks the bitwise majority and the mismatch flag on random
// triples, including triples where one or two copies are corrupted.
module tb_tmr_voter;
  logic [11:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  tmr_voter #(.W(12)) dut (.a, .b, .c, .y, .mismatch);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [11:0] v, e;
      v = 12'($urandom);
      a = v; b = v; c = v;
      // corrupt one copy (masked), or occasionally scramble all three
      case (i % 5)
        0: a = 12'($urandom);
        1: b = 12'($urandom);
        2: c = 12'($urandom);
        3: ;
        default: begin a = 12'($urandom); b = 12'($urandom); c = 12'($urandom); end
      endcase
      @(posedge clk); #1;
      for (int k = 0; k < 12; k++) e[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== e) begin failures++; $display("a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, e); end
      if (i % 5 < 3) begin
        checks++;
        if (y !== v) begin failures++; $display("single corrupted copy not masked"); end
      end
      checks++;
      if (mismatch !== !(a == b && b == c)) begin failures++; $display("mismatch flag wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
