// tb_rp_checker: loads each of the four operator configurations into the
// checker partition and checks the registered result against the
// operator's function computed in the testbench.
module tb_rp_checker;
  import seu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  op_e cfg = OP_CMUL;
  word_t a = '0, b = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rp_checker dut (.clk, .rst_n, .en, .cfg, .a, .b, .y);

  function automatic word_t op_ref(op_e k, word_t p, word_t q);
    unique case (k)
      OP_CMUL: return word_t'(32'(p) * 3);
      OP_ADD1: return word_t'(32'(p) + 5);
      OP_MUL:  return word_t'(32'(p) * 32'(q));
      default: return word_t'(32'(p) + 5);
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_OPS; k++) begin
      cfg = op_e'(k);
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        a = word_t'($urandom); b = word_t'($urandom);
        @(posedge clk); #1;
        checks++;
        if (y !== op_ref(cfg, a, b)) begin
          failures++; $display("cfg=%0d a=%h b=%h y=%h", k, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
