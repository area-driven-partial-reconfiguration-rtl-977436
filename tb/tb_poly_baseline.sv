// tb_poly_baseline: streams inputs through the polynomial pipeline and
// checks every result against F(x) = 3x^2 + 5x + 5 modulo 2^16, computed
// directly (not in Horner form), with a latency of exactly four enabled
// cycles, also across random stalls.
module tb_poly_baseline;
  import seu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t x = '0, y;
  poly_taps_t taps;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  poly_baseline dut (.clk, .rst_n, .en, .x, .y, .taps);

  function automatic word_t f_ref(word_t v);
    longint unsigned t;
    t = 3 * longint'(v) * longint'(v) + 5 * longint'(v) + 5;
    return word_t'(t % 65536);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t hist [$];
    int    n_en;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    n_en = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = (i < 200) ? 1'b1 : ($urandom % 4 != 0);
      x  = (i < 3) ? word_t'(i) : word_t'($urandom);
      if (en) hist.push_back(x);
      @(posedge clk); #1;
      if (en) begin
        n_en++;
        if (n_en > POLY_LATENCY) begin
          // the value entered POLY_LATENCY enabled cycles ago is now out
          checks++;
          if (y !== f_ref(hist[hist.size() - POLY_LATENCY])) begin
            failures++;
            $display("n=%0d y=%h exp=%h", n_en, y, f_ref(hist[hist.size() - POLY_LATENCY]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
