// tb_icap_mux: checks that the ICAP follows the owning master, that the
// other master is cut off, and that a change of owner waits until the
// current owner's transfer (chip select low) has ended.
module tb_icap_mux;
  logic clk = 1'b0, rst_n = 1'b0, sel_req = 1'b0, owner;
  logic sem_csib = 1'b1, sem_rdwrb = 1'b0, hw_csib = 1'b1, hw_rdwrb = 1'b0;
  logic [31:0] sem_i = '0, hw_i = '0, sem_o, hw_o, icap_i, icap_o = 32'h0;
  logic icap_csib, icap_rdwrb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  icap_mux dut (.*);

  task automatic chk(input bit exp_owner);
    checks++;
    if (owner !== exp_owner) begin failures++; $display("owner=%b exp=%b", owner, exp_owner); end
    checks++;
    if (exp_owner ? (icap_csib !== hw_csib || icap_i !== hw_i || icap_rdwrb !== hw_rdwrb ||
                     hw_o !== icap_o || sem_o !== 32'd0)
                  : (icap_csib !== sem_csib || icap_i !== sem_i || icap_rdwrb !== sem_rdwrb ||
                     sem_o !== icap_o || hw_o !== 32'd0)) begin
      failures++; $display("routing wrong for owner %b", exp_owner);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // SEM owns the port and writes
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      sem_csib = (i % 3 == 0); sem_i = $urandom; hw_i = $urandom; hw_csib = 1'b0;
      icap_o = $urandom; sem_rdwrb = i[0];
      #1 chk(1'b0);
    end
    // SEM transfer in progress: a request for HWICAP must wait
    @(negedge clk); sem_csib = 1'b0; sel_req = 1'b1;
    repeat (5) begin @(negedge clk); #1 chk(1'b0); end
    @(negedge clk); sem_csib = 1'b1;       // transfer ends
    @(negedge clk); #1 chk(1'b1);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      hw_csib = (i % 4 == 0); hw_i = $urandom; sem_i = $urandom; sem_csib = 1'b0;
      icap_o = $urandom; hw_rdwrb = i[1];
      #1 chk(1'b1);
    end
    // back to SEM while HWICAP is busy: waits for HWICAP's chip select high
    @(negedge clk); hw_csib = 1'b0; sel_req = 1'b0;
    repeat (3) begin @(negedge clk); #1 chk(1'b1); end
    @(negedge clk); hw_csib = 1'b1;
    @(negedge clk); #1 chk(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
