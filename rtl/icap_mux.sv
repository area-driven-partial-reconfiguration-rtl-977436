// icap_mux: shares the single ICAP port between the SEM core (which injects
// configuration bit flips) and the HWICAP (which writes scrub and
// partial-reconfiguration bitstreams).
//
// `sel_req` names the master that should own the port (0 SEM core,
// 1 HWICAP). Ownership changes only while the current owner has its chip
// select inactive (CSIB high), so a transfer in progress is never cut in
// half; the new owner's signals reach the ICAP from the cycle after the
// switch. The master that does not own the port sees its requests dropped
// and reads zero. `owner` reports the current owner. Signals follow the ICAP
// primitive: active-low chip select CSIB, RDWRB (1 read, 0 write), 32-bit
// data in and out.
//
// Sharing the ICAP through a multiplexer follows the published framework;
// the switch-when-idle rule and the select input are this design's choices.
module icap_mux (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel_req,
  output logic        owner,
  // SEM core side
  input  logic        sem_csib,
  input  logic        sem_rdwrb,
  input  logic [31:0] sem_i,
  output logic [31:0] sem_o,
  // HWICAP side
  input  logic        hw_csib,
  input  logic        hw_rdwrb,
  input  logic [31:0] hw_i,
  output logic [31:0] hw_o,
  // ICAP primitive side
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic [31:0] icap_o
);
  logic owner_csib;
  assign owner_csib = owner ? hw_csib : sem_csib;

  always_ff @(posedge clk) begin
    if (!rst_n)          owner <= 1'b0;
    else if (owner_csib) owner <= sel_req;
  end

  assign icap_csib  = owner_csib;
  assign icap_rdwrb = owner ? hw_rdwrb : sem_rdwrb;
  assign icap_i     = owner ? hw_i     : sem_i;
  assign sem_o      = owner ? 32'd0    : icap_o;
  assign hw_o       = owner ? icap_o   : 32'd0;

  a_no_switch_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !owner_csib |=> owner == $past(owner));
endmodule
