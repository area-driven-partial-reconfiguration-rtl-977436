// bram_sdp: simple dual-port block RAM, one write port and one read port.
//
// Written on a clock edge when `we` is high; read synchronously: `rdata`
// shows mem[raddr] one cycle after a cycle with `re` high and holds its
// value otherwise, as a block RAM with output enable does. Reading an address
// in the cycle it is written returns the old word. Used for the input,
// CUT-output and Gold-output memories of the test harness. The memory is not
// cleared by reset, as a block RAM is not; the depth is this design's choice.
module bram_sdp #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
