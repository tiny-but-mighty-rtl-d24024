// maple_scratchpad: the storage that all of MAPLE's queues share.
//
// 1 KB by default, as 256 entries of 4 bytes; the queue controller carves
// it into circular FIFOs. One write port (fed by memory responses and by
// data produces) and one synchronous read port (consume pipeline). The read
// data register keeps its value while no read is issued, which lets the
// consume pipeline stall. Size follows the design description; the port
// arrangement and the read timing are this design's choice.
//
// Timing: write on the clock edge with we; read data valid the cycle after re.
module maple_scratchpad
  import maple_pkg::*;
#(
  parameter int unsigned ENTRIES = SP_ENTRIES,
  parameter int unsigned WIDTH   = ENTRY_W,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
