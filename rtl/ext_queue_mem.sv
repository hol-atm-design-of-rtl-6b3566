// ext_queue_mem: an external queue memory (one output queue or one multicast
// queue of the chip set).
//
// Each entry is an {SBM number, cell address} pair telling where a cell waits.
// Like the SBMs it is an asynchronous SRAM with one address port: the read data
// follows the address, a write is taken on the rising clock edge when we is
// high.  The queue I/O controller of the switch chip supplies the address
// from its write or read pointer so that the memory acts as a FIFO.
module ext_queue_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 10,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
