// sbm_sram: one shared buffer memory (SBM), 8 kbit as 512 words of 16 bits.
//
// Holds the 53-bit slices of 128 cells, four words per cell; word address is
// {cell address, word index}.  The SBM is an asynchronous SRAM: the read data
// follows the address without a clock.  Writes are taken on the rising clock
// edge while we is high.  The published part has one common 16-bit data bus;
// here the write and read data are separate ports, which is this design's
// choice for an on-chip model.
module sbm_sram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 16,
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
