// mc_dest_reg: multicast destination port registers.
//
// One NPORT-bit register per multicast connection identifier (MCI); bit p set
// means port p is a destination of that connection.  Written by the host, one
// MCI per clock (we, wmci, wports); cleared by reset.  Read in parallel by the
// queue-length calculator and the read pointers.
module mc_dest_reg #(
  parameter int unsigned NMCI  = 4,
  parameter int unsigned NPORT = 8,
  localparam int unsigned MW   = (NMCI > 1) ? $clog2(NMCI) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [MW-1:0]              wmci,
  input  logic [NPORT-1:0]           wports,
  output logic [NMCI-1:0][NPORT-1:0] dest
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dest <= '0;
    else if (we) dest[wmci] <= wports;
  end
endmodule
