// mc_pointers: multicast write pointers and per-output multicast read pointers.
//
// Every MCI has a multicast queue in external memory.  Its write pointer
// advances when a cell of that MCI arrives (wr_inc).  Because each destination
// port reads a multicast cell separately, there is one read pointer per MCI
// and per output port (rp[m][o]); rd_inc[o] advances rp[rd_mci[o]][o].
// Pointers carry a wrap bit, so wp - rp is a queue length.
//
// A multicast cell is stored once, so its SBM space may be freed only when its
// last destination has read it.  release[o] (combinational, valid together
// with rd_inc[o]) says that the cell read for port o is the last copy: every
// other destination of the MCI, counting this cycle's reads, has already moved
// past it.  full[m] is set when some destination's queue has fewer than NPORT
// free entries, so that a whole slot of arrivals always fits.
// Writing the destination register of an MCI (dest_we) empties all its read
// pointers to its write pointer.  The release rule and the reset on dest_we are
// this design's choices; the pointer organisation follows the published chip.
module mc_pointers #(
  parameter int unsigned NMCI  = 4,
  parameter int unsigned NPORT = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned MW   = (NMCI > 1) ? $clog2(NMCI) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NMCI-1:0][NPORT-1:0]     dest,
  input  logic                           dest_we,
  input  logic [MW-1:0]                  dest_mci,
  input  logic [NMCI-1:0]                wr_inc,
  input  logic [NPORT-1:0]               rd_inc,
  input  logic [NPORT-1:0][MW-1:0]       rd_mci,
  output logic [NMCI-1:0][AW:0]          wp,
  output logic [NMCI-1:0][NPORT-1:0][AW:0] rp,
  output logic [NPORT-1:0]               release_addr,
  output logic [NMCI-1:0]                full
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      for (int m = 0; m < NMCI; m++)
        if (wr_inc[m]) wp[m] <= wp[m] + 1'b1;
      for (int o = 0; o < NPORT; o++)
        if (rd_inc[o]) rp[rd_mci[o]][o] <= rp[rd_mci[o]][o] + 1'b1;
      if (dest_we)
        for (int o = 0; o < NPORT; o++) rp[dest_mci][o] <= wp[dest_mci];
    end
  end

  always_comb begin
    logic [AW:0] mine, other;
    logic        last;
    for (int o = 0; o < NPORT; o++) begin
      mine = wp[rd_mci[o]] - rp[rd_mci[o]][o];      // cells left for o, this one included
      last = 1'b1;
      for (int q = 0; q < NPORT; q++) begin
        other = wp[rd_mci[o]] - rp[rd_mci[o]][q];
        // two ports reading the same cell in one cycle: the higher port frees it
        if (rd_inc[q] && (rd_mci[q] == rd_mci[o]) && (other == mine) && (q > o)) last = 1'b0;
        if (rd_inc[q] && (rd_mci[q] == rd_mci[o])) other = other - 1'b1;
        if ((q != o) && dest[rd_mci[o]][q] && (other >= mine)) last = 1'b0;
      end
      release_addr[o] = rd_inc[o] && last;
    end
  end

  always_comb begin
    for (int m = 0; m < NMCI; m++) begin
      full[m] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (dest[m][o] && ((wp[m] - rp[m][o]) > (AW+1)'(DEPTH - NPORT))) full[m] = 1'b1;
    end
  end
endmodule
