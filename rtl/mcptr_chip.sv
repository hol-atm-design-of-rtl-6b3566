// mcptr_chip: the multicast-pointer chip.
//
// Holds the multicast destination registers, the multicast write pointers and
// the per-output multicast read pointers, computes each MCI's (weighted) queue
// length for each output port and picks, per output port, the MCI with the
// longest queue (output read priority).  Towards the switch chips it offers:
//   mq_waddr[m]          write address of MCI m's multicast queue,
//   full[m]              MCI m's multicast queue cannot take another cell,
//   sel_valid/mci/raddr/qlen[o]  the multicast cell chosen for port o: its MCI,
//                        the multicast-queue address holding it, its weight,
//   release_addr[o]      with rd_inc[o]: the cell read for o was its last copy.
// It takes wr_inc[m] (a cell of MCI m was stored) and rd_inc[o]/rd_mci[o] (a
// multicast cell was sent through port o).  All outputs are combinational
// from the pointer registers, which change on the rising clock edge.
module mcptr_chip
  import atm_pkg::*;
#(
  parameter int unsigned NM    = NMCI,
  parameter int unsigned NP    = NPORT,
  parameter int unsigned DEPTH = MQ_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned MW   = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host access to the destination registers and weights
  input  logic                       dest_we,
  input  logic [MW-1:0]              dest_mci,
  input  logic [NP-1:0]              dest_ports,
  input  logic [NM-1:0][1:0]         weight,
  // from the switch chip
  input  logic [NM-1:0]              wr_inc,
  input  logic [NP-1:0]              rd_inc,
  input  logic [NP-1:0][MW-1:0]      rd_mci,
  // to the switch chip
  output logic [NM-1:0][AW-1:0]      mq_waddr,
  output logic [NM-1:0]              full,
  output logic [NP-1:0]              sel_valid,
  output logic [NP-1:0][MW-1:0]      sel_mci,
  output logic [NP-1:0][AW-1:0]      sel_raddr,
  output logic [NP-1:0][QL_W-1:0]    sel_qlen,
  output logic [NP-1:0]              release_addr
);
  logic [NM-1:0][NP-1:0]          dest;
  logic [NM-1:0][AW:0]            wp;
  logic [NM-1:0][NP-1:0][AW:0]    rp;
  logic [NP-1:0][NM-1:0]          qual;
  logic [NP-1:0][NM-1:0][QL_W-1:0] qlen_w;

  mc_dest_reg #(.NMCI(NM), .NPORT(NP)) u_dest (
    .clk, .rst_n, .we(dest_we), .wmci(dest_mci), .wports(dest_ports), .dest(dest));

  mc_pointers #(.NMCI(NM), .NPORT(NP), .DEPTH(DEPTH)) u_ptr (
    .clk, .rst_n, .dest, .dest_we, .dest_mci, .wr_inc, .rd_inc, .rd_mci,
    .wp, .rp, .release_addr, .full);

  mc_qlen_calc #(.NMCI(NM), .NPORT(NP), .DEPTH(DEPTH), .KW(QL_W)) u_qlen (
    .wp, .rp, .dest, .weight, .qual, .qlen_w);

  output_read_priority #(.NMCI(NM), .NPORT(NP), .KW(QL_W)) u_orp (
    .qual, .qlen_w, .sel_valid, .sel_mci, .sel_qlen);

  always_comb begin
    for (int m = 0; m < NM; m++) mq_waddr[m] = wp[m][AW-1:0];
    for (int o = 0; o < NP; o++) sel_raddr[o] = rp[sel_mci[o]][o][AW-1:0];
  end
endmodule
