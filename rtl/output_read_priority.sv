// output_read_priority: selects, for each output port, the multicast
// connection (MCI) with the longest weighted queue length.
//
// One comparator / carry-save adder / priority decoder chain (qlen_ranker) per
// output port compares the qualified MCIs; the rank-0 MCI is the port's
// multicast candidate for this slot.  Ties go to the lower MCI number.
// Purely combinational.
module output_read_priority #(
  parameter int unsigned NMCI  = 4,
  parameter int unsigned NPORT = 8,
  parameter int unsigned KW    = 12,
  localparam int unsigned MW   = (NMCI > 1) ? $clog2(NMCI) : 1
) (
  input  logic [NPORT-1:0][NMCI-1:0]         qual,
  input  logic [NPORT-1:0][NMCI-1:0][KW-1:0] qlen_w,
  output logic [NPORT-1:0]                   sel_valid,
  output logic [NPORT-1:0][MW-1:0]           sel_mci,
  output logic [NPORT-1:0][KW-1:0]           sel_qlen
);
  for (genvar o = 0; o < NPORT; o++) begin : g_port
    logic [NMCI-1:0][MW-1:0]   rank;
    logic [NMCI-1:0][NMCI-1:0] order;
    qlen_ranker #(.N(NMCI), .KW(KW)) u_rank (
      .valid(qual[o]), .key(qlen_w[o]), .rank(rank), .order(order),
      .first(sel_mci[o]), .any(sel_valid[o]));
    assign sel_qlen[o] = qlen_w[o][sel_mci[o]];
  end
endmodule
