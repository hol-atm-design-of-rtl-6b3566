// sbm_read_priority: the three-read-cycle SBM read scheduler.
//
// Inputs are, per output port, the head-of-line unicast cell (its SBM and the
// port's output-queue length) and the multicast cell chosen for that port by
// the output read priority logic (its SBM and weighted MCI queue length).
//
// Unicast: output ports are ranked by queue length, longest first.  When
// several head cells sit in the same SBM (HOL blocking), the SBM serves them in
// rank order, one per read cycle, so the k-th of them is read in cycle k
// (cycles 0, 1, 2); a fourth or later one waits for the next slot.
// Multicast: read only in the third cycle (index 2) and only from an SBM that
// no unicast read uses in that cycle; among multicast cells in the same SBM
// the longest queue wins.  When a unicast and a multicast cell both reach one
// output port, the one with the longer queue length is sent (a tie goes to the
// unicast cell, this design's choice); the other stays queued.
// The per-SBM view (rd_en/rd_port/rd_mc) tells each SBM whom to serve in each
// read cycle.  Since multicast is read only in the last cycle, rd_mc of the
// first two cycles is constant zero by construction.  Purely combinational.
module sbm_read_priority #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned NSBM  = 8,
  parameter int unsigned KW    = 12,
  parameter int unsigned NRD   = 3,
  localparam int unsigned PW   = $clog2(NPORT),
  localparam int unsigned SW   = $clog2(NSBM)
) (
  input  logic [NPORT-1:0]         uc_valid,
  input  logic [NPORT-1:0][SW-1:0] uc_sbm,
  input  logic [NPORT-1:0][KW-1:0] uc_qlen,
  input  logic [NPORT-1:0]         mc_valid,
  input  logic [NPORT-1:0][SW-1:0] mc_sbm,
  input  logic [NPORT-1:0][KW-1:0] mc_qlen,
  output logic [NPORT-1:0]         uc_read,    // unicast head read in some cycle
  output logic [NPORT-1:0][1:0]    uc_cyc,     // its read cycle
  output logic [NPORT-1:0]         mc_read,    // multicast cell read in the last cycle
  output logic [NPORT-1:0]         mc_blocked, // multicast lost its SBM to a unicast read
  output logic [NPORT-1:0]         send_uc,    // unicast cell leaves through the port
  output logic [NPORT-1:0]         send_mc,    // multicast cell leaves through the port
  output logic [NRD-1:0][NSBM-1:0]         rd_en,
  output logic [NRD-1:0][NSBM-1:0][PW-1:0] rd_port,
  output logic [NRD-1:0][NSBM-1:0]         rd_mc
);
  logic [NPORT-1:0][PW-1:0]   urank, mrank;
  logic [NPORT-1:0][NPORT-1:0] uorder, morder;
  logic [PW-1:0]              ufirst, mfirst;
  logic                       uany, many;
  logic [NSBM-1:0]            uc_last_busy;  // SBM read for unicast in the last cycle

  qlen_ranker #(.N(NPORT), .KW(KW)) u_urank (
    .valid(uc_valid), .key(uc_qlen), .rank(urank), .order(uorder), .first(ufirst), .any(uany));
  qlen_ranker #(.N(NPORT), .KW(KW)) u_mrank (
    .valid(mc_valid), .key(mc_qlen), .rank(mrank), .order(morder), .first(mfirst), .any(many));

  always_comb begin
    int ahead;
    uc_last_busy = '0;
    for (int o = 0; o < NPORT; o++) begin
      ahead = 0;
      for (int q = 0; q < NPORT; q++)
        if (uc_valid[q] && (uc_sbm[q] == uc_sbm[o]) && (urank[q] < urank[o])) ahead++;
      uc_read[o] = uc_valid[o] && (ahead < NRD);
      uc_cyc[o]  = (ahead < NRD) ? 2'(ahead) : 2'(NRD - 1);
      if (uc_read[o] && (ahead == NRD - 1)) uc_last_busy[uc_sbm[o]] = 1'b1;
    end
  end

  always_comb begin
    logic beaten;
    for (int o = 0; o < NPORT; o++) begin
      beaten = 1'b0;
      for (int q = 0; q < NPORT; q++)
        if (mc_valid[q] && (mc_sbm[q] == mc_sbm[o]) && (mrank[q] < mrank[o])) beaten = 1'b1;
      mc_blocked[o] = mc_valid[o] && uc_last_busy[mc_sbm[o]];
      mc_read[o]    = mc_valid[o] && !uc_last_busy[mc_sbm[o]] && !beaten;
    end
  end

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      send_uc[o] = uc_read[o] && (!mc_read[o] || (uc_qlen[o] >= mc_qlen[o]));
      send_mc[o] = mc_read[o] && !send_uc[o];
    end
  end

  always_comb begin
    rd_en   = '0;
    rd_port = '0;
    rd_mc   = '0;
    for (int o = 0; o < NPORT; o++) begin
      if (uc_read[o]) begin
        rd_en  [uc_cyc[o]][uc_sbm[o]] = 1'b1;
        rd_port[uc_cyc[o]][uc_sbm[o]] = PW'(o);
      end
      if (mc_read[o]) begin
        rd_en  [NRD-1][mc_sbm[o]] = 1'b1;
        rd_port[NRD-1][mc_sbm[o]] = PW'(o);
        rd_mc  [NRD-1][mc_sbm[o]] = 1'b1;
      end
    end
  end

  // One cell per SBM per read cycle.
  always_comb begin
    for (int a = 0; a < NPORT; a++)
      for (int b = a + 1; b < NPORT; b++)
        assert (!(uc_read[a] && uc_read[b] && uc_sbm[a] == uc_sbm[b] && uc_cyc[a] == uc_cyc[b]));
  end
endmodule
