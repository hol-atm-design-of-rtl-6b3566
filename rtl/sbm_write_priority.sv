// sbm_write_priority: assigns the cells arriving in a slot to SBMs.
//
// The SBMs are ranked by their number of vacant cell spaces, the emptiest first
// (qlen_ranker; SBMs with no space are left out).  The k-th requesting input
// port, counted in port order, is given the SBM of rank k, so every SBM takes
// at most one cell per slot.  An input whose rank has no SBM left is refused
// (the cell is lost).  Ranking by vacant space follows the published design;
// the port-order matching and the tie rule are this design's own.  Purely
// combinational.
module sbm_write_priority #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned NSBM  = 8,
  parameter int unsigned CW    = 8,
  localparam int unsigned PW   = $clog2(NPORT),
  localparam int unsigned SW   = $clog2(NSBM)
) (
  input  logic [NPORT-1:0]         req,          // input port has a cell to store
  input  logic [NSBM-1:0][CW-1:0]  vacant,       // free cell spaces per SBM
  output logic [NPORT-1:0]         grant,
  output logic [NPORT-1:0][SW-1:0] sbm_of_port,  // SBM given to each granted port
  output logic [NSBM-1:0]          sbm_we,       // SBM receives a cell
  output logic [NSBM-1:0][PW-1:0]  port_of_sbm   // input port feeding each SBM
);
  logic [NSBM-1:0]          has_space;
  logic [NSBM-1:0][SW-1:0]  rank;
  logic [NSBM-1:0][NSBM-1:0] order;
  logic [SW-1:0]            first_unused;
  logic                     any_unused;

  always_comb
    for (int s = 0; s < NSBM; s++) has_space[s] = (vacant[s] != '0);

  qlen_ranker #(.N(NSBM), .KW(CW)) u_rank (
    .valid(has_space), .key(vacant), .rank(rank), .order(order),
    .first(first_unused), .any(any_unused)
  );

  always_comb begin
    int k;
    k           = 0;
    grant       = '0;
    sbm_of_port = '0;
    sbm_we      = '0;
    port_of_sbm = '0;
    for (int p = 0; p < NPORT; p++) begin
      if (req[p] && (k < NSBM)) begin
        for (int s = 0; s < NSBM; s++) begin
          if (order[k][s]) begin
            grant[p]       = 1'b1;
            sbm_of_port[p] = SW'(s);
            sbm_we[s]      = 1'b1;
            port_of_sbm[s] = PW'(p);
          end
        end
        k++;
      end
    end
  end
endmodule
