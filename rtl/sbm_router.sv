// sbm_router: SBM input router and SBM output router.
//
// Input side: every SBM takes the word of the input port that the write
// priority logic assigned to it.  Output side: there are two crossbars, one
// carrying to each output port the word of the SBM holding its unicast cell
// and one carrying the word of the SBM holding its multicast cell, because in
// the last read cycle a port may receive one of each.  All three are plain
// multiplexer crossbars set by the switch chip's control; combinational.
module sbm_router #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned NSBM  = 8,
  parameter int unsigned W     = 16,
  localparam int unsigned PW   = $clog2(NPORT),
  localparam int unsigned SW   = $clog2(NSBM)
) (
  input  logic [NPORT-1:0][W-1:0] in_word,      // word from each input cell buffer
  input  logic [NSBM-1:0][PW-1:0] port_of_sbm,  // input port routed to each SBM
  output logic [NSBM-1:0][W-1:0]  sbm_wdata,
  input  logic [NSBM-1:0][W-1:0]  sbm_rdata,
  input  logic [NPORT-1:0][SW-1:0] uc_sbm,     // SBM of each port's unicast cell
  input  logic [NPORT-1:0][SW-1:0] mc_sbm,     // SBM of each port's multicast cell
  output logic [NPORT-1:0][W-1:0] uc_word,
  output logic [NPORT-1:0][W-1:0] mc_word
);
  always_comb begin
    for (int s = 0; s < NSBM; s++) sbm_wdata[s] = in_word[port_of_sbm[s]];
    for (int p = 0; p < NPORT; p++) begin
      uc_word[p] = sbm_rdata[uc_sbm[p]];
      mc_word[p] = sbm_rdata[mc_sbm[p]];
    end
  end
endmodule
