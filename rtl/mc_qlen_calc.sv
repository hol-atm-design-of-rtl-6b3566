// mc_qlen_calc: multicast queue-length calculator.
//
// For every output port o and MCI m the queue length is wp[m] - rp[m][o].
// Only MCIs that have o among their destinations and a non-empty queue are
// qualified for o.  The length may be weighted by an external control input;
// here the weight is a left shift by weight[m] (0..3), which is this design's
// reading of "weighted".  Purely combinational.
module mc_qlen_calc #(
  parameter int unsigned NMCI  = 4,
  parameter int unsigned NPORT = 8,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned KW    = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [NMCI-1:0][AW:0]            wp,
  input  logic [NMCI-1:0][NPORT-1:0][AW:0] rp,
  input  logic [NMCI-1:0][NPORT-1:0]       dest,
  input  logic [NMCI-1:0][1:0]             weight,
  output logic [NPORT-1:0][NMCI-1:0]       qual,
  output logic [NPORT-1:0][NMCI-1:0][KW-1:0] qlen_w
);
  always_comb begin
    logic [AW:0] ql;
    for (int o = 0; o < NPORT; o++)
      for (int m = 0; m < NMCI; m++) begin
        ql           = wp[m] - rp[m][o];
        qual[o][m]   = dest[m][o] && (ql != '0);
        qlen_w[o][m] = KW'(ql) << weight[m];
      end
  end
endmodule
