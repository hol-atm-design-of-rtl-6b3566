// outq_ctrl: output-queue write/read pointers and unicast queue-length calculator.
//
// One write and one read pointer per output port address that port's external
// output queue so it behaves as a FIFO.  Pointers carry one extra wrap bit, so
// the queue length is simply wp - rp (0..DEPTH).  wr_inc / rd_inc advance a
// pointer on the rising edge.  The queue length feeds the SBM read priority.
// full is raised once fewer than NPORT entries are free, so that a whole slot
// of arrivals always fits.
module outq_ctrl #(
  parameter int unsigned NPORT = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPORT-1:0]       wr_inc,
  input  logic [NPORT-1:0]       rd_inc,
  output logic [NPORT-1:0][AW-1:0] waddr,
  output logic [NPORT-1:0][AW-1:0] raddr,
  output logic [NPORT-1:0][AW:0]   qlen,
  output logic [NPORT-1:0]       full
);
  logic [NPORT-1:0][AW:0] wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        if (wr_inc[p]) wp[p] <= wp[p] + 1'b1;
        if (rd_inc[p]) rp[p] <= rp[p] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      waddr[p] = wp[p][AW-1:0];
      raddr[p] = rp[p][AW-1:0];
      qlen[p]  = wp[p] - rp[p];
      full[p]  = (qlen[p] > (AW+1)'(DEPTH - NPORT));
    end
  end

  logic [NPORT-1:0] empty;
  always_comb for (int p = 0; p < NPORT; p++) empty[p] = (qlen[p] == '0);

  // Never read an empty queue or write past the queue depth.
  assert property (@(posedge clk) disable iff (!rst_n) (rd_inc & empty) == '0);
  logic [NPORT-1:0] at_depth;
  always_comb for (int p = 0; p < NPORT; p++) at_depth[p] = (qlen[p] == (AW+1)'(DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) (wr_inc & at_depth) == '0);
endmodule
