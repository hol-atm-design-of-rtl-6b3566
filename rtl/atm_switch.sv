// atm_switch: 8x8 shared multi-buffer ATM switch with separate multicast queues.
//
// Top level of the chip set: NCHIP bit-sliced switch chips (chip b carries bit
// b of every port's byte stream), one multicast-pointer chip, one external
// output-queue memory per port and one external multicast-queue memory per
// multicast connection (MCI).  All switch chips receive the same routing tags
// and queue data and make the same decisions; chip 0 drives the queue memories
// and the multicast-pointer chip.
//
// Interface.  slot_sync is high on the first clock of every 53-clock cell slot.
// A cell enters port p as 53 bytes on in_byte[p], one per clock from slot_sync
// on, with its routing tag in_tag[p] (valid, multicast flag, output port or
// MCI) on the slot_sync clock.  Cells leave on out_byte[p] in the same format,
// out_valid[p] high for the whole slot.  dest_we/dest_mci/dest_ports write the
// destination ports of an MCI (this also empties that MCI's queue);
// mc_weight[m] shifts MCI m's queue length left before comparison.  ev is a
// per-slot report (lost cells, cells sent, HOL waits, multicast reads denied,
// unicast/multicast contention, multicast releases), valid with ev_valid.
// An unblocked cell's first byte leaves three slots (159 clocks) after its
// first byte entered.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned NCHIP = 8,
  localparam int unsigned OQ_AW = $clog2(OQ_DEPTH),
  localparam int unsigned MQ_AW = $clog2(MQ_DEPTH),
  localparam int unsigned MW    = (NMCI > 1) ? $clog2(NMCI) : 1,
  localparam int unsigned QE_W  = $bits(qentry_t)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic                          slot_sync,
  input  logic [NPORT-1:0][NCHIP-1:0]   in_byte,
  input  tag_t [NPORT-1:0]              in_tag,
  output logic [NPORT-1:0][NCHIP-1:0]   out_byte,
  output logic [NPORT-1:0]              out_valid,
  input  logic                          dest_we,
  input  logic [MW-1:0]                 dest_mci,
  input  logic [NPORT-1:0]              dest_ports,
  input  logic [NMCI-1:0][1:0]          mc_weight,
  output events_t                       ev,
  output logic                          ev_valid
);
  // shared buses between the chips and the queue memories
  logic [NPORT-1:0][OQ_AW-1:0] oq_addr;
  logic [NPORT-1:0]            oq_we;
  logic [NPORT-1:0][QE_W-1:0]  oq_wdata, oq_rdata;
  logic [NMCI-1:0][MQ_AW-1:0]  mq_addr;
  logic [NMCI-1:0]             mq_we;
  logic [NMCI-1:0][QE_W-1:0]   mq_wdata, mq_rdata;
  logic [NMCI-1:0]             mc_wr_inc, mc_full;
  logic [NMCI-1:0][MQ_AW-1:0]  mc_waddr;
  logic [NPORT-1:0]            mc_sel_valid, mc_rd_inc, mc_release;
  logic [NPORT-1:0][MW-1:0]    mc_sel_mci, mc_rd_mci;
  logic [NPORT-1:0][MQ_AW-1:0] mc_sel_raddr;
  logic [NPORT-1:0][QL_W-1:0]  mc_sel_qlen;

  logic [NCHIP-1:0]            c_sync, c_ev_valid;
  logic [NCHIP-1:0][NPORT-1:0] c_in, c_out, c_out_valid;
  events_t [NCHIP-1:0]         c_ev;

  for (genvar b = 0; b < NCHIP; b++) begin : g_chip
    // per-chip copies of the outputs that only chip 0 drives onto the buses
    logic [NPORT-1:0][OQ_AW-1:0] x_oq_addr;
    logic [NPORT-1:0]            x_oq_we;
    logic [NPORT-1:0][QE_W-1:0]  x_oq_wdata;
    logic [NMCI-1:0][MQ_AW-1:0]  x_mq_addr;
    logic [NMCI-1:0]             x_mq_we, x_mc_wr_inc;
    logic [NMCI-1:0][QE_W-1:0]   x_mq_wdata;
    logic [NPORT-1:0]            x_mc_rd_inc;
    logic [NPORT-1:0][MW-1:0]    x_mc_rd_mci;

    for (genvar p = 0; p < NPORT; p++) begin : g_slice
      assign c_in[b][p]     = in_byte[p][b];
      assign out_byte[p][b] = c_out[b][p];
    end

    switch_chip u_chip (
      .clk, .rst_n, .slot_sync(c_sync[b]),
      .in_bit(c_in[b]), .in_tag, .out_bit(c_out[b]), .out_valid(c_out_valid[b]),
      .oq_addr(x_oq_addr), .oq_we(x_oq_we), .oq_wdata(x_oq_wdata), .oq_rdata,
      .mq_addr(x_mq_addr), .mq_we(x_mq_we), .mq_wdata(x_mq_wdata), .mq_rdata,
      .mc_wr_inc(x_mc_wr_inc), .mc_waddr, .mc_full,
      .mc_sel_valid, .mc_sel_mci, .mc_sel_raddr, .mc_sel_qlen,
      .mc_rd_inc(x_mc_rd_inc), .mc_rd_mci(x_mc_rd_mci), .mc_release,
      .ev(c_ev[b]), .ev_valid(c_ev_valid[b]));

    if (b == 0) begin : g_master
      assign oq_addr   = x_oq_addr;
      assign oq_we     = x_oq_we;
      assign oq_wdata  = x_oq_wdata;
      assign mq_addr   = x_mq_addr;
      assign mq_we     = x_mq_we;
      assign mq_wdata  = x_mq_wdata;
      assign mc_wr_inc = x_mc_wr_inc;
      assign mc_rd_inc = x_mc_rd_inc;
      assign mc_rd_mci = x_mc_rd_mci;
    end
  end

  assign slot_sync = c_sync[0];
  assign out_valid = c_out_valid[0];
  assign ev        = c_ev[0];
  assign ev_valid  = c_ev_valid[0];

  for (genvar p = 0; p < NPORT; p++) begin : g_outq
    ext_queue_mem #(.DEPTH(OQ_DEPTH), .W(QE_W)) u_oq (
      .clk, .we(oq_we[p]), .addr(oq_addr[p]), .wdata(oq_wdata[p]), .rdata(oq_rdata[p]));
  end
  for (genvar m = 0; m < NMCI; m++) begin : g_mq
    ext_queue_mem #(.DEPTH(MQ_DEPTH), .W(QE_W)) u_mq (
      .clk, .we(mq_we[m]), .addr(mq_addr[m]), .wdata(mq_wdata[m]), .rdata(mq_rdata[m]));
  end

  mcptr_chip u_mcptr (
    .clk, .rst_n, .dest_we, .dest_mci, .dest_ports, .weight(mc_weight),
    .wr_inc(mc_wr_inc), .rd_inc(mc_rd_inc), .rd_mci(mc_rd_mci),
    .mq_waddr(mc_waddr), .full(mc_full),
    .sel_valid(mc_sel_valid), .sel_mci(mc_sel_mci), .sel_raddr(mc_sel_raddr),
    .sel_qlen(mc_sel_qlen), .release_addr(mc_release));

  // All slices run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) c_out_valid == {NCHIP{c_out_valid[0]}});
endmodule
