// switch_chip: one bit slice of the shared multi-buffer ATM switch.
//
// Eight of these chips, each carrying one bit of every port's byte stream,
// form the 8x8 switch; they all compute the same control decisions, so every
// chip's SBMs hold the same cells at the same addresses.  A chip contains the
// eight SBMs with their idle address queues, the SBM input/output routers, the
// serial-to-parallel converters, the SBM write and read priority logic, the
// output-queue pointers with the unicast queue-length calculator, and the I/O
// control of the external output queues (one per port) and multicast queues
// (one per MCI).  Multicast pointers and the per-port MCI choice come from the
// multicast-pointer chip.
//
// Timing.  A cell slot is SLOT clocks (53, one byte of the cell per clock).
// slot_sync is high on clock t = 0 of a slot.  On port p a cell's bit slice
// arrives on in_bit[p] at t = 0..52 and its routing tag in_tag[p] at t = 0.
// Every slot runs this fixed schedule.  As in the published chip, accesses to
// the output and multicast queues overlap the SBM accesses: queue reads run
// while the SBMs are written, queue writes while the SBMs are read.  The clock
// counts are this design's own.
//   t = 1       SBM write priority: the cells that arrived in the previous
//               slot are given SBMs and free addresses (idle queue pop);
//               lost cells are flagged
//   t = 2..5    the four words of each cell are written into its SBM
//   t = 2       in parallel: every output queue's head entry and length are
//               read; the multicast-pointer chip's per-port MCI choice is latched
//   t = 3..10   one port per clock: the chosen multicast-queue entry is read
//   t = 11      three-read-cycle schedule is latched (sbm_read_priority)
//   t = 12..23  three SBM read cycles of four words each
//   t = 12..19  in parallel, one input per clock: {SBM, address} of each cell
//               stored at t = 2..5 is written into its port's output queue
//               (unicast) or its MCI's multicast queue
//   t = 24      per port the cell to send is chosen; pointers advance
//   t = 25..32  one port per clock: freed addresses go back to idle queues
// A cell stored in a slot is queued at the end of it and can be read from the
// next slot on.  The chosen cell leaves on out_bit[p] during the slot after
// it was read (t = bit index), with out_valid[p] high for the whole slot.  An
// unblocked cell therefore starts to leave three slots (159 clocks) after it
// started to arrive.  ev/ev_valid report the slot's events (ev_valid at t = 24).
// Only one chip's queue-write and pointer-increment outputs need be connected;
// the copies in the other chips carry the same values.
module switch_chip
  import atm_pkg::*;
#(
  parameter int unsigned SLOT = CELL_BYTES,
  localparam int unsigned OQ_AW = $clog2(OQ_DEPTH),
  localparam int unsigned MQ_AW = $clog2(MQ_DEPTH),
  localparam int unsigned MW    = (NMCI > 1) ? $clog2(NMCI) : 1,
  localparam int unsigned QE_W  = $bits(qentry_t)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic                          slot_sync,
  // cell input and output, one bit slice per port
  input  logic [NPORT-1:0]              in_bit,
  input  tag_t [NPORT-1:0]              in_tag,
  output logic [NPORT-1:0]              out_bit,
  output logic [NPORT-1:0]              out_valid,
  // external output queues
  output logic [NPORT-1:0][OQ_AW-1:0]   oq_addr,
  output logic [NPORT-1:0]              oq_we,
  output logic [NPORT-1:0][QE_W-1:0]    oq_wdata,
  input  logic [NPORT-1:0][QE_W-1:0]    oq_rdata,
  // external multicast queues
  output logic [NMCI-1:0][MQ_AW-1:0]    mq_addr,
  output logic [NMCI-1:0]               mq_we,
  output logic [NMCI-1:0][QE_W-1:0]     mq_wdata,
  input  logic [NMCI-1:0][QE_W-1:0]     mq_rdata,
  // multicast-pointer chip
  output logic [NMCI-1:0]               mc_wr_inc,
  input  logic [NMCI-1:0][MQ_AW-1:0]    mc_waddr,
  input  logic [NMCI-1:0]               mc_full,
  input  logic [NPORT-1:0]              mc_sel_valid,
  input  logic [NPORT-1:0][MW-1:0]      mc_sel_mci,
  input  logic [NPORT-1:0][MQ_AW-1:0]   mc_sel_raddr,
  input  logic [NPORT-1:0][QL_W-1:0]    mc_sel_qlen,
  output logic [NPORT-1:0]              mc_rd_inc,
  output logic [NPORT-1:0][MW-1:0]      mc_rd_mci,
  input  logic [NPORT-1:0]              mc_release,
  // per-slot event report
  output events_t                       ev,
  output logic                          ev_valid
);
  localparam int unsigned TW      = $clog2(SLOT);
  localparam int unsigned T_ALLOC = 1;
  localparam int unsigned T_WR0   = 2;
  localparam int unsigned T_QR    = 2;
  localparam int unsigned T_MR0   = 3;
  localparam int unsigned T_SCHED = 11;
  localparam int unsigned T_RD0   = 12;
  localparam int unsigned T_QW0   = 12;
  localparam int unsigned T_COMMIT = 24;
  localparam int unsigned T_FREE0 = 25;
  localparam int unsigned SAW     = $clog2(CELLS * WPC);   // SBM word address
  localparam int unsigned VW      = $clog2(CELLS + 1);
  localparam int unsigned WIW     = $clog2(WPC);

  typedef logic [WPC-1:0][WORD_W-1:0] cellw_t;

  // ---------------------------------------------------------------- slot timer
  logic [TW-1:0] t;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) t <= '0;
    else        t <= (t == TW'(SLOT - 1)) ? '0 : t + 1'b1;
  assign slot_sync = (t == '0);

  function automatic logic in_win(logic [TW-1:0] tt, int unsigned lo, int unsigned n);
    return (32'(tt) >= lo) && (32'(tt) < lo + n);
  endfunction

  // ---------------------------------------------------- input: S/P conversion
  cellw_t [NPORT-1:0] cellbuf, pend_words;
  tag_t   [NPORT-1:0] cur_tag, pend_tag;

  for (genvar p = 0; p < NPORT; p++) begin : g_sp
    logic            wv;
    logic [WIW-1:0]  widx;
    logic [WORD_W-1:0] w;
    sp_conv #(.W(WORD_W), .NBITS(CELL_BYTES)) u_sp (
      .clk, .rst_n, .start(slot_sync), .din(in_bit[p]),
      .word_valid(wv), .word_idx(widx), .word(w));
    always_ff @(posedge clk)
      if (wv) cellbuf[p][widx] <= w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_tag  <= '0;
      pend_tag <= '0;
    end else if (slot_sync) begin
      cur_tag  <= in_tag;
      pend_tag <= cur_tag;
    end
  end
  always_ff @(posedge clk)
    if (slot_sync) pend_words <= cellbuf;

  // ------------------------------------------------------- queue pointers
  logic [NPORT-1:0][OQ_AW-1:0] oq_waddr, oq_raddr;
  logic [NPORT-1:0][OQ_AW:0]   oq_qlen;
  logic [NPORT-1:0]            oq_full, oq_rd_inc;

  outq_ctrl #(.NPORT(NPORT), .DEPTH(OQ_DEPTH)) u_outq (
    .clk, .rst_n, .wr_inc(oq_we), .rd_inc(oq_rd_inc),
    .waddr(oq_waddr), .raddr(oq_raddr), .qlen(oq_qlen), .full(oq_full));

  // ------------------------------------------------ write allocation (t = 1)
  logic [NSBM-1:0][VW-1:0]     vacant;
  logic [NSBM-1:0][ADDR_W-1:0] pop_addr;
  logic [NSBM-1:0]             iq_empty, iq_pop, iq_push;
  logic [NSBM-1:0][ADDR_W-1:0] iq_push_addr;
  logic [NPORT-1:0]            req, grant;
  logic [NPORT-1:0][SBM_W-1:0] w_sbm_of_port;
  logic [NSBM-1:0]             w_sbm_we;
  logic [NSBM-1:0][PORT_W-1:0] w_port_of_sbm;

  // allocation latched at t = 1
  logic [NPORT-1:0]              a_grant;
  logic [NPORT-1:0][SBM_W-1:0]   a_sbm_of_port;
  logic [NSBM-1:0]               a_sbm_we;
  logic [NSBM-1:0][PORT_W-1:0]   a_port_of_sbm;
  logic [NSBM-1:0][ADDR_W-1:0]   a_addr;
  logic [NPORT-1:0]              a_drop;

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      req[p] = pend_tag[p].valid &&
               (pend_tag[p].mc ? !mc_full[MW'(pend_tag[p].dest)] : !oq_full[pend_tag[p].dest]);
  end

  sbm_write_priority #(.NPORT(NPORT), .NSBM(NSBM), .CW(VW)) u_wprio (
    .req, .vacant, .grant, .sbm_of_port(w_sbm_of_port), .sbm_we(w_sbm_we),
    .port_of_sbm(w_port_of_sbm));

  always_comb
    for (int s = 0; s < NSBM; s++) iq_pop[s] = (t == TW'(T_ALLOC)) && w_sbm_we[s];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_grant  <= '0;
      a_sbm_we <= '0;
      a_drop   <= '0;
    end else if (t == TW'(T_ALLOC)) begin
      a_grant  <= grant;
      a_sbm_we <= w_sbm_we;
      for (int p = 0; p < NPORT; p++) a_drop[p] <= pend_tag[p].valid && !grant[p];
    end
  end
  always_ff @(posedge clk)
    if (t == TW'(T_ALLOC)) begin
      a_sbm_of_port <= w_sbm_of_port;
      a_port_of_sbm <= w_port_of_sbm;
      a_addr        <= pop_addr;
    end

  // ------------------------------------------------- external queue I/O control
  logic [PORT_W-1:0] qw_in;     // input handled in the queue write phase
  logic              qw_phase;
  logic [PORT_W-1:0] mr_port;   // port handled in the multicast read phase
  logic              mr_phase;
  qentry_t           qw_ent;

  // latched head-of-line information
  logic [NPORT-1:0]            l_uc_valid, l_mc_valid;
  qentry_t [NPORT-1:0]         l_uc_ent, l_mc_ent;
  logic [NPORT-1:0][QL_W-1:0]  l_uc_qlen, l_mc_qlen;
  logic [NPORT-1:0][MW-1:0]    l_mc_mci;
  logic [NPORT-1:0][MQ_AW-1:0] l_mc_raddr;

  always_comb begin
    qw_phase = in_win(t, T_QW0, NPORT);
    qw_in    = PORT_W'(32'(t) - T_QW0);
    mr_phase = in_win(t, T_MR0, NPORT);
    mr_port  = PORT_W'(32'(t) - T_MR0);
    qw_ent.sbm  = a_sbm_of_port[qw_in];
    qw_ent.addr = a_addr[a_sbm_of_port[qw_in]];
    for (int p = 0; p < NPORT; p++) begin
      oq_we[p]    = qw_phase && a_grant[qw_in] && !pend_tag[qw_in].mc &&
                    (pend_tag[qw_in].dest == PORT_W'(p));
      oq_addr[p]  = qw_phase ? oq_waddr[p] : oq_raddr[p];
      oq_wdata[p] = qw_ent;
    end
    for (int m = 0; m < NMCI; m++) begin
      mq_we[m]     = qw_phase && a_grant[qw_in] && pend_tag[qw_in].mc &&
                     (MW'(pend_tag[qw_in].dest) == MW'(m));
      mq_wdata[m]  = qw_ent;
      mq_addr[m]   = qw_phase ? mc_waddr[m] : l_mc_raddr[mr_port];
      mc_wr_inc[m] = mq_we[m];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_uc_valid <= '0;
      l_mc_valid <= '0;
    end else if (t == TW'(T_QR)) begin
      for (int p = 0; p < NPORT; p++) l_uc_valid[p] <= (oq_qlen[p] != '0);
      l_mc_valid <= mc_sel_valid;
    end
  end
  always_ff @(posedge clk) begin
    if (t == TW'(T_QR)) begin
      l_uc_ent   <= oq_rdata;
      for (int p = 0; p < NPORT; p++) l_uc_qlen[p] <= QL_W'(oq_qlen[p]);
      l_mc_mci   <= mc_sel_mci;
      l_mc_raddr <= mc_sel_raddr;
      l_mc_qlen  <= mc_sel_qlen;
    end
    if (mr_phase) l_mc_ent[mr_port] <= mq_rdata[l_mc_mci[mr_port]];
  end

  // --------------------------------------------------- SBM read priority (t = 11)
  logic [NPORT-1:0][SBM_W-1:0] uc_sbm, mc_sbm;
  logic [NPORT-1:0]       r_uc_read, r_mc_read, r_mc_blocked, r_send_uc, r_send_mc;
  logic [NPORT-1:0][1:0]  r_uc_cyc;
  logic [NREAD-1:0][NSBM-1:0]             r_rd_en, r_rd_mc;
  logic [NREAD-1:0][NSBM-1:0][PORT_W-1:0] r_rd_port;

  logic [NPORT-1:0]       s_uc_read, s_mc_read, s_mc_blocked, s_send_uc, s_send_mc;
  logic [NPORT-1:0][1:0]  s_uc_cyc;
  logic [NREAD-1:0][NSBM-1:0]             s_rd_en, s_rd_mc;
  logic [NREAD-1:0][NSBM-1:0][PORT_W-1:0] s_rd_port;

  always_comb
    for (int p = 0; p < NPORT; p++) begin
      uc_sbm[p] = l_uc_ent[p].sbm;
      mc_sbm[p] = l_mc_ent[p].sbm;
    end

  sbm_read_priority #(.NPORT(NPORT), .NSBM(NSBM), .KW(QL_W), .NRD(NREAD)) u_rprio (
    .uc_valid(l_uc_valid), .uc_sbm, .uc_qlen(l_uc_qlen),
    .mc_valid(l_mc_valid), .mc_sbm, .mc_qlen(l_mc_qlen),
    .uc_read(r_uc_read), .uc_cyc(r_uc_cyc), .mc_read(r_mc_read), .mc_blocked(r_mc_blocked),
    .send_uc(r_send_uc), .send_mc(r_send_mc),
    .rd_en(r_rd_en), .rd_port(r_rd_port), .rd_mc(r_rd_mc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_uc_read <= '0; s_mc_read <= '0; s_mc_blocked <= '0;
      s_send_uc <= '0; s_send_mc <= '0; s_rd_en <= '0;
    end else if (t == TW'(T_SCHED)) begin
      s_uc_read <= r_uc_read; s_mc_read <= r_mc_read; s_mc_blocked <= r_mc_blocked;
      s_send_uc <= r_send_uc; s_send_mc <= r_send_mc; s_rd_en <= r_rd_en;
    end
  end
  always_ff @(posedge clk)
    if (t == TW'(T_SCHED)) begin
      s_uc_cyc  <= r_uc_cyc;
      s_rd_port <= r_rd_port;
      s_rd_mc   <= r_rd_mc;
    end

  // ------------------------------------------------------ SBMs and routers
  logic [NSBM-1:0]             sbm_we;
  logic [NSBM-1:0][SAW-1:0]    sbm_addr;
  logic [NSBM-1:0][WORD_W-1:0] sbm_wdata, sbm_rdata;
  logic [NPORT-1:0][WORD_W-1:0] in_word, uc_word, mc_word;
  logic                        wr_phase, rd_phase;
  logic [WIW-1:0]              wr_w, rd_w;
  logic [1:0]                  rd_c;

  always_comb begin
    wr_phase = in_win(t, T_WR0, WPC);
    wr_w     = WIW'(32'(t) - T_WR0);
    rd_phase = in_win(t, T_RD0, NREAD * WPC);
    rd_w     = WIW'((32'(t) - T_RD0) % WPC);
    rd_c     = 2'((32'(t) - T_RD0) / WPC);
    for (int p = 0; p < NPORT; p++) in_word[p] = pend_words[p][wr_w];
    for (int s = 0; s < NSBM; s++) begin
      sbm_we[s]   = wr_phase && a_sbm_we[s];
      sbm_addr[s] = {a_addr[s], wr_w};
      if (rd_phase && s_rd_en[rd_c][s]) begin
        if (s_rd_mc[rd_c][s]) sbm_addr[s] = {l_mc_ent[s_rd_port[rd_c][s]].addr, rd_w};
        else                  sbm_addr[s] = {l_uc_ent[s_rd_port[rd_c][s]].addr, rd_w};
      end
    end
  end

  sbm_router #(.NPORT(NPORT), .NSBM(NSBM), .W(WORD_W)) u_router (
    .in_word, .port_of_sbm(a_port_of_sbm), .sbm_wdata, .sbm_rdata,
    .uc_sbm, .mc_sbm, .uc_word, .mc_word);

  for (genvar s = 0; s < NSBM; s++) begin : g_sbm
    sbm_sram #(.DEPTH(CELLS * WPC), .W(WORD_W)) u_sbm (
      .clk, .we(sbm_we[s]), .addr(sbm_addr[s]), .wdata(sbm_wdata[s]), .rdata(sbm_rdata[s]));
    idle_queue #(.CELLS(CELLS)) u_idle (
      .clk, .rst_n, .pop(iq_pop[s]), .pop_addr(pop_addr[s]),
      .push(iq_push[s]), .push_addr(iq_push_addr[s]), .vacant(vacant[s]), .empty(iq_empty[s]));
  end

  // read words land in per-port unicast and multicast cell buffers
  cellw_t [NPORT-1:0] ucbuf, mcbuf, txbuf, txcur;
  always_ff @(posedge clk)
    if (rd_phase)
      for (int p = 0; p < NPORT; p++) begin
        if (s_uc_read[p] && (s_uc_cyc[p] == rd_c)) ucbuf[p][rd_w] <= uc_word[p];
        if (s_mc_read[p] && (rd_c == 2'(NREAD - 1))) mcbuf[p][rd_w] <= mc_word[p];
      end

  // ------------------------------------------------------- commit (t = 24)
  logic                 commit;
  logic [NPORT-1:0]     tx_next, free_v;
  qentry_t [NPORT-1:0]  free_ent;
  logic [PORT_W-1:0]    fr_port;
  logic                 fr_phase;

  assign commit = (t == TW'(T_COMMIT));
  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      oq_rd_inc[p] = commit && s_send_uc[p];
      mc_rd_inc[p] = commit && s_send_mc[p];
      mc_rd_mci[p] = l_mc_mci[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_next   <= '0;
      free_v    <= '0;
      out_valid <= '0;
    end else begin
      if (commit) begin
        tx_next   <= s_send_uc | s_send_mc;
        free_v    <= s_send_uc | (s_send_mc & mc_release);
      end
      if (t == TW'(SLOT - 1)) out_valid <= tx_next;
    end
  end
  always_ff @(posedge clk) begin
    if (commit)
      for (int p = 0; p < NPORT; p++) begin
        txbuf[p]    <= s_send_uc[p] ? ucbuf[p] : mcbuf[p];
        free_ent[p] <= s_send_uc[p] ? l_uc_ent[p] : l_mc_ent[p];
      end
    if (t == TW'(SLOT - 1)) txcur <= txbuf;
  end

  // freed cell spaces go back to the idle queues, one port per clock
  always_comb begin
    fr_phase = in_win(t, T_FREE0, NPORT);
    fr_port  = PORT_W'(32'(t) - T_FREE0);
    for (int s = 0; s < NSBM; s++) begin
      iq_push[s]      = fr_phase && free_v[fr_port] && (free_ent[fr_port].sbm == SBM_W'(s));
      iq_push_addr[s] = free_ent[fr_port].addr;
    end
  end

  // ------------------------------------------------------------- output
  always_comb begin
    logic [WPC*WORD_W-1:0] flat;
    for (int p = 0; p < NPORT; p++) begin
      flat       = txcur[p];
      out_bit[p] = flat[t];
    end
  end

  // ------------------------------------------------------------- events
  always_comb begin
    ev_valid      = commit;
    ev.drop       = a_drop;
    ev.uc_sent    = s_send_uc;
    ev.mc_sent    = s_send_mc;
    ev.hol_wait   = l_uc_valid & ~s_uc_read;
    for (int p = 0; p < NPORT; p++) ev.uc_late[p] = s_uc_read[p] && (s_uc_cyc[p] != 2'd0);
    ev.mc_blocked = s_mc_blocked;
    ev.contention = s_uc_read & s_mc_read;
    ev.mc_release = s_send_mc & mc_release;
  end

  // A slot must be long enough for the schedule above.
  initial assert (SLOT >= T_FREE0 + NPORT);
endmodule
