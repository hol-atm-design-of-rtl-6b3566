// tb_switch_chip: one bit-slice switch chip with its output-queue memories,
// multicast-queue memories and a multicast-pointer chip around it.  A cell is
// a 53-bit slice whose bits 0..15 hold its id and the rest a fixed function of
// the id.  First all eight inputs send one unicast cell to port 2 in the same
// slot: they must leave port 2 in input-port order, one per slot, the first
// three slots after arrival.  Then random unicast and multicast traffic runs
// against FIFO reference queues (per port for unicast, per MCI and port for
// multicast), and after a drain every cell must have left exactly once and all
// SBM space must be free again.
module tb_switch_chip;
  import atm_pkg::*;
  localparam int SLOT = CELL_BYTES;
  localparam int QE_W = $bits(qentry_t);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_sync;
  logic [NPORT-1:0] in_bit, out_bit, out_valid;
  tag_t [NPORT-1:0] in_tag;
  logic [NPORT-1:0][9:0] oq_addr;
  logic [NPORT-1:0] oq_we;
  logic [NPORT-1:0][QE_W-1:0] oq_wdata, oq_rdata;
  logic [NMCI-1:0][7:0] mq_addr;
  logic [NMCI-1:0] mq_we, mc_wr_inc, mc_full;
  logic [NMCI-1:0][QE_W-1:0] mq_wdata, mq_rdata;
  logic [NMCI-1:0][7:0] mc_waddr;
  logic [NPORT-1:0] mc_sel_valid, mc_rd_inc, mc_release;
  logic [NPORT-1:0][1:0] mc_sel_mci, mc_rd_mci;
  logic [NPORT-1:0][7:0] mc_sel_raddr;
  logic [NPORT-1:0][QL_W-1:0] mc_sel_qlen;
  events_t ev;
  logic ev_valid;
  logic dest_we;
  logic [1:0] dest_mci;
  logic [NPORT-1:0] dest_ports;

  switch_chip dut (.*);
  for (genvar p = 0; p < NPORT; p++) begin : g_oq
    ext_queue_mem #(.DEPTH(OQ_DEPTH), .W(QE_W)) u_oq (.clk, .we(oq_we[p]), .addr(oq_addr[p]),
      .wdata(oq_wdata[p]), .rdata(oq_rdata[p]));
  end
  for (genvar m = 0; m < NMCI; m++) begin : g_mq
    ext_queue_mem #(.DEPTH(MQ_DEPTH), .W(QE_W)) u_mq (.clk, .we(mq_we[m]), .addr(mq_addr[m]),
      .wdata(mq_wdata[m]), .rdata(mq_rdata[m]));
  end
  mcptr_chip u_mc (.clk, .rst_n, .dest_we, .dest_mci, .dest_ports, .weight('0),
    .wr_inc(mc_wr_inc), .rd_inc(mc_rd_inc), .rd_mci(mc_rd_mci), .mq_waddr(mc_waddr), .full(mc_full),
    .sel_valid(mc_sel_valid), .sel_mci(mc_sel_mci), .sel_raddr(mc_sel_raddr), .sel_qlen(mc_sel_qlen),
    .release_addr(mc_release));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (time %0t)", what, $time); end
  endtask

  function automatic logic cbit(int id, int i);
    logic [15:0] h;
    if (i < 16) return id[i];
    h = 16'(id * 40503 + i * 7);
    return h[9] ^ h[3];
  endfunction

  logic [NPORT-1:0] mdest [NMCI];
  int exp_uc [NPORT][$];
  int exp_mc [NMCI][NPORT][$];
  int cell_slot [int];
  tag_t [NPORT-1:0] hist_tag [2], tags_now;
  int hist_id [2][NPORT], ids_now [NPORT];
  int next_id = 1, slot_no = -1, tb_t = 0, phase = 0;
  int n_in = 0, n_acc = 0, n_drop = 0, n_out = 0;
  int burst_slot = -1, burst_seen = 0;
  logic [SLOT-1:0] obits [NPORT];

  task automatic make_tags();
    for (int p = 0; p < NPORT; p++) begin
      tags_now[p] = '0; ids_now[p] = 0;
      if (phase == 1) begin tags_now[p].valid = 1; tags_now[p].dest = 3'd2; end
      if (phase == 2 && $urandom_range(99) < 70) begin
        tags_now[p].valid = 1;
        tags_now[p].mc    = ($urandom_range(99) < 15);
        tags_now[p].dest  = tags_now[p].mc ? 3'($urandom_range(NMCI - 1)) : 3'($urandom_range(NPORT - 1));
      end
      if (tags_now[p].valid) begin
        ids_now[p] = next_id++;
        cell_slot[ids_now[p]] = slot_no;
        n_in++;
      end
    end
    if (phase == 1) begin burst_slot = slot_no; phase = 0; end
  endtask

  task automatic take_report();
    for (int p = 0; p < NPORT; p++) if (hist_tag[1][p].valid) begin
      if (ev.drop[p]) begin n_drop++; continue; end
      n_acc++;
      if (!hist_tag[1][p].mc) exp_uc[hist_tag[1][p].dest].push_back(hist_id[1][p]);
      else for (int o = 0; o < NPORT; o++)
        if (mdest[hist_tag[1][p].dest][o]) exp_mc[hist_tag[1][p].dest][o].push_back(hist_id[1][p]);
    end
  endtask

  task automatic check_cell(int p);
    int id;
    bit found, same;
    id = int'(obits[p][15:0]);
    n_out++;
    found = 0;
    if (exp_uc[p].size() > 0 && exp_uc[p][0] == id) begin void'(exp_uc[p].pop_front()); found = 1; end
    for (int m = 0; m < NMCI; m++)
      if (!found && exp_mc[m][p].size() > 0 && exp_mc[m][p][0] == id) begin
        void'(exp_mc[m][p].pop_front()); found = 1;
      end
    check(found, $sformatf("port %0d: cell %0d not at the head of its queues", p, id));
    same = 1;
    for (int i = 0; i < SLOT; i++) if (obits[p][i] != cbit(id, i)) same = 0;
    check(same, $sformatf("port %0d: cell %0d corrupted", p, id));
    if (found && cell_slot[id] == burst_slot) begin
      // burst cells came from inputs 0..7 in that order: the k-th leaves k slots later
      check(p == 2 && slot_no == burst_slot + 3 + burst_seen && id == next_burst_id(burst_seen),
            $sformatf("burst cell %0d left port %0d in slot %0d", id, p, slot_no));
      burst_seen++;
    end
  endtask
  int burst_first_id = -1;
  function automatic int next_burst_id(int k);
    return burst_first_id + k;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (slot_sync) begin
      tb_t = 0; slot_no++;
      hist_tag[1] = hist_tag[0]; hist_id[1] = hist_id[0];
      if (phase == 1) burst_first_id = next_id;
      make_tags();
      hist_tag[0] = tags_now; hist_id[0] = ids_now;
      in_tag = tags_now;
    end else tb_t++;
    for (int p = 0; p < NPORT; p++) in_bit[p] = tags_now[p].valid ? cbit(ids_now[p], tb_t) : 1'b0;
    for (int p = 0; p < NPORT; p++) if (out_valid[p]) begin
      obits[p][tb_t] = out_bit[p];
      if (tb_t == SLOT - 1) check_cell(p);
    end
    if (ev_valid) take_report();
  end

  function automatic int backlog();
    int b = 0;
    for (int p = 0; p < NPORT; p++) begin
      b += exp_uc[p].size();
      for (int m = 0; m < NMCI; m++) b += exp_mc[m][p].size();
    end
    return b;
  endfunction

  initial begin
    in_bit = '0; in_tag = '0; dest_we = 0; dest_mci = '0; dest_ports = '0;
    hist_tag[0] = '0; hist_tag[1] = '0; tags_now = '0;
    for (int p = 0; p < NPORT; p++) begin hist_id[0][p] = 0; hist_id[1][p] = 0; ids_now[p] = 0; end
    mdest[0] = 8'b0000_0110; mdest[1] = 8'b1100_0000; mdest[2] = 8'b0010_1001; mdest[3] = 8'b1111_1111;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < NMCI; m++) begin
      @(negedge clk); dest_we = 1; dest_mci = 2'(m); dest_ports = mdest[m];
    end
    @(negedge clk) dest_we = 0;
    phase = 1;
    repeat (14 * SLOT) @(posedge clk);
    check(burst_seen == 8, $sformatf("%0d of 8 burst cells left", burst_seen));
    phase = 2;
    repeat (80 * SLOT) @(posedge clk);
    phase = 0;
    for (int i = 0; i < 300 && backlog() != 0; i++) repeat (SLOT) @(posedge clk);
    repeat (3 * SLOT) @(posedge clk);
    check(backlog() == 0, $sformatf("%0d cells still queued", backlog()));
    check(n_in == n_acc + n_drop, "every cell accepted or refused");
    for (int s = 0; s < NSBM; s++) check(dut.vacant[s] == CELLS, $sformatf("SBM %0d not empty", s));
    $display("in %0d accepted %0d out %0d", n_in, n_acc, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (SLOT * 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
