// tb_atm_switch: end-to-end test of the 8x8 switch at its full size.
//
// Cells carry their identity in their payload (bytes 0..1 = cell id, byte 2 =
// input port, every other byte a fixed function of id and position), so every
// cell leaving the switch can be matched to the cell that entered.  The
// reference model keeps, per output port, a FIFO of accepted unicast cells and,
// per MCI and output port, a FIFO of accepted multicast cells; a departing cell
// must be the head of one of the FIFOs of its port and carry exact payload.
// Phases: one lone cell (checks the three-slot latency), random unicast and
// multicast traffic, a hot-spot burst that forces HOL blocking, a multicast
// overload that fills a multicast queue until cells are refused, a phase with
// a nonzero multicast weight, then a drain.  At the end every accepted cell
// must have left, every multicast cell must have freed its SBM space exactly
// once, and all SBMs must be empty again.  Every mechanism reported by the
// switch's event flags must have happened at least once.
module tb_atm_switch;
  import atm_pkg::*;
  localparam int SLOT = CELL_BYTES;
  localparam int MW   = $clog2(NMCI);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        slot_sync;
  logic [NPORT-1:0][7:0]       in_byte, out_byte;
  tag_t [NPORT-1:0]            in_tag;
  logic [NPORT-1:0]            out_valid;
  logic                        dest_we;
  logic [MW-1:0]               dest_mci;
  logic [NPORT-1:0]            dest_ports;
  logic [NMCI-1:0][1:0]        mc_weight;
  events_t                     ev;
  logic                        ev_valid;

  atm_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  function automatic logic [7:0] cell_byte(int id, int port, int i);
    case (i)
      0:       return id[7:0];
      1:       return id[15:8];
      2:       return 8'(port);
      default: return 8'((id * 37 + i * 11 + (id >> 3)) ^ (i << 2));
    endcase
  endfunction

  // ---------------------------------------------------------------- model
  logic [NMCI-1:0][NPORT-1:0] mdest;
  int exp_uc [NPORT][$];
  int exp_mc [NMCI][NPORT][$];
  int cell_port [int];              // id -> input port
  int cell_slot [int];              // id -> arrival slot
  int mc_copies_left [int];         // id -> destinations still to serve
  // cells of the previous two slots, waiting for the switch's accept report
  tag_t [NPORT-1:0] hist_tag [2];
  int               hist_id  [2][NPORT];
  int next_id = 1;
  int slot_no = -1;
  int tb_t = 0;

  // counters
  int n_in = 0, n_acc = 0, n_drop = 0, n_out = 0, n_mc_acc = 0, n_release = 0;
  int n_mc_done = 0;
  int e_uc_sent = 0, e_mc_sent = 0, e_hol = 0, e_late = 0, e_blocked = 0;
  int e_cont = 0, e_cont_mc_won = 0, e_release = 0, e_drop = 0, e_weighted = 0;
  int lone_id = -1, lone_latency = -1;

  // traffic control, set by the stimulus process
  int   phase = 0;      // 0 idle, 1 lone cell, 2 random, 3 hotspot, 4 mc overload, 5 weighted
  int   load_pct = 0, mc_pct = 0;
  bit   lone_pending = 0;

  // per-port output assembly
  logic [7:0] obuf [NPORT][SLOT];

  task automatic make_tags(output tag_t [NPORT-1:0] tg, output int ids [NPORT]);
    for (int p = 0; p < NPORT; p++) begin
      tg[p] = '0;
      ids[p] = 0;
      case (phase)
        1: if (lone_pending && p == 3) begin
             tg[p].valid = 1; tg[p].mc = 0; tg[p].dest = 3'd5;
           end
        2, 5: if ($urandom_range(99) < load_pct) begin
             tg[p].valid = 1;
             tg[p].mc    = ($urandom_range(99) < mc_pct);
             tg[p].dest  = tg[p].mc ? 3'($urandom_range(NMCI - 1)) : 3'($urandom_range(NPORT - 1));
           end
        3: begin                      // hot spot: everybody to ports 0..1
             tg[p].valid = 1; tg[p].mc = 0; tg[p].dest = 3'($urandom_range(1));
           end
        4: begin                      // multicast overload of MCI 0
             tg[p].valid = 1; tg[p].mc = 1; tg[p].dest = 3'd0;
           end
        default: ;
      endcase
      if (tg[p].valid) begin
        ids[p] = next_id++;
        cell_port[ids[p]] = p;
        cell_slot[ids[p]] = slot_no;
        n_in++;
      end
    end
    if (phase == 1) lone_pending = 0;
  endtask

  // accept report for the cells of slot (slot_no - 1)
  task automatic take_report();
    for (int p = 0; p < NPORT; p++) begin
      if (!hist_tag[1][p].valid) begin
        check(!ev.drop[p], "drop reported for an empty input");
        continue;
      end
      if (ev.drop[p]) begin
        n_drop++;
        continue;
      end
      n_acc++;
      if (!hist_tag[1][p].mc) exp_uc[hist_tag[1][p].dest].push_back(hist_id[1][p]);
      else begin
        int m;
        int c;
        m = int'(hist_tag[1][p].dest);
        c = 0;
        for (int o = 0; o < NPORT; o++)
          if (mdest[m][o]) begin
            exp_mc[m][o].push_back(hist_id[1][p]);
            c++;
          end
        mc_copies_left[hist_id[1][p]] = c;
        n_mc_acc++;
      end
    end
  endtask

  task automatic check_cell(int p);
    int id, src;
    bit found;
    id = {obuf[p][1], obuf[p][0]};
    n_out++;
    found = 0;
    if (exp_uc[p].size() > 0 && exp_uc[p][0] == id) begin
      void'(exp_uc[p].pop_front());
      found = 1;
    end else begin
      for (int m = 0; m < NMCI; m++)
        if (!found && exp_mc[m][p].size() > 0 && exp_mc[m][p][0] == id) begin
          void'(exp_mc[m][p].pop_front());
          found = 1;
          mc_copies_left[id]--;
          if (mc_copies_left[id] == 0) n_mc_done++;
        end
    end
    check(found, $sformatf("port %0d: cell %0d is not the head of any of its queues", p, id));
    if (found) begin
      bit same;
      src  = cell_port[id];
      same = 1;
      for (int i = 0; i < SLOT; i++) if (obuf[p][i] != cell_byte(id, src, i)) same = 0;
      check(same, $sformatf("port %0d: payload of cell %0d corrupted", p, id));
      if (id == lone_id) lone_latency = slot_no - cell_slot[id];
    end
  endtask

  // ------------------------------------------------ slot-synchronous driver
  int ids_now [NPORT];
  tag_t [NPORT-1:0] tags_now;
  always @(negedge clk) begin
    if (rst_n) begin
      if (slot_sync) begin
        tb_t = 0;
        slot_no++;
        hist_tag[1] = hist_tag[0];
        hist_id[1]  = hist_id[0];
        make_tags(tags_now, ids_now);
        hist_tag[0] = tags_now;
        hist_id[0]  = ids_now;
        in_tag      = tags_now;
      end else tb_t++;
      for (int p = 0; p < NPORT; p++)
        in_byte[p] = tags_now[p].valid ? cell_byte(ids_now[p], p, tb_t) : 8'h00;
      // outputs
      for (int p = 0; p < NPORT; p++)
        if (out_valid[p]) begin
          obuf[p][tb_t] = out_byte[p];
          if (tb_t == SLOT - 1) check_cell(p);
        end
      // events, once per slot
      if (ev_valid) begin
        // the report in slot n concerns cells that arrived in slot n-1 = hist[1]
        take_report();
        e_uc_sent += $countones(ev.uc_sent);
        e_mc_sent += $countones(ev.mc_sent);
        e_hol     += $countones(ev.hol_wait);
        e_late    += $countones(ev.uc_late);
        e_blocked += $countones(ev.mc_blocked);
        e_cont    += $countones(ev.contention);
        e_cont_mc_won += $countones(ev.contention & ev.mc_sent);
        e_release += $countones(ev.mc_release);
        e_drop    += $countones(ev.drop);
        if (mc_weight != '0) e_weighted += $countones(ev.mc_sent);
        check((ev.uc_sent & ev.mc_sent) == '0, "two cells sent to one port in one slot");
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic wait_slots(int n);
    repeat (n * SLOT) @(posedge clk);
  endtask

  function automatic int backlog();
    int b = 0;
    for (int p = 0; p < NPORT; p++) begin
      b += exp_uc[p].size();
      for (int m = 0; m < NMCI; m++) b += exp_mc[m][p].size();
    end
    return b;
  endfunction

  initial begin
    in_byte = '0; in_tag = '0; dest_we = 0; dest_mci = '0; dest_ports = '0; mc_weight = '0;
    hist_tag[0] = '0; hist_tag[1] = '0; tags_now = '0;
    for (int p = 0; p < NPORT; p++) begin hist_id[0][p] = 0; hist_id[1][p] = 0; ids_now[p] = 0; end
    mdest[0] = 8'b0000_1111;
    mdest[1] = 8'b1111_0000;
    mdest[2] = 8'b1010_1010;
    mdest[3] = 8'b0101_0101;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // program the multicast destination registers
    for (int m = 0; m < NMCI; m++) begin
      @(negedge clk);
      dest_we = 1; dest_mci = MW'(m); dest_ports = mdest[m];
    end
    @(negedge clk) dest_we = 0;

    // lone cell: latency
    phase = 1; lone_pending = 1; lone_id = next_id;
    wait_slots(6);
    phase = 0;
    wait_slots(2);
    check(lone_latency == 3, $sformatf("lone cell latency %0d slots, expected 3", lone_latency));

    // random traffic
    phase = 2; load_pct = 90; mc_pct = 8;
    wait_slots(150);
    // hot spot
    phase = 3;
    wait_slots(12);
    // multicast overload
    phase = 4;
    wait_slots(45);
    // weighted multicast under random load
    phase = 5; load_pct = 80; mc_pct = 20; mc_weight = {2'd0, 2'd0, 2'd3, 2'd2};
    wait_slots(60);
    // drain
    phase = 0;
    for (int i = 0; i < 700 && backlog() != 0; i++) wait_slots(1);
    wait_slots(3);
    mc_weight = '0;

    check(backlog() == 0, $sformatf("%0d cells never left the switch", backlog()));
    check(n_in == n_acc + n_drop, "every cell either accepted or refused");
    check(e_release == n_mc_acc, $sformatf("multicast releases %0d, accepted multicast cells %0d",
                                           e_release, n_mc_acc));
    check(n_mc_done == n_mc_acc, "every multicast cell reached all its destinations");
    for (int s = 0; s < NSBM; s++)
      check(dut.g_chip[0].u_chip.vacant[s] == CELLS, $sformatf("SBM %0d not empty after drain", s));
    // mechanisms
    check(e_uc_sent > 0,      "no unicast cell sent");
    check(e_mc_sent > 0,      "no multicast cell sent");
    check(e_hol > 0,          "HOL blocking never happened");
    check(e_late > 0,         "no unicast read in the 2nd/3rd read cycle");
    check(e_blocked > 0,      "multicast never lost an SBM to a unicast read");
    check(e_cont > 0,         "unicast and multicast never met at an output");
    check(e_cont_mc_won > 0,  "multicast never won an output by queue length");
    check(e_release > 0,      "no multicast release");
    check(e_drop > 0,         "no cell was refused");
    check(e_weighted > 0,     "weighted multicast never sent");
    $display("cells in %0d accepted %0d refused %0d out %0d | uc %0d mc %0d hol %0d late %0d blocked %0d contention %0d (mc won %0d) release %0d",
             n_in, n_acc, n_drop, n_out, e_uc_sent, e_mc_sent, e_hol, e_late, e_blocked, e_cont,
             e_cont_mc_won, e_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SLOT * 1400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
