// tb_throughput: throughput and average queue length of the full-size switch
// under random traffic, the evaluation setting of the architecture: 8x8 ports,
// every multicast connection with 4 destination ports, each input offering a
// cell per slot with probability LOAD, a fraction MC_RATE of them multicast
// to a uniformly chosen MCI, destinations uniform.  Each configuration starts
// from reset, warms up for WARM slots and measures for MEAS slots.
// Throughput = cells leaving / (8 x slots).  Checks: at an offered output load
// below 1 every offered cell is carried (within 3 %); at an input load of 1
// the throughput stays at or above 95 %; and at least 90 % of the SBMs are
// left without a unicast read in the third read cycle, the spare capacity
// that multicast cells use.
module tb_throughput;
  import atm_pkg::*;
  localparam int SLOT = CELL_BYTES;
  localparam int WARM = 100, MEAS = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  slot_sync;
  logic [NPORT-1:0][7:0] in_byte, out_byte;
  tag_t [NPORT-1:0]      in_tag;
  logic [NPORT-1:0]      out_valid;
  logic                  dest_we;
  logic [1:0]            dest_mci;
  logic [NPORT-1:0]      dest_ports;
  logic [NMCI-1:0][1:0]  mc_weight;
  events_t               ev;
  logic                  ev_valid;

  atm_switch dut (.*);

  int checks = 0, failures = 0;
  int load_pm = 0, mc_pm = 0;        // per mille
  bit measuring = 0;
  int n_slots = 0, n_sent = 0, n_off = 0, n_drop = 0, n_mc_in = 0;
  longint uq_sum = 0, mq_sum = 0;
  int n_sbm_slots = 0, n_idle3 = 0;    // SBMs with no unicast read in the third cycle
  logic [NPORT-1:0] mdest [NMCI];

  always @(negedge clk) if (rst_n) begin
    if (slot_sync) begin
      for (int p = 0; p < NPORT; p++) begin
        in_tag[p] = '0;
        if ($urandom_range(999) < load_pm) begin
          in_tag[p].valid = 1'b1;
          in_tag[p].mc    = ($urandom_range(9999) < mc_pm * 10);
          in_tag[p].dest  = in_tag[p].mc ? 3'($urandom_range(NMCI - 1)) : 3'($urandom_range(NPORT - 1));
          if (measuring) begin
            n_off += in_tag[p].mc ? 4 : 1;
            if (in_tag[p].mc) n_mc_in++;
          end
        end
      end
      if (measuring) begin
        n_slots++;
        for (int p = 0; p < NPORT; p++) uq_sum += longint'(dut.g_chip[0].u_chip.oq_qlen[p]);
        for (int m = 0; m < NMCI; m++)
          for (int o = 0; o < NPORT; o++)
            if (mdest[m][o]) mq_sum += longint'(9'(dut.u_mcptr.u_ptr.wp[m] - dut.u_mcptr.u_ptr.rp[m][o]));
      end
    end
    if (ev_valid && measuring) begin
      n_sent += $countones(ev.uc_sent) + $countones(ev.mc_sent);
      n_drop += $countones(ev.drop);
      for (int s = 0; s < NSBM; s++) begin
        n_sbm_slots++;
        if (!(dut.g_chip[0].u_chip.s_rd_en[NREAD-1][s] && !dut.g_chip[0].u_chip.s_rd_mc[NREAD-1][s]))
          n_idle3++;
      end
    end
  end
  assign in_byte = '0;

  task automatic run(int lpm, int mpm, bit full_load);
    real thr, offered;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMCI; m++) begin
      @(negedge clk); dest_we = 1; dest_mci = 2'(m); dest_ports = mdest[m];
    end
    @(negedge clk) dest_we = 0;
    load_pm = lpm; mc_pm = mpm;
    repeat (WARM * SLOT) @(posedge clk);
    n_slots = 0; n_sent = 0; n_off = 0; n_drop = 0; n_mc_in = 0; uq_sum = 0; mq_sum = 0;
    n_sbm_slots = 0; n_idle3 = 0;
    measuring = 1;
    repeat (MEAS * SLOT) @(posedge clk);
    measuring = 0;
    load_pm = 0;
    thr     = real'(n_sent) / real'(NPORT * n_slots);
    offered = real'(n_off) / real'(NPORT * n_slots);
    $display("load %0.3f multicast %0.3f: offered copies %0.4f throughput %0.4f refused %0d avg unicast qlen %0.2f avg multicast qlen %0.2f",
             lpm / 1000.0, mpm / 1000.0, offered, thr, n_drop,
             real'(uq_sum) / real'(NPORT * n_slots), real'(mq_sum) / real'(NPORT * n_slots));
    $display("  probability that an SBM has no unicast read in the third cycle: %0.4f",
             real'(n_idle3) / real'(n_sbm_slots));
    checks++;
    if (real'(n_idle3) / real'(n_sbm_slots) < 0.90) begin
      failures++; $display("FAIL: too few SBMs left free for multicast in the third cycle");
    end
    checks++;
    if (full_load) begin
      if (thr < 0.95) begin failures++; $display("FAIL: throughput %0.4f below 0.95 at full load", thr); end
    end else begin
      if (thr < offered - 0.03 || thr > offered + 0.03) begin
        failures++; $display("FAIL: throughput %0.4f does not follow offered %0.4f", thr, offered);
      end
    end
  endtask

  initial begin
    in_tag = '0; dest_we = 0; dest_mci = '0; dest_ports = '0; mc_weight = '0;
    mdest[0] = 8'b0000_1111; mdest[1] = 8'b1111_0000; mdest[2] = 8'b1010_1010; mdest[3] = 8'b0101_0101;
    run(500, 10, 0);
    run(800, 10, 0);
    run(1000, 10, 1);
    run(1000, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (SLOT * 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
