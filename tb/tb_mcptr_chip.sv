// tb_mcptr_chip: programs four multicast connections, stores multicast cells
// and reads them port by port as a switch chip would.  A model in the
// testbench keeps every MCI's write pointer and per-port read pointers and
// checks the chip's per-port choice (longest weighted queue among the MCIs
// that have the port as a destination), the multicast-queue addresses it
// hands out, and that exactly the last read of every cell releases it.
module tb_mcptr_chip;
  import atm_pkg::*;
  localparam int NM = NMCI, NP = NPORT, D = MQ_DEPTH;
  logic clk = 0, rst_n = 0;
  logic dest_we;
  logic [1:0] dest_mci;
  logic [NP-1:0] dest_ports;
  logic [NM-1:0][1:0] weight;
  logic [NM-1:0] wr_inc, full;
  logic [NP-1:0] rd_inc, sel_valid, release_addr;
  logic [NP-1:0][1:0] rd_mci, sel_mci;
  logic [NM-1:0][7:0] mq_waddr;
  logic [NP-1:0][7:0] sel_raddr;
  logic [NP-1:0][QL_W-1:0] sel_qlen;
  logic [NP-1:0] mdest [NM];
  int wcnt [NM], rcnt [NM][NP];
  int left [NM][D];
  int checks = 0, failures = 0, n_rel = 0, n_stored = 0;
  always #5 clk = ~clk;

  mcptr_chip dut (.*);

  initial begin
    mdest[0] = 8'b0000_1111; mdest[1] = 8'b1111_0000; mdest[2] = 8'b1010_1010; mdest[3] = 8'b0101_0101;
    dest_we = 0; dest_mci = '0; dest_ports = '0; weight = '0; wr_inc = '0; rd_inc = '0; rd_mci = '0;
    for (int m = 0; m < NM; m++) begin wcnt[m] = 0; for (int o = 0; o < NP; o++) rcnt[m][o] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NM; m++) begin
      @(negedge clk); dest_we = 1; dest_mci = 2'(m); dest_ports = mdest[m];
    end
    @(negedge clk); dest_we = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if (it % 500 == 0) weight = (it % 1000 == 0) ? '0 : {2'd0, 2'd1, 2'd3, 2'd2};
      #1;
      // expected per-port choice
      for (int o = 0; o < NP; o++) begin
        int best, bq;
        best = -1; bq = 0;
        for (int m = 0; m < NM; m++) begin
          int q;
          q = (wcnt[m] - rcnt[m][o]) << weight[m];
          if (mdest[m][o] && q > 0 && (best < 0 || q > bq)) begin best = m; bq = q; end
        end
        checks++;
        if (sel_valid[o] != (best >= 0)) begin failures++; $display("FAIL sel_valid[%0d]", o); end
        if (best >= 0) begin
          checks += 3;
          if (int'(sel_mci[o]) != best) begin failures++; $display("FAIL sel_mci[%0d]=%0d exp %0d", o, sel_mci[o], best); end
          if (int'(sel_qlen[o]) != bq) failures++;
          if (int'(sel_raddr[o]) != rcnt[best][o] % D) failures++;
        end
      end
      for (int m = 0; m < NM; m++) begin
        checks++;
        if (int'(mq_waddr[m]) != wcnt[m] % D) failures++;
      end
      // stimulus: arrivals, and reads of the chosen cells
      for (int m = 0; m < NM; m++) begin
        wr_inc[m] = !full[m] && ($urandom_range(99) < 25);
      end
      for (int o = 0; o < NP; o++) begin
        rd_inc[o] = sel_valid[o] && ($urandom_range(99) < 50);
        rd_mci[o] = sel_mci[o];
      end
      #1;
      for (int o = 0; o < NP; o++) if (rd_inc[o]) begin
        int m, pos;
        m = rd_mci[o]; pos = rcnt[m][o] % D;
        left[m][pos]--;
        checks++;
        if (release_addr[o] != (left[m][pos] == 0)) begin failures++; $display("FAIL release[%0d]", o); end
        if (release_addr[o]) n_rel++;
        rcnt[m][o]++;
      end
      for (int m = 0; m < NM; m++) if (wr_inc[m]) begin
        left[m][wcnt[m] % D] = $countones(mdest[m]);
        wcnt[m]++;
        n_stored++;
      end
    end
    checks++;
    if (n_rel == 0) failures++;
    $display("stored %0d released %0d", n_stored, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
