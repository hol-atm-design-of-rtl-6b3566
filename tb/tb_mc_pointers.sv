// tb_mc_pointers: random multicast arrivals and per-port reads.  The testbench
// keeps, for every stored multicast cell, how many destinations still have to
// read it; release_addr must be raised exactly for the read that brings this
// count to zero.  Write pointers, read pointers and the full flag are checked
// against testbench counters, and rewriting a destination register must
// empty that MCI's queues.
module tb_mc_pointers;
  localparam int NM = 4, NP = 8, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0][NP-1:0] dest;
  logic dest_we;
  logic [1:0] dest_mci;
  logic [NM-1:0] wr_inc, full;
  logic [NP-1:0] rd_inc, release_addr;
  logic [NP-1:0][1:0] rd_mci;
  logic [NM-1:0][5:0] wp;
  logic [NM-1:0][NP-1:0][5:0] rp;
  int wcnt [NM], rcnt [NM][NP];
  int left [NM][DEPTH];
  int checks = 0, failures = 0, releases = 0;
  always #5 clk = ~clk;

  mc_pointers #(.NMCI(NM), .NPORT(NP), .DEPTH(DEPTH)) dut (.*);

  initial begin
    dest = {8'b1100_0011, 8'b0011_1100, 8'b1010_1010, 8'b0000_0111};
    dest_we = 0; dest_mci = '0; wr_inc = '0; rd_inc = '0; rd_mci = '0;
    for (int m = 0; m < NM; m++) begin
      wcnt[m] = 0;
      for (int o = 0; o < NP; o++) rcnt[m][o] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      dest_we = 0;
      for (int m = 0; m < NM; m++) begin
        bit ef;
        ef = 0;
        checks++;
        if (int'(wp[m]) != wcnt[m] % (2 * DEPTH)) failures++;
        for (int o = 0; o < NP; o++) begin
          checks++;
          if (int'(rp[m][o]) != rcnt[m][o] % (2 * DEPTH)) begin failures++; $display("FAIL rp[%0d][%0d]", m, o); end
          if (dest[m][o] && wcnt[m] - rcnt[m][o] > DEPTH - NP) ef = 1;
        end
        checks++;
        if (full[m] != ef) begin failures++; $display("FAIL full[%0d]", m); end
      end
      // stimulus
      for (int m = 0; m < NM; m++) begin
        wr_inc[m] = !full[m] && ($urandom_range(99) < 30);
        if (wr_inc[m]) left[m][wcnt[m] % DEPTH] = $countones(dest[m]);
      end
      for (int o = 0; o < NP; o++) begin
        int m;
        m = $urandom_range(NM - 1);
        rd_mci[o] = 2'(m);
        rd_inc[o] = dest[m][o] && (wcnt[m] > rcnt[m][o]) && ($urandom_range(99) < 60);
      end
      #1;
      for (int o = 0; o < NP; o++) if (rd_inc[o]) begin
        int m, pos;
        m = rd_mci[o];
        pos = rcnt[m][o] % DEPTH;
        left[m][pos]--;
        checks++;
        if (release_addr[o] != (left[m][pos] == 0)) begin
          failures++; $display("FAIL release[%0d] mci %0d pos %0d left %0d", o, m, pos, left[m][pos]);
        end
        if (release_addr[o]) releases++;
        rcnt[m][o]++;
      end else begin
        checks++;
        if (release_addr[o]) failures++;
      end
      for (int m = 0; m < NM; m++) if (wr_inc[m]) wcnt[m]++;
      // now and then rewrite a destination register (empties that MCI)
      if (it % 1000 == 999) begin
        @(negedge clk);
        wr_inc = '0; rd_inc = '0;
        dest_we = 1; dest_mci = 2'(it / 1000 % NM);
        for (int o = 0; o < NP; o++) rcnt[dest_mci][o] = wcnt[dest_mci];
      end
    end
    checks++;
    if (releases == 0) failures++;
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
