// tb_outq_ctrl: random pointer increments against per-port counters kept in
// the testbench; addresses, queue lengths and the full flag (fewer than NPORT
// entries free) are checked every cycle, a small depth making wrap-around
// frequent.
module tb_outq_ctrl;
  localparam int N = 8, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] wr_inc, rd_inc, full;
  logic [N-1:0][4:0] waddr, raddr;
  logic [N-1:0][5:0] qlen;
  int wcnt [N], rcnt [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  outq_ctrl #(.NPORT(N), .DEPTH(DEPTH)) dut (.*);

  initial begin
    wr_inc = '0; rd_inc = '0;
    for (int p = 0; p < N; p++) begin wcnt[p] = 0; rcnt[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        int q;
        q = wcnt[p] - rcnt[p];
        checks += 4;
        if (int'(qlen[p]) != q) begin failures++; $display("FAIL qlen[%0d]=%0d exp %0d", p, qlen[p], q); end
        if (int'(waddr[p]) != wcnt[p] % DEPTH) failures++;
        if (int'(raddr[p]) != rcnt[p] % DEPTH) failures++;
        if (full[p] != (q > DEPTH - N)) failures++;
        wr_inc[p] = (q < DEPTH) && ($urandom_range(99) < ((it / 500) % 2 ? 70 : 35));
        rd_inc[p] = (q > 0) && ($urandom_range(99) < ((it / 500) % 2 ? 35 : 70));
        if (wr_inc[p]) wcnt[p]++;
        if (rd_inc[p]) rcnt[p]++;
      end
    end
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
