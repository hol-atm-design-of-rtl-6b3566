// tb_qlen_ranker: random candidate sets; each rank is recomputed by sorting
// the candidates in the testbench (longest key first, lower index on ties) and
// compared with the ranker's rank, order and first outputs.
module tb_qlen_ranker;
  localparam int N = 8, KW = 12;
  logic [N-1:0]         valid;
  logic [N-1:0][KW-1:0] key;
  logic [N-1:0][2:0]    rank;
  logic [N-1:0][N-1:0]  order;
  logic [2:0]           first;
  logic                 any;
  int checks = 0, failures = 0;

  qlen_ranker #(.N(N), .KW(KW)) dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int exp_rank [N];
      int nvalid;
      valid = N'($urandom);
      for (int i = 0; i < N; i++) key[i] = (it % 3 == 0) ? KW'($urandom_range(3)) : KW'($urandom);
      #1;
      nvalid = 0;
      for (int i = 0; i < N; i++) begin
        exp_rank[i] = 0;
        for (int j = 0; j < N; j++)
          if (valid[j] && j != i && (key[j] > key[i] || (key[j] == key[i] && j < i))) exp_rank[i]++;
        if (valid[i]) nvalid++;
      end
      for (int i = 0; i < N; i++) if (valid[i]) begin
        checks++;
        if (int'(rank[i]) != exp_rank[i]) begin
          failures++; $display("FAIL rank[%0d]=%0d exp %0d", i, rank[i], exp_rank[i]);
        end
        checks++;
        if (!order[exp_rank[i]][i]) begin failures++; $display("FAIL order"); end
        if (exp_rank[i] == 0) begin
          checks++;
          if (int'(first) != i) begin failures++; $display("FAIL first"); end
        end
      end
      for (int r = 0; r < N; r++) begin
        checks++;
        if ($countones(order[r]) != ((r < nvalid) ? 1 : 0)) begin failures++; $display("FAIL order count"); end
      end
      checks++;
      if (any != (valid != 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
