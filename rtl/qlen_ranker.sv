// qlen_ranker: orders candidates by queue length, longest first.
//
// This is the comparator / carry-save adder / priority decoder chain of the
// published priority logic.  Every pair of candidates is compared; candidate j
// beats candidate i when j is valid and its key is larger, or equal with a
// lower index (the tie rule is this design's choice).  The number of wins
// against i, summed as in a carry-save adder, is i's rank (0 = first).  The
// decoder turns ranks into one one-hot vector per rank position.
// Purely combinational.
module qlen_ranker #(
  parameter int unsigned N  = 8,
  parameter int unsigned KW = 12,
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         valid,
  input  logic [N-1:0][KW-1:0] key,
  output logic [N-1:0][RW-1:0] rank,   // rank of each candidate (meaningful if valid)
  output logic [N-1:0][N-1:0]  order,  // order[r]: one-hot of the candidate at rank r
  output logic [RW-1:0]        first,  // index of the rank-0 candidate
  output logic                 any     // at least one valid candidate
);
  logic [N-1:0][N-1:0] beats;  // beats[i][j]: j is ahead of i

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        beats[i][j] = (j != i) && valid[j] &&
                      ((key[j] > key[i]) || ((key[j] == key[i]) && (j < i)));
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++)
        rank[i] = rank[i] + RW'(beats[i][j]);
    end
  end

  always_comb begin
    order = '0;
    first = '0;
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < N; r++)
        if (valid[i] && (32'(rank[i]) == r)) order[r][i] = 1'b1;
      if (valid[i] && (rank[i] == '0)) first = RW'(i);
    end
    any = |valid;
  end
endmodule
