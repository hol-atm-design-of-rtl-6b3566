// tb_mc_qlen_calc: random pointers, destinations and weights; every queue
// length (write pointer minus read pointer, modulo the wrap) shifted by its
// weight and every qualification flag is recomputed and compared.
module tb_mc_qlen_calc;
  logic [3:0][8:0]       wp;
  logic [3:0][7:0][8:0]  rp;
  logic [3:0][7:0]       dest;
  logic [3:0][1:0]       weight;
  logic [7:0][3:0]       qual;
  logic [7:0][3:0][11:0] qlen_w;
  int checks = 0, failures = 0;

  mc_qlen_calc #(.NMCI(4), .NPORT(8), .DEPTH(256), .KW(12)) dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int m = 0; m < 4; m++) begin
        wp[m] = 9'($urandom); dest[m] = 8'($urandom); weight[m] = 2'($urandom);
        for (int o = 0; o < 8; o++)
          rp[m][o] = ($urandom_range(3) == 0) ? wp[m] : 9'(int'(wp[m]) - $urandom_range(256));
      end
      #1;
      for (int o = 0; o < 8; o++)
        for (int m = 0; m < 4; m++) begin
          int q;
          q = (int'(wp[m]) - int'(rp[m][o]) + 512) % 512;
          checks += 2;
          if (int'(qlen_w[o][m]) != (q << weight[m])) begin
            failures++; $display("FAIL qlen_w[%0d][%0d]=%0d exp %0d", o, m, qlen_w[o][m], q << weight[m]);
          end
          if (qual[o][m] != (dest[m][o] && q != 0)) failures++;
        end
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
