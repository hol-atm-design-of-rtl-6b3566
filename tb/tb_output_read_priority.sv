// tb_output_read_priority: random qualified sets and queue lengths per port;
// the testbench finds the longest qualified MCI (lowest number on ties) and
// compares choice, valid flag and reported length.
module tb_output_read_priority;
  logic [7:0][3:0]       qual;
  logic [7:0][3:0][11:0] qlen_w;
  logic [7:0]            sel_valid;
  logic [7:0][1:0]       sel_mci;
  logic [7:0][11:0]      sel_qlen;
  int checks = 0, failures = 0;

  output_read_priority #(.NMCI(4), .NPORT(8), .KW(12)) dut (.*);

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int o = 0; o < 8; o++) begin
        qual[o] = 4'($urandom);
        for (int m = 0; m < 4; m++) qlen_w[o][m] = 12'($urandom_range(it % 2 ? 4 : 4095));
      end
      #1;
      for (int o = 0; o < 8; o++) begin
        int best;
        best = -1;
        for (int m = 0; m < 4; m++)
          if (qual[o][m] && (best < 0 || qlen_w[o][m] > qlen_w[o][best])) best = m;
        checks++;
        if (sel_valid[o] != (best >= 0)) failures++;
        if (best >= 0) begin
          checks += 2;
          if (int'(sel_mci[o]) != best) begin failures++; $display("FAIL port %0d sel %0d exp %0d", o, sel_mci[o], best); end
          if (sel_qlen[o] != qlen_w[o][best]) failures++;
        end
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
