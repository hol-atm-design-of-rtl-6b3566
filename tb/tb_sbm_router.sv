// tb_sbm_router: random routing settings and words; each crossbar output is
// compared with the word picked by index in the testbench.
module tb_sbm_router;
  logic [7:0][15:0] in_word, sbm_wdata, sbm_rdata, uc_word, mc_word;
  logic [7:0][2:0]  port_of_sbm, uc_sbm, mc_sbm;
  int checks = 0, failures = 0;

  sbm_router #(.NPORT(8), .NSBM(8), .W(16)) dut (.*);

  initial begin
    for (int it = 0; it < 1000; it++) begin
      for (int i = 0; i < 8; i++) begin
        in_word[i] = 16'($urandom); sbm_rdata[i] = 16'($urandom);
        port_of_sbm[i] = 3'($urandom); uc_sbm[i] = 3'($urandom); mc_sbm[i] = 3'($urandom);
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        checks += 3;
        if (sbm_wdata[i] != in_word[port_of_sbm[i]]) failures++;
        if (uc_word[i] != sbm_rdata[uc_sbm[i]]) failures++;
        if (mc_word[i] != sbm_rdata[mc_sbm[i]]) failures++;
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
