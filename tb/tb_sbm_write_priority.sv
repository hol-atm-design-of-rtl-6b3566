// tb_sbm_write_priority: random requests and vacancy counts.  The testbench
// sorts the SBMs with space by vacancy (most first, lower number on ties) and
// gives the k-th requesting port the k-th SBM; grants, SBM numbers and the
// reverse map must match, and no SBM may be given twice.
module tb_sbm_write_priority;
  logic [7:0]       req, grant, sbm_we;
  logic [7:0][7:0]  vacant;
  logic [7:0][2:0]  sbm_of_port, port_of_sbm;
  int checks = 0, failures = 0;

  sbm_write_priority #(.NPORT(8), .NSBM(8), .CW(8)) dut (.*);

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int sorted [$];
      int k;
      sorted.delete();
      req = 8'($urandom);
      for (int s = 0; s < 8; s++) vacant[s] = ($urandom_range(3) == 0) ? 8'd0 : 8'($urandom_range(128));
      #1;
      // selection sort of SBMs with space
      begin
        bit used [8];
        for (int s = 0; s < 8; s++) used[s] = 0;
        forever begin
          int best;
          best = -1;
          for (int s = 0; s < 8; s++)
            if (!used[s] && vacant[s] != 0 && (best < 0 || vacant[s] > vacant[best])) best = s;
          if (best < 0) break;
          used[best] = 1;
          sorted.push_back(best);
        end
      end
      k = 0;
      for (int p = 0; p < 8; p++) begin
        bit eg;
        eg = req[p] && (k < sorted.size());
        checks++;
        if (grant[p] != eg) begin failures++; $display("FAIL grant[%0d]", p); end
        if (eg) begin
          checks += 2;
          if (int'(sbm_of_port[p]) != sorted[k]) begin failures++; $display("FAIL sbm_of_port[%0d]=%0d exp %0d req %b vac %p", p, sbm_of_port[p], sorted[k], req, vacant); end
          if (!sbm_we[sorted[k]] || int'(port_of_sbm[sorted[k]]) != p) failures++;
          k++;
        end
      end
      checks++;
      if ($countones(sbm_we) != k) failures++;
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
