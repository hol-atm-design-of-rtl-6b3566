// tb_mc_dest_reg: random writes to the destination registers against a copy
// in the testbench; all registers are compared after every clock.
module tb_mc_dest_reg;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [1:0] wmci;
  logic [7:0] wports;
  logic [3:0][7:0] dest;
  logic [7:0] shadow [4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mc_dest_reg #(.NMCI(4), .NPORT(8)) dut (.*);

  initial begin
    we = 0; wmci = '0; wports = '0;
    for (int m = 0; m < 4; m++) shadow[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (dest[m] != shadow[m]) begin failures++; $display("FAIL dest[%0d]", m); end
      end
      we = ($urandom_range(1) == 1); wmci = 2'($urandom); wports = 8'($urandom);
      if (we) shadow[wmci] = wports;
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
