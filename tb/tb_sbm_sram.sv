// tb_sbm_sram: writes random words to random addresses, keeps a shadow copy in the
// testbench and checks that the asynchronous read returns the last word
// written to each address, in the same cycle the address is applied.
module tb_sbm_sram;
  localparam int DEPTH = 512, W = 16, AW = $clog2(DEPTH);
  logic clk = 0;
  logic we;
  logic [AW-1:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [DEPTH];
  bit           written [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sbm_sram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      addr  = AW'($urandom_range(DEPTH - 1));
      we    = ($urandom_range(1) == 1);
      wdata = W'($urandom);
      #1;
      if (!we && written[addr]) begin
        checks++;
        if (rdata !== shadow[addr]) begin
          failures++; $display("FAIL addr %0d read %h exp %h", addr, rdata, shadow[addr]);
        end
      end
      if (we) begin shadow[addr] = wdata; written[addr] = 1; end
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
