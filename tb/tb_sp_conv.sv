// tb_sp_conv: streams random 53-bit cells back to back and assembles the words
// the converter emits; every word must appear on the clock of its last bit,
// with the right index, and equal bits 16*i .. 16*i+15 of the cw (zeros
// beyond bit 52).
module tb_sp_conv;
  localparam int NB = 53;
  logic clk = 0, rst_n = 0;
  logic start, din, word_valid;
  logic [1:0] word_idx;
  logic [15:0] word;
  logic [63:0] cw;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sp_conv #(.W(16), .NBITS(NB)) dut (.*);

  initial begin
    start = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      cw = {$urandom, $urandom};
      cw[63:NB] = '0;
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        start = (b == 0);
        din   = cw[b];
        #1;
        checks++;
        if (word_valid != ((b % 16 == 15) || (b == NB - 1))) begin
          failures++; $display("FAIL word_valid at bit %0d", b);
        end
        if (word_valid) begin
          checks++;
          if (word_idx != 2'(b / 16) || word != cw[16*(b/16) +: 16]) begin
            failures++; $display("FAIL word %0d = %h exp %h", word_idx, word, cw[16*(b/16) +: 16]);
          end
        end
      end
      // sometimes leave a gap between cells
      if (c % 4 == 3) begin
        @(negedge clk); start = 0; din = 1; #1;
        checks++;
        if (word_valid) begin failures++; $display("FAIL word while idle"); end
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
