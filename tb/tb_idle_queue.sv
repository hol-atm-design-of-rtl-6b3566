// tb_idle_queue: pops and pushes addresses at random.  The testbench keeps the
// set of addresses it holds; every popped address must be free (never handed
// out twice), the vacant count must equal CELLS minus the addresses held, and
// the first CELLS pops after reset must return distinct addresses.
module tb_idle_queue;
  localparam int CELLS = 128;
  logic clk = 0, rst_n = 0;
  logic pop, push, empty;
  logic [6:0] pop_addr, push_addr;
  logic [7:0] vacant;
  bit   held [CELLS];
  int   nheld = 0;
  int   held_list [$];
  int   pa;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  idle_queue #(.CELLS(CELLS)) dut (.*);

  initial begin
    pop = 0; push = 0; push_addr = '0;
    for (int i = 0; i < CELLS; i++) held[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      checks++;
      if (int'(vacant) != CELLS - nheld) begin
        failures++; $display("FAIL vacant %0d exp %0d", vacant, CELLS - nheld);
      end
      checks++;
      if (empty != (nheld == CELLS)) failures++;
      // phase-dependent bias so the queue runs both full and empty
      pop  = (nheld < CELLS) && ($urandom_range(99) < ((it / 700) % 2 ? 30 : 75));
      push = (nheld > 0) && ($urandom_range(99) < ((it / 700) % 2 ? 75 : 30));
      if (push) begin
        int k;
        k = $urandom_range(held_list.size() - 1);
        push_addr = 7'(held_list[k]);
        held_list.delete(k);
      end
      #1;
      pa = int'(pop_addr);
      if (pop) begin
        checks++;
        if (held[pop_addr]) begin failures++; $display("FAIL address %0d handed out twice", pop_addr); end
      end
      @(posedge clk);
      #1;
      if (push) begin held[push_addr] = 0; nheld--; end
      if (pop)  begin held[pa] = 1; nheld++; held_list.push_back(pa); end
      push = 0; pop = 0;
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
