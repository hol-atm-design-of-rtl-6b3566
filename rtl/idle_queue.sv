// idle_queue: idle address queue of one SBM, with its IdleQ counter.
//
// Supplies the cell address for the next write into the SBM (pop) and takes
// back the address of a cell that has left the switch (push).  After reset no
// address has been used yet; rather than spend 128 cycles loading every address
// into the FIFO, untouched addresses are handed out from a counter first and
// only returned addresses pass through the FIFO memory (this start-up scheme is
// this design's choice).  `vacant` counts the free cell spaces and feeds the
// SBM write priority.  pop_addr is valid in the same cycle (asynchronous
// memory); pop and push take effect on the rising edge and may coincide.
module idle_queue #(
  parameter int unsigned CELLS = 128,
  localparam int unsigned AW   = $clog2(CELLS),
  localparam int unsigned CW   = $clog2(CELLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pop,
  output logic [AW-1:0] pop_addr,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  output logic [CW-1:0] vacant,
  output logic          empty
);
  logic [AW-1:0] mem [CELLS];
  logic [CW-1:0] fresh;           // addresses 0..fresh-1 have been handed out
  logic [AW-1:0] wp, rp;
  logic [CW-1:0] fcnt;            // addresses waiting in the FIFO
  logic          use_fresh;

  assign use_fresh = (fresh != CW'(CELLS));
  assign pop_addr  = use_fresh ? AW'(fresh) : mem[rp];
  assign vacant    = CW'(CELLS) - fresh + fcnt;
  assign empty     = (vacant == '0);

  always_ff @(posedge clk)
    if (push) mem[wp] <= push_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= '0;
      wp    <= '0;
      rp    <= '0;
      fcnt  <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop && !empty && use_fresh) fresh <= fresh + 1'b1;
      if (pop && !empty && !use_fresh) rp <= rp + 1'b1;
      fcnt <= fcnt + CW'(push) - CW'(pop && !empty && !use_fresh);
    end
  end

  // An address can only come back after it was handed out.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (vacant < CW'(CELLS)));
endmodule
