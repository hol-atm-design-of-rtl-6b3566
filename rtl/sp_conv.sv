// sp_conv: 16-bit serial-to-parallel converter of one input port.
//
// Each switch chip carries one bit of every byte of a port, so a cell arrives
// here as NBITS (53) serial bits, one per clock, starting on the clock where
// `start` is high.  Bit k of the cell slice becomes bit k%16 of word k/16.
// Whenever a word is complete (16 bits, or the last bit of the cell) it is
// presented combinationally with word_valid and its index, in the same clock
// as its last bit, so the parent can write it into its cell buffer on that
// edge.  The unused top bits of the last word are zero.
module sp_conv #(
  parameter int unsigned W     = 16,
  parameter int unsigned NBITS = 53,
  localparam int unsigned CW   = $clog2(NBITS + 1),
  localparam int unsigned IW   = $clog2((NBITS + W - 1) / W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          din,
  output logic          word_valid,
  output logic [IW-1:0] word_idx,
  output logic [W-1:0]  word
);
  logic [CW-1:0]        bitcnt;   // bits taken so far (0 = idle)
  logic [W-1:0]         acc;
  logic [CW-1:0]        cnt;
  logic                 active;
  logic [$clog2(W)-1:0] pos;

  always_comb begin
    cnt        = start ? '0 : bitcnt;
    active     = start || ((bitcnt != '0) && (bitcnt < CW'(NBITS)));
    pos        = cnt[$clog2(W)-1:0];
    word       = start ? W'(din) : (acc | (W'(din) << pos));
    word_idx   = IW'(cnt / CW'(W));
    word_valid = active && ((32'(pos) == W - 1) || (cnt == CW'(NBITS - 1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0;
      acc    <= '0;
    end else if (active) begin
      bitcnt <= cnt + 1'b1;
      acc    <= word_valid ? '0 : word;
    end
  end
endmodule
