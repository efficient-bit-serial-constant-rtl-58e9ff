// bs_latch_chain: the chain of one-bit latches that shifts an LSB-first
// number one place per clock.
//
// tap[0] is the input itself and tap[k] is the input delayed by k clocks, so
// tap[k] carries the input word multiplied by 2^k.  A constant multiplier
// connects an adder to tap k wherever digit k of its constant is nonzero.
//
// The chain is shared by every constant that multiplies the same input.  So
// that a word's product never sees the tail of the word before it, the taps
// read 0 during the cycles of a word that precede their delay: when `first`
// (bit 0 of a word) is high, all delayed taps read 0 and every latch except
// the first is cleared on the next edge.  This clearing lets signed,
// sign-extended words follow each other back to back; it is this design's
// own addition (with unsigned, zero-padded words it changes nothing).
//
// Ports: d serial input; first word-start pulse; tap[DEPTH:0] delayed copies.
module bs_latch_chain #(
  parameter int unsigned DEPTH = 6   // number of latches (six in the 1001111 example)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,
  input  logic             d,
  output logic [DEPTH:0]   tap
);

  logic [DEPTH:0] q;   // q[0] unused, q[k] is latch k

  assign q[0] = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q[DEPTH:1] <= '0;
    end else begin
      q[1] <= d;
      for (int k = 2; k <= int'(DEPTH); k++) q[k] <= first ? 1'b0 : q[k-1];
    end
  end

  always_comb begin
    tap[0] = d;
    for (int k = 1; k <= int'(DEPTH); k++) tap[k] = first ? 1'b0 : q[k];
  end

endmodule
