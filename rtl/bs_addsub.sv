// bs_addsub: clocked bit-serial adder or subtractor.
//
// A one-bit full adder without memory plus a one-bit carry latch.  Operands
// arrive LSB first, one bit per clock; the sum bit s is combinational, so bit
// i of the result appears in the same cycle as bit i of the operands, and the
// carry out is latched for the next bit.
//
// The adder (SUB = 0) starts every word with an empty carry latch (0).  The
// subtractor (SUB = 1) uses the same cell with operand b inverted and the
// carry latch set to 1, so s = a + ~b + 1 = a - b.  Both behaviours are the
// ones the design describes; how a word start is signalled is this design's
// own choice: the pulse `first` marks bit 0 of a word, and in that cycle the
// latch contents are replaced by the start value, so words may follow each
// other without idle cycles.  rst_n (asynchronous, active low) loads the
// start value as well.
//
// Ports: a, b operand bits; s result bit; first word-start pulse.
module bs_addsub #(
  parameter bit SUB = 1'b0   // 0: a + b, 1: a - b
) (
  input  logic clk,
  input  logic rst_n,
  input  logic first,
  input  logic a,
  input  logic b,
  output logic s
);

  logic carry_q;   // the internal latch
  logic b_eff;
  logic carry_in;
  logic carry_out;

  assign b_eff     = SUB ? ~b : b;
  assign carry_in  = first ? SUB : carry_q;
  assign s         = a ^ b_eff ^ carry_in;
  assign carry_out = (a & b_eff) | (carry_in & (a ^ b_eff));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_q <= SUB;
    else        carry_q <= carry_out;
  end

endmodule
