// bs_const_term: the adders that stand for one constant on a latch chain.
//
// In this architecture a constant is not stored anywhere: it exists only as
// the set of latch-chain taps that are wired to bit-serial adders.  Tap k of
// the chain carries the input word times 2^k.  For every positive digit of
// the (recoded) constant the term adds tap k, for every negative digit it
// subtracts it, in one linear chain of bs_addsub elements, so the product
// leaves LSB first in the same clocks as the input enters.
//
// The chain starts with the shared input ref_in when USE_REF = 1 (a common
// part built once for several constants), otherwise with the lowest
// positive tap, or with 0 when there is none; the remaining taps are then
// added or subtracted from the lowest position up.  For 1001111 in plain
// form (POS = 1001111) this gives the adders tap0+tap1, +tap2, +tap3, +tap6;
// recoded (POS = 1010000, NEG = 0000001) it gives tap4-tap0, then +tap6.
// The element order is this design's rule; it reproduces both examples of
// the design.  bs_pkg::recode_pos / recode_neg give POS and NEG for a
// constant.
//
// Interface: tap[ND-1:0] from a bs_latch_chain; ref_in serial input of a
// shared term (unused when USE_REF = 0); first marks bit 0 of a word;
// p serial result.  Exact modulo 2^frame.
module bs_const_term #(
  parameter int unsigned    ND      = 7,             // tap positions
  parameter logic [ND-1:0]  POS     = 7'b1010000,    // taps added
  parameter logic [ND-1:0]  NEG     = 7'b0000001,    // taps subtracted
  parameter bit             USE_REF = 1'b0           // start from ref_in
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          first,
  input  logic [ND-1:0] tap,
  input  logic          ref_in,
  output logic          p
);

  function automatic int lowest(input logic [ND-1:0] m);
    for (int i = 0; i < int'(ND); i++) if (m[i]) return i;
    return -1;
  endfunction

  localparam int START = USE_REF ? -1 : lowest(POS);

  logic [ND:0] acc;   // acc[i+1]: running value after digit position i

  if (USE_REF) begin : g_from_ref
    assign acc[0] = ref_in;
  end else if (START >= 0) begin : g_from_tap
    assign acc[0] = tap[START];
  end else begin : g_from_zero
    assign acc[0] = 1'b0;
  end

  for (genvar i = 0; i < int'(ND); i++) begin : g_digit
    if ((POS[i] || NEG[i]) && i != START) begin : g_op
      bs_addsub #(.SUB(NEG[i])) u_op (
        .clk(clk), .rst_n(rst_n), .first(first),
        .a(acc[i]), .b(tap[i]), .s(acc[i+1])
      );
    end else begin : g_pass
      assign acc[i+1] = acc[i];
    end
  end

  assign p = acc[ND];

endmodule
