// bs_mcm_field: a field of constants, the bit-serial multiple constant
// multiplier.  One input word is multiplied by NK constants at once.
//
// How it works.  All constants share one chain of latches (bs_latch_chain);
// tap k carries the input times 2^k.  Each constant is recoded (runs of three
// or more 1s become +1 above and -1 below the run, USE_SD = 1) into positive
// and negative digits.  Then common parts are pulled out by iterative
// pairwise matching: among all current terms, the pair that shares the most
// digits (same position, same sign; at least two, since a shared single tap
// saves nothing) gives up those digits to a new shared term, which is built
// once and feeds both.  For the constants 1001111 and 1100111 the recoded
// forms 1010000-1 and 1101000-1 share 1000000-1; the remainders are 0010000
// and 0101000.  This is the procedure the design describes; the tie-break
// (first pair in index order) and the limit of one shared term per term are
// this design's own choices.
//
// Every term, output or shared, is then one bs_const_term: a chain of
// bit-serial adders/subtractors that starts with its shared term if it has
// one, otherwise with its lowest positive tap, and adds or subtracts its
// remaining taps.  The plan is computed at elaboration by a constant
// function; nothing of it exists at run time.
//
// Timing: products leave LSB first in the same clocks as the input enters.
// Interface: x serial input, first marks bit 0 of a word, p[i] is the serial
// product x * K[i].  Words must be sign extended (or zero padded) over a
// frame long enough for the largest product; results are exact modulo
// 2^frame.
module bs_mcm_field #(
  parameter int unsigned NK     = 2,                    // number of constants
  parameter int unsigned CW     = 7,                    // bits per constant
  parameter logic [NK-1:0][CW-1:0] K = {7'b1100111, 7'b1001111},  // K[0] = 1001111, K[1] = 1100111
  parameter bit          USE_SD = 1'b1,                 // recode runs of 1s
  parameter int unsigned NS     = (NK > 1) ? NK - 1 : 0 // most shared terms
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          first,
  input  logic          x,
  output logic [NK-1:0] p
);

  localparam int unsigned ND = CW + 1;     // digit positions after recoding
  localparam int unsigned NT = NK + NS;    // output terms, then shared terms

  typedef struct packed {
    logic             has_ref;   // the term starts from a shared term
    logic [7:0]       ref_idx;   // index of that shared term
    logic [ND-1:0]    pos;       // taps added
    logic [ND-1:0]    neg;       // taps subtracted
  } term_t;

  typedef term_t [NT-1:0] plan_t;

  function automatic int unsigned common_count(input term_t ta, input term_t tb);
    int unsigned c;
    c = 0;
    for (int i = 0; i < int'(ND); i++) begin
      if (ta.pos[i] && tb.pos[i]) c++;
      if (ta.neg[i] && tb.neg[i]) c++;
    end
    return c;
  endfunction

  function automatic plan_t make_plan();
    plan_t        pl;
    int unsigned  used;
    int unsigned  best, c;
    int           bi, bj;
    logic [ND-1:0] cp, cn;
    pl = '0;
    for (int i = 0; i < int'(NK); i++) begin
      pl[i].pos = ND'(bs_pkg::recode_pos(longint'(K[i]), USE_SD));
      pl[i].neg = ND'(bs_pkg::recode_neg(longint'(K[i]), USE_SD));
    end
    used = NK;
    for (int n = 0; n < int'(NS); n++) begin
      best = 1;
      bi   = -1;
      bj   = -1;
      for (int i = 0; i < int'(used); i++) begin
        for (int j = i + 1; j < int'(used); j++) begin
          if (pl[i].has_ref == pl[j].has_ref &&
              (!pl[i].has_ref || pl[i].ref_idx == pl[j].ref_idx)) begin
            c = common_count(pl[i], pl[j]);
            if (c > best) begin
              best = c;
              bi   = i;
              bj   = j;
            end
          end
        end
      end
      if (bi >= 0) begin
        cp = pl[bi].pos & pl[bj].pos;
        cn = pl[bi].neg & pl[bj].neg;
        pl[used].pos     = cp;
        pl[used].neg     = cn;
        pl[used].has_ref = pl[bi].has_ref;
        pl[used].ref_idx = pl[bi].ref_idx;
        pl[bi].pos      &= ~cp;
        pl[bi].neg      &= ~cn;
        pl[bj].pos      &= ~cp;
        pl[bj].neg      &= ~cn;
        pl[bi].has_ref   = 1'b1;
        pl[bi].ref_idx   = 8'(used);
        pl[bj].has_ref   = 1'b1;
        pl[bj].ref_idx   = 8'(used);
        used++;
      end
    end
    return pl;
  endfunction

  function automatic int first_pos(input logic [ND-1:0] m);
    for (int i = 0; i < int'(ND); i++) if (m[i]) return i;
    return -1;
  endfunction

  localparam plan_t PLAN = make_plan();

  // Number of adders and subtractors the plan builds (one per nonzero digit
  // or shared-term input beyond the first of each term).
  function automatic int unsigned count_ops();
    int unsigned n, k;
    n = 0;
    for (int t = 0; t < int'(NT); t++) begin
      k = 0;
      for (int i = 0; i < int'(ND); i++) if (PLAN[t].pos[i] || PLAN[t].neg[i]) k++;
      if (PLAN[t].has_ref) n += k;
      else if (k > 0) n += (first_pos(PLAN[t].pos) >= 0) ? k - 1 : k;
    end
    return n;
  endfunction

  localparam int unsigned N_OPS = count_ops();

  logic [ND-1:0] tap;
  logic          term_out [NT];

  bs_latch_chain #(.DEPTH(ND - 1)) u_chain (
    .clk(clk), .rst_n(rst_n), .first(first), .d(x), .tap(tap)
  );

  for (genvar t = 0; t < int'(NT); t++) begin : g_term
    localparam term_t TM = PLAN[t];
    localparam int    RI = int'(TM.ref_idx);
    logic ref_bit;

    if (TM.has_ref) begin : g_ref
      assign ref_bit = term_out[RI];
    end else begin : g_noref
      assign ref_bit = 1'b0;
    end

    bs_const_term #(.ND(ND), .POS(TM.pos), .NEG(TM.neg), .USE_REF(TM.has_ref)) u_term (
      .clk(clk), .rst_n(rst_n), .first(first), .tap(tap), .ref_in(ref_bit), .p(term_out[t])
    );
  end

  for (genvar i = 0; i < int'(NK); i++) begin : g_out
    assign p[i] = term_out[i];
  end

endmodule
