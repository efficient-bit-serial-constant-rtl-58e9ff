// bs_pkg: constants and elaboration-time helpers shared by the bit-serial
// constant-multiplication blocks.
//
// Numbers travel LSB first, one bit per clock, as two's complement words that
// are sign-extended over a frame of a fixed number of clocks.  A one-cycle
// frame-start pulse marks bit 0 of every frame.
//
// The constant recoding follows the runs-of-ones rule of the design: a run of
// three or more adjacent 1s, 0111..1, is replaced by 1000..0 minus 1 at the
// run's lowest position, so that one adder and one subtractor replace the
// run's adders.  Runs of two are left alone (no saving).  Applying the rule
// to 1001111 gives 1010000 and -1, to 1100111 gives 1101000 and -1.
//
// The product line types name the DCT coefficients a..g in the usual naming
// of the Chen factorisation:
//   a = cos(4pi/16), b = cos(pi/16),  c = cos(2pi/16), d = cos(3pi/16),
//   e = cos(5pi/16), f = cos(6pi/16), g = cos(7pi/16).
package bs_pkg;

  // Serial product lines of one input pair (the DCT input blocks): the sum
  // x_i + x_(7-i) times a, c, f and the difference x_i - x_(7-i) times
  // b, d, e, g.
  typedef struct packed {
    logic a;
    logic c;
    logic f;
  } even_prod_t;

  typedef struct packed {
    logic b;
    logic d;
    logic e;
    logic g;
  } odd_prod_t;

  // Largest number of digit positions a recoded constant may use.
  localparam int unsigned MAX_DIGITS = 32;

  typedef logic [MAX_DIGITS-1:0] digit_mask_t;

  // Positive digits of constant k.  With use_sd = 0 this is k itself (one
  // adder per 1); with use_sd = 1 every run of three or more 1s is recoded.
  function automatic digit_mask_t recode_pos(input longint unsigned k, input bit use_sd);
    longint unsigned p;
    int unsigned b, n;
    p = k;
    if (use_sd) begin
      b = 0;
      while (b < MAX_DIGITS - 1) begin
        if (p[b]) begin
          n = 0;
          while ((b + n) < MAX_DIGITS && p[b+n]) n++;
          if (n >= 3) begin
            p = p + (longint'(1) << b);   // clears the run, sets bit b+n
            b = b + n;
          end else begin
            b = b + n;
          end
        end else begin
          b++;
        end
      end
    end
    return digit_mask_t'(p);
  endfunction

  // Negative digits of constant k: the positions where recode_pos removed a run.
  function automatic digit_mask_t recode_neg(input longint unsigned k, input bit use_sd);
    longint unsigned p;
    p = longint'(recode_pos(k, use_sd));
    return digit_mask_t'(p - k);
  endfunction

  // Number of set bits of a digit mask.
  function automatic int unsigned count_digits(input digit_mask_t m);
    int unsigned c;
    c = 0;
    for (int i = 0; i < MAX_DIGITS; i++) c += int'(m[i]);
    return c;
  endfunction

  // Position of the lowest set bit, or -1 when there is none.
  function automatic int lowest_digit(input digit_mask_t m);
    for (int i = 0; i < MAX_DIGITS; i++) if (m[i]) return i;
    return -1;
  endfunction

endpackage
