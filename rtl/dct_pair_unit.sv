// dct_pair_unit: one input block of the bit-serial 8-point DCT (blocks A, B,
// C and D of the dataflow).
//
// Two serial inputs x_i and x_(7-i) enter a bit-serial adder and a bit-serial
// subtractor (the input butterfly of the Chen DCT).  The sum drives one
// field of constants holding a, c and f, the difference a field holding b, d,
// e and g.  Each field shares one latch chain among its constants and builds
// common parts once (bs_mcm_field); with the default coefficients the sum
// field shares the digits common to a and c, the difference field those
// common to d and e.  The structure follows the design; the coefficient
// values are round(cos(k*pi/16) * 2^8), this design's choice of precision.
//
// Timing: every product bit appears in the same clock as the input bits of
// the same weight.  Inputs are LSB first, sign extended over the frame;
// first marks bit 0 of a frame.  xi - xj is formed (xj is the inverted input).
module dct_pair_unit #(
  parameter int unsigned CW = 8,                  // coefficient width
  parameter int unsigned KA = 181,   // round(256*cos(4pi/16))
  parameter int unsigned KB = 251,   // round(256*cos(pi/16))
  parameter int unsigned KC = 237,   // round(256*cos(2pi/16))
  parameter int unsigned KD = 213,   // round(256*cos(3pi/16))
  parameter int unsigned KE = 142,   // round(256*cos(5pi/16))
  parameter int unsigned KF = 98,    // round(256*cos(6pi/16))
  parameter int unsigned KG = 50    // round(256*cos(7pi/16))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               first,
  input  logic               xi,
  input  logic               xj,
  output bs_pkg::even_prod_t pe,   // (xi + xj) * {a, c, f}
  output bs_pkg::odd_prod_t  po    // (xi - xj) * {b, d, e, g}
);

  localparam logic [2:0][CW-1:0] K_EVEN = {CW'(KF), CW'(KC), CW'(KA)};
  localparam logic [3:0][CW-1:0] K_ODD  = {CW'(KG), CW'(KE), CW'(KD), CW'(KB)};

  logic sum_bit;
  logic diff_bit;
  logic [2:0] p_even;
  logic [3:0] p_odd;

  bs_addsub #(.SUB(1'b0)) u_add (
    .clk(clk), .rst_n(rst_n), .first(first), .a(xi), .b(xj), .s(sum_bit)
  );

  bs_addsub #(.SUB(1'b1)) u_sub (
    .clk(clk), .rst_n(rst_n), .first(first), .a(xi), .b(xj), .s(diff_bit)
  );

  bs_mcm_field #(.NK(3), .CW(CW), .K(K_EVEN), .USE_SD(1'b1)) u_even (
    .clk(clk), .rst_n(rst_n), .first(first), .x(sum_bit), .p(p_even)
  );

  bs_mcm_field #(.NK(4), .CW(CW), .K(K_ODD), .USE_SD(1'b1)) u_odd (
    .clk(clk), .rst_n(rst_n), .first(first), .x(diff_bit), .p(p_odd)
  );

  assign pe = '{a: p_even[0], c: p_even[1], f: p_even[2]};
  assign po = '{b: p_odd[0], d: p_odd[1], e: p_odd[2], g: p_odd[3]};

endmodule
