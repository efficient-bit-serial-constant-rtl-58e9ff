// idct8_bitserial: one bit-serial 8-point inverse DCT, built from the same
// cells as the forward transform.
//
// It computes the transpose of the forward transform's matrix:
//   x_n = sum_k Y_k * C(k,n),  C(k,n) = round(256*cos((2n+1)k*pi/16)), C(0,n) = 181,
// so that feeding it the forward transform's results returns about 2^18 times
// the original samples (the two matrices multiply to 2^18 times the identity
// up to coefficient rounding).
//
// Dataflow (Chen factorisation, transposed; all multiplications first):
//   fields   Y0*{a}, Y4*{a}, Y2*{c,f}, Y6*{c,f}, Y1,Y3,Y5,Y7 * {b,d,e,g}
//   even     t0 = aY0 + aY4, t1 = aY0 - aY4, u = cY2 + fY6, v = fY2 - cY6
//            E0 = t0 + u, E3 = t0 - u, E1 = t1 + v, E2 = t1 - v
//   odd      O0 = (bY1 + dY3) + (eY5 + gY7)   O1 = (dY1 - gY3) - (bY5 + eY7)
//            O2 = (eY1 - bY3) + (gY5 + dY7)   O3 = (gY1 - eY3) + (dY5 - bY7)
//   output   x_n = E_n + O_n, x_(7-n) = E_n - O_n     (n = 0..3)
// The inverse transform is only said to be possible with this architecture
// at a similar cost; this dataflow is this design's own, chosen to mirror
// the forward one (fields first, then two add/subtract levels and a final
// butterfly).
//
// Interface and timing as dct8_bitserial: y[k] serial input Y_k, x[n]
// serial output x_n, LSB first, sign extended over a frame marked by first,
// zero latency.  With 19-bit inputs the results need 31 bits, so the frame
// must be at least 31 clocks (32 is used in the tests).
module idct8_bitserial #(
  parameter int unsigned CW = 8,     // coefficient width
  parameter int unsigned KA = 181,   // round(256*cos(4pi/16))
  parameter int unsigned KB = 251,   // round(256*cos(pi/16))
  parameter int unsigned KC = 237,   // round(256*cos(2pi/16))
  parameter int unsigned KD = 213,   // round(256*cos(3pi/16))
  parameter int unsigned KE = 142,   // round(256*cos(5pi/16))
  parameter int unsigned KF = 98,    // round(256*cos(6pi/16))
  parameter int unsigned KG = 50     // round(256*cos(7pi/16))
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       first,
  input  logic [7:0] y,
  output logic [7:0] x
);

  localparam logic [0:0][CW-1:0] K_A  = {CW'(KA)};
  localparam logic [1:0][CW-1:0] K_CF = {CW'(KF), CW'(KC)};
  localparam logic [3:0][CW-1:0] K_BG = {CW'(KG), CW'(KE), CW'(KD), CW'(KB)};

  logic [0:0] p0, p4;      // a*Y0, a*Y4
  logic [1:0] p2, p6;      // {f,c} * Y2, Y6
  bs_pkg::odd_prod_t po [4];   // Y1, Y3, Y5, Y7 times b, d, e, g
  logic [3:0] p_odd [4];

  bs_mcm_field #(.NK(1), .CW(CW), .K(K_A)) u_f0 (
    .clk(clk), .rst_n(rst_n), .first(first), .x(y[0]), .p(p0));
  bs_mcm_field #(.NK(1), .CW(CW), .K(K_A)) u_f4 (
    .clk(clk), .rst_n(rst_n), .first(first), .x(y[4]), .p(p4));
  bs_mcm_field #(.NK(2), .CW(CW), .K(K_CF)) u_f2 (
    .clk(clk), .rst_n(rst_n), .first(first), .x(y[2]), .p(p2));
  bs_mcm_field #(.NK(2), .CW(CW), .K(K_CF)) u_f6 (
    .clk(clk), .rst_n(rst_n), .first(first), .x(y[6]), .p(p6));

  for (genvar i = 0; i < 4; i++) begin : g_odd
    bs_mcm_field #(.NK(4), .CW(CW), .K(K_BG)) u_f (
      .clk(clk), .rst_n(rst_n), .first(first), .x(y[2*i+1]), .p(p_odd[i]));
    assign po[i] = '{b: p_odd[i][0], d: p_odd[i][1], e: p_odd[i][2], g: p_odd[i][3]};
  end

  // Even part.
  logic t0, t1, u, v;
  logic [3:0] e_n;
  bs_addsub #(.SUB(1'b0)) u_t0 (.clk, .rst_n, .first, .a(p0[0]), .b(p4[0]), .s(t0));
  bs_addsub #(.SUB(1'b1)) u_t1 (.clk, .rst_n, .first, .a(p0[0]), .b(p4[0]), .s(t1));
  bs_addsub #(.SUB(1'b0)) u_u  (.clk, .rst_n, .first, .a(p2[0]), .b(p6[1]), .s(u));   // cY2 + fY6
  bs_addsub #(.SUB(1'b1)) u_v  (.clk, .rst_n, .first, .a(p2[1]), .b(p6[0]), .s(v));   // fY2 - cY6
  bs_addsub #(.SUB(1'b0)) u_e0 (.clk, .rst_n, .first, .a(t0), .b(u), .s(e_n[0]));
  bs_addsub #(.SUB(1'b1)) u_e3 (.clk, .rst_n, .first, .a(t0), .b(u), .s(e_n[3]));
  bs_addsub #(.SUB(1'b0)) u_e1 (.clk, .rst_n, .first, .a(t1), .b(v), .s(e_n[1]));
  bs_addsub #(.SUB(1'b1)) u_e2 (.clk, .rst_n, .first, .a(t1), .b(v), .s(e_n[2]));

  // Odd part: po[0] = Y1, po[1] = Y3, po[2] = Y5, po[3] = Y7.
  logic [7:0] o1;   // first-level results
  logic [3:0] o_n;
  bs_addsub #(.SUB(1'b0)) u_o1_0 (.clk, .rst_n, .first, .a(po[0].b), .b(po[1].d), .s(o1[0]));
  bs_addsub #(.SUB(1'b0)) u_o1_1 (.clk, .rst_n, .first, .a(po[2].e), .b(po[3].g), .s(o1[1]));
  bs_addsub #(.SUB(1'b0)) u_o0   (.clk, .rst_n, .first, .a(o1[0]), .b(o1[1]), .s(o_n[0]));
  bs_addsub #(.SUB(1'b1)) u_o1_2 (.clk, .rst_n, .first, .a(po[0].d), .b(po[1].g), .s(o1[2]));
  bs_addsub #(.SUB(1'b0)) u_o1_3 (.clk, .rst_n, .first, .a(po[2].b), .b(po[3].e), .s(o1[3]));
  bs_addsub #(.SUB(1'b1)) u_o1   (.clk, .rst_n, .first, .a(o1[2]), .b(o1[3]), .s(o_n[1]));
  bs_addsub #(.SUB(1'b1)) u_o1_4 (.clk, .rst_n, .first, .a(po[0].e), .b(po[1].b), .s(o1[4]));
  bs_addsub #(.SUB(1'b0)) u_o1_5 (.clk, .rst_n, .first, .a(po[2].g), .b(po[3].d), .s(o1[5]));
  bs_addsub #(.SUB(1'b0)) u_o2   (.clk, .rst_n, .first, .a(o1[4]), .b(o1[5]), .s(o_n[2]));
  bs_addsub #(.SUB(1'b1)) u_o1_6 (.clk, .rst_n, .first, .a(po[0].g), .b(po[1].e), .s(o1[6]));
  bs_addsub #(.SUB(1'b1)) u_o1_7 (.clk, .rst_n, .first, .a(po[2].d), .b(po[3].b), .s(o1[7]));
  bs_addsub #(.SUB(1'b0)) u_o3   (.clk, .rst_n, .first, .a(o1[6]), .b(o1[7]), .s(o_n[3]));

  // Output butterfly.
  for (genvar n = 0; n < 4; n++) begin : g_out
    bs_addsub #(.SUB(1'b0)) u_lo (.clk, .rst_n, .first, .a(e_n[n]), .b(o_n[n]), .s(x[n]));
    bs_addsub #(.SUB(1'b1)) u_hi (.clk, .rst_n, .first, .a(e_n[n]), .b(o_n[n]), .s(x[7-n]));
  end

endmodule
