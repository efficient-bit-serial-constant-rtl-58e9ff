// dct_combine: the output network of the bit-serial 8-point DCT.
//
// The four pair units deliver serial products of the input sums s_i and
// differences d_i with the coefficients a..g.  Two levels of bit-serial
// adders and subtractors (22 elements, each one full adder and one carry
// latch) sum them into the eight outputs of the Chen factorisation:
//
//   Y0 = (A.a + D.a) + (B.a + C.a)      Y4 = (A.a + D.a) - (B.a + C.a)
//   Y2 = (A.c + B.f) - (C.f + D.c)      Y6 = (A.f + C.c) - (B.c + D.f)
//   Y1 = (A.b + B.d) + (C.e + D.g)      Y3 = (A.d - B.g) - (C.b + D.e)
//   Y5 = (A.e - B.b) + (C.g + D.d)      Y7 = (A.g + C.d) - (B.e + D.b)
//
// where A..D are the pairs (x0,x7), (x1,x6), (x2,x5), (x3,x4).  The kind of
// every element (add or subtract) and the sharing of the first level by Y0
// and Y4 follow the design's dataflow; which two products meet in each
// first-level element is this design's reading of it.  Y_k here is twice the
// usual DCT coefficient (the factor 1/2 is left out) times 2^(fraction bits).
//
// Timing: purely bit-serial, no latency; first marks bit 0 of a frame.
module dct_combine (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               first,
  input  bs_pkg::even_prod_t pe [4],   // pair units A, B, C, D
  input  bs_pkg::odd_prod_t  po [4],
  output logic [7:0]         y         // serial outputs Y0..Y7
);

  // One bit-serial element per entry: result = op1 (+|-) op2.
  logic [13:0] lvl1;   // first-level results

  // Y0 / Y4
  bs_addsub #(.SUB(1'b0)) u_l1_0  (.clk, .rst_n, .first, .a(pe[0].a), .b(pe[3].a), .s(lvl1[0]));
  bs_addsub #(.SUB(1'b0)) u_l1_1  (.clk, .rst_n, .first, .a(pe[1].a), .b(pe[2].a), .s(lvl1[1]));
  bs_addsub #(.SUB(1'b0)) u_y0    (.clk, .rst_n, .first, .a(lvl1[0]), .b(lvl1[1]), .s(y[0]));
  bs_addsub #(.SUB(1'b1)) u_y4    (.clk, .rst_n, .first, .a(lvl1[0]), .b(lvl1[1]), .s(y[4]));
  // Y2
  bs_addsub #(.SUB(1'b0)) u_l1_2  (.clk, .rst_n, .first, .a(pe[0].c), .b(pe[1].f), .s(lvl1[2]));
  bs_addsub #(.SUB(1'b0)) u_l1_3  (.clk, .rst_n, .first, .a(pe[2].f), .b(pe[3].c), .s(lvl1[3]));
  bs_addsub #(.SUB(1'b1)) u_y2    (.clk, .rst_n, .first, .a(lvl1[2]), .b(lvl1[3]), .s(y[2]));
  // Y6
  bs_addsub #(.SUB(1'b0)) u_l1_4  (.clk, .rst_n, .first, .a(pe[0].f), .b(pe[2].c), .s(lvl1[4]));
  bs_addsub #(.SUB(1'b0)) u_l1_5  (.clk, .rst_n, .first, .a(pe[1].c), .b(pe[3].f), .s(lvl1[5]));
  bs_addsub #(.SUB(1'b1)) u_y6    (.clk, .rst_n, .first, .a(lvl1[4]), .b(lvl1[5]), .s(y[6]));
  // Y1
  bs_addsub #(.SUB(1'b0)) u_l1_6  (.clk, .rst_n, .first, .a(po[0].b), .b(po[1].d), .s(lvl1[6]));
  bs_addsub #(.SUB(1'b0)) u_l1_7  (.clk, .rst_n, .first, .a(po[2].e), .b(po[3].g), .s(lvl1[7]));
  bs_addsub #(.SUB(1'b0)) u_y1    (.clk, .rst_n, .first, .a(lvl1[6]), .b(lvl1[7]), .s(y[1]));
  // Y3
  bs_addsub #(.SUB(1'b1)) u_l1_8  (.clk, .rst_n, .first, .a(po[0].d), .b(po[1].g), .s(lvl1[8]));
  bs_addsub #(.SUB(1'b0)) u_l1_9  (.clk, .rst_n, .first, .a(po[2].b), .b(po[3].e), .s(lvl1[9]));
  bs_addsub #(.SUB(1'b1)) u_y3    (.clk, .rst_n, .first, .a(lvl1[8]), .b(lvl1[9]), .s(y[3]));
  // Y5
  bs_addsub #(.SUB(1'b1)) u_l1_10 (.clk, .rst_n, .first, .a(po[0].e), .b(po[1].b), .s(lvl1[10]));
  bs_addsub #(.SUB(1'b0)) u_l1_11 (.clk, .rst_n, .first, .a(po[2].g), .b(po[3].d), .s(lvl1[11]));
  bs_addsub #(.SUB(1'b0)) u_y5    (.clk, .rst_n, .first, .a(lvl1[10]), .b(lvl1[11]), .s(y[5]));
  // Y7
  bs_addsub #(.SUB(1'b0)) u_l1_12 (.clk, .rst_n, .first, .a(po[0].g), .b(po[2].d), .s(lvl1[12]));
  bs_addsub #(.SUB(1'b0)) u_l1_13 (.clk, .rst_n, .first, .a(po[1].e), .b(po[3].b), .s(lvl1[13]));
  bs_addsub #(.SUB(1'b1)) u_y7    (.clk, .rst_n, .first, .a(lvl1[12]), .b(lvl1[13]), .s(y[7]));

endmodule
