// dct8_bitserial: one bit-serial 8-point 1-D DCT (a "single DCT").
//
// The dataflow is the Chen DCT rearranged so that all multiplications come
// first: four pair units form x_i + x_(7-i) and x_i - x_(7-i) and multiply
// them in fields of constants (a, c, f and b, d, e, g), then dct_combine adds
// the products into the eight outputs.  No multiplier, no counter and no
// word register is used: the whole transform is full adders, their carry
// latches and four short latch chains per pair.
//
// Interface: x[n] is the serial input sample n and y[k] the serial output
// Y_k, LSB first.  A frame of FRAME_BITS clocks carries one sample per input
// (sign extended over the frame) and one result per output; first marks the
// frame's bit 0.  Output bit i leaves in the clock of input bit i (zero
// latency); one transform per FRAME_BITS clocks.
//
// Numbers (this design's choices): 8-bit signed samples, coefficients
// round(cos(k*pi/16) * 256), so Y_k = sum_n x_n * round(256*cos((2n+1)k*pi/16))
// (with 181 = round(256*cos(pi/4)) for all n when k = 0).  |Y_k| < 2^18, so
// a frame of 20 bits holds every result exactly.
module dct8_bitserial #(
  parameter int unsigned CW = 8   // coefficient width
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       first,
  input  logic [7:0] x,
  output logic [7:0] y
);

  bs_pkg::even_prod_t pe [4];
  bs_pkg::odd_prod_t  po [4];

  // Pair i joins x[i] and x[7-i]: A = (x0,x7), B = (x1,x6), C = (x2,x5), D = (x3,x4).
  for (genvar i = 0; i < 4; i++) begin : g_pair
    dct_pair_unit #(.CW(CW)) u_pair (
      .clk(clk), .rst_n(rst_n), .first(first),
      .xi(x[i]), .xj(x[7-i]), .pe(pe[i]), .po(po[i])
    );
  end

  dct_combine u_combine (
    .clk(clk), .rst_n(rst_n), .first(first), .pe(pe), .po(po), .y(y)
  );

endmodule
