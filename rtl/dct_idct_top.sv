// dct_idct_top: the bit-serial 1-D DCT and 1-D inverse DCT of 8x8 blocks,
// side by side.
//
// The forward transform (dct1d_bitserial, eight single DCTs) and the
// inverse transform (idct1d_bitserial, eight single inverse DCTs) are two
// independent units, as in an encoder and a decoder; each has its own frame
// pulse and its own serial ports.  Nothing connects them inside: a user who
// wants a round trip wires dct_y to idct_y and drives both frame pulses
// together with a frame long enough for the inverse (32 clocks for 8-bit
// samples).
//
// Ports: dct_first, dct_x[r][n] (sample n of row r), dct_y[r][k] (Y_k of
// row r); idct_first, idct_y[r][k], idct_x[r][n].  All serial, LSB first,
// zero latency; see dct8_bitserial and idct8_bitserial.
module dct_idct_top #(
  parameter int unsigned N_ROWS = 8   // rows per block, one single transform each
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // forward 1-D DCT
  input  logic                   dct_first,
  input  logic [N_ROWS-1:0][7:0] dct_x,
  output logic [N_ROWS-1:0][7:0] dct_y,
  // inverse 1-D DCT
  input  logic                   idct_first,
  input  logic [N_ROWS-1:0][7:0] idct_y,
  output logic [N_ROWS-1:0][7:0] idct_x
);

  dct1d_bitserial #(.N_ROWS(N_ROWS)) u_dct (
    .clk(clk), .rst_n(rst_n), .first(dct_first), .x(dct_x), .y(dct_y)
  );

  idct1d_bitserial #(.N_ROWS(N_ROWS)) u_idct (
    .clk(clk), .rst_n(rst_n), .first(idct_first), .y(idct_y), .x(idct_x)
  );

endmodule
