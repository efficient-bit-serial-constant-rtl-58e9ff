// idct1d_bitserial: the 1-D inverse DCT of an 8x8 block, eight bit-serial
// single inverse DCTs side by side, one per row (or column).
//
// All eight run in lock step from one frame-start pulse.  Row r reads the
// serial coefficients y[r][7:0] and writes the serial samples x[r][7:0];
// see idct8_bitserial for the number format and the frame length.  A 1-D
// inverse transform of this size is said to fit the same device as the
// forward one; its organisation here mirrors dct1d_bitserial.
module idct1d_bitserial #(
  parameter int unsigned N_ROWS = 8   // single inverse DCTs working in parallel
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   first,
  input  logic [N_ROWS-1:0][7:0] y,
  output logic [N_ROWS-1:0][7:0] x
);

  for (genvar r = 0; r < int'(N_ROWS); r++) begin : g_row
    idct8_bitserial u_idct (
      .clk(clk), .rst_n(rst_n), .first(first), .y(y[r]), .x(x[r])
    );
  end

endmodule
