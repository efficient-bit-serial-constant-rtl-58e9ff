// dct1d_bitserial: the whole 1-D DCT of an 8x8 block, eight single bit-serial
// DCTs side by side, one per row (or column) of the block.
//
// All eight transforms run in lock step from one frame-start pulse, so a
// complete 8x8 block is transformed every FRAME_BITS (20) clocks, with
// 64 serial input and 64 serial output pins.  Row r uses x[r][7:0] and
// y[r][7:0]; see dct8_bitserial for the number format and the timing.  The
// count of eight follows the design; the second (column) pass of a 2-D DCT
// and the transposition between the passes are not part of it.
module dct1d_bitserial #(
  parameter int unsigned N_ROWS = 8   // single DCTs working in parallel
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   first,
  input  logic [N_ROWS-1:0][7:0] x,
  output logic [N_ROWS-1:0][7:0] y
);

  for (genvar r = 0; r < int'(N_ROWS); r++) begin : g_row
    dct8_bitserial u_dct (
      .clk(clk), .rst_n(rst_n), .first(first), .x(x[r]), .y(y[r])
    );
  end

endmodule
