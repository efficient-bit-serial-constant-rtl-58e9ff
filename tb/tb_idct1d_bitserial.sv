// tb_idct1d_bitserial: self-checking test of the eight-row inverse DCT.
//
// Random 8x8 blocks of signed 19-bit coefficients, 32-bit frames, back to
// back and after idle clocks; every output bit of every row is checked
// against the inverse transform computed here (see tb_idct8_bitserial).
module tb_idct1d_bitserial;
  localparam int F = 32;
  localparam int R = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic [R-1:0][7:0] y = '0;
  logic [R-1:0][7:0] x;
  int checks = 0, failures = 0;
  int coef [8][8];

  always #5 clk = ~clk;

  idct1d_bitserial dut (.clk, .rst_n, .first, .y, .x);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block();
    longint ys [R][8];
    longint xref [R][8];
    for (int r = 0; r < R; r++)
      for (int k = 0; k < 8; k++) ys[r][k] = longint'($signed(19'($urandom)));
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) begin
        xref[r][n] = 0;
        for (int k = 0; k < 8; k++) xref[r][n] += ys[r][k] * longint'(coef[k][n]);
      end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      for (int r = 0; r < R; r++)
        for (int k = 0; k < 8; k++) y[r][k] = ys[r][k][i];
      #1;
      for (int r = 0; r < R; r++)
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (x[r][n] !== xref[r][n][i]) begin
            failures++;
            $display("FAIL: row %0d x%0d bit %0d want %0d", r, n, i, xref[r][n]);
          end
        end
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        coef[k][n] = (k == 0) ? int'(256.0 * $cos(PI / 4.0))
                              : int'(256.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 40; b++) begin
      run_block();
      if (b % 4 == 3) begin
        repeat ($urandom_range(1, 5)) begin
          @(negedge clk);
          first = 1'b0;
          for (int r = 0; r < R; r++) y[r] = 8'($urandom);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
