// tb_idct8_bitserial: self-checking test of one bit-serial 8-point inverse
// DCT.
//
// Random signed 19-bit coefficients (the range of the forward transform's
// results, plus the extremes) are sent LSB first, sign extended over 32-bit
// frames.  The reference is computed here from the cosine formula:
// x_n = sum_k Y_k * C(k,n), C(k,n) = round(256*cos((2n+1)k*pi/16)) for k > 0,
// C(0,n) = 181.  Every output bit is checked in the clock of the input bits
// of the same weight.
module tb_idct8_bitserial;
  localparam int F = 32;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic [7:0] y = '0;
  logic [7:0] x;
  int checks = 0, failures = 0;
  int coef [8][8];

  always #5 clk = ~clk;

  idct8_bitserial dut (.clk, .rst_n, .first, .y, .x);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input longint ys [8]);
    longint xref [8];
    for (int n = 0; n < 8; n++) begin
      xref[n] = 0;
      for (int k = 0; k < 8; k++) xref[n] += ys[k] * longint'(coef[k][n]);
    end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      for (int k = 0; k < 8; k++) y[k] = ys[k][i];
      #1;
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (x[n] !== xref[n][i]) begin
          failures++;
          $display("FAIL: x%0d bit %0d want %0d", n, i, xref[n]);
        end
      end
    end
  endtask

  initial begin
    longint ys [8];
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        coef[k][n] = (k == 0) ? int'(256.0 * $cos(PI / 4.0))
                              : int'(256.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 8; k++) ys[k] = -262144;
    run_frame(ys);
    for (int k = 0; k < 8; k++) ys[k] = (k % 2 != 0) ? -262144 : 262143;
    run_frame(ys);
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 8; k++) ys[k] = longint'($signed(19'($urandom)));
      run_frame(ys);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
