// tb_dct8_bitserial: self-checking test of one bit-serial 8-point DCT.
//
// Random signed 8-bit samples (and the extremes -128 / 127), sign extended
// over 20-bit frames.  The reference is the DCT sum computed here from the
// cosine formula: Y_k = sum_n x_n * C(k,n), C(k,n) = round(256*cos((2n+1)k*pi/16))
// for k > 0 and C(0,n) = round(256*cos(pi/4)) = 181.  Every output bit is
// checked in the clock of the input bits of the same weight, i.e. with zero
// latency, and one transform is finished every 20 clocks.
module tb_dct8_bitserial;
  localparam int F = 20;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic [7:0] x = '0;
  logic [7:0] y;
  int checks = 0, failures = 0;
  int coef [8][8];

  always #5 clk = ~clk;

  dct8_bitserial dut (.clk, .rst_n, .first, .x, .y);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input longint xs [8]);
    longint yref [8];
    for (int k = 0; k < 8; k++) begin
      yref[k] = 0;
      for (int n = 0; n < 8; n++) yref[k] += xs[n] * longint'(coef[k][n]);
    end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      for (int n = 0; n < 8; n++) x[n] = xs[n][i];
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (y[k] !== yref[k][i]) begin
          failures++;
          $display("FAIL: Y%0d bit %0d want %0d", k, i, yref[k]);
        end
      end
    end
  endtask

  initial begin
    longint xs [8];
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        coef[k][n] = (k == 0) ? int'(256.0 * $cos(PI / 4.0))
                              : int'(256.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8; n++) xs[n] = -128;
    run_frame(xs);
    for (int n = 0; n < 8; n++) xs[n] = (n < 4) ? 127 : -128;
    run_frame(xs);
    for (int n = 0; n < 8; n++) xs[n] = (n % 2 != 0) ? -128 : 127;
    run_frame(xs);
    for (int t = 0; t < 300; t++) begin
      for (int n = 0; n < 8; n++) xs[n] = longint'($signed(8'($urandom)));
      run_frame(xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
