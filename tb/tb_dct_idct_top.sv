// tb_dct_idct_top: end-to-end test of the top at its default size: eight
// forward and eight inverse bit-serial DCTs.
//
// 1. Round trip: random 8x8 blocks of signed 8-bit samples go through the
//    forward transform, whose serial outputs are wired straight into the
//    inverse transform (32-bit frames, one pulse for both).  Every forward
//    output bit is checked against Y = M x and every inverse output bit
//    against M^T Y, both computed here from the cosine formula.  The
//    inverse results divided by 2^18 (rounded) must also give back the
//    samples within +-1 (coefficient rounding is the only error).
// 2. Independent use: the inverse unit is then run on random coefficients
//    with its own frame pulse while the forward unit idles with other
//    frames, so the two units do not share timing.
// Mechanisms counted (a failure for any that never happens): blocks back to
// back, blocks after idle clocks, blocks after a reset, negative and large
// results, exact round trips and round trips off by one.
module tb_dct_idct_top;
  localparam int F = 32;
  localparam int R = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dct_first = 1'b0, idct_first = 1'b0;
  logic [R-1:0][7:0] dct_x = '0, dct_y, idct_y, idct_x;
  logic [R-1:0][7:0] idct_y_tb = '0;
  logic loop_back = 1'b1;
  int checks = 0, failures = 0;
  int coef [8][8];
  longint cycle = 0;

  int n_back_to_back = 0, n_after_idle = 0, n_after_reset = 0;
  int n_negative = 0, n_large = 0, n_exact = 0, n_off_by_one = 0, n_separate = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  assign idct_y = loop_back ? dct_y : idct_y_tb;

  dct_idct_top dut (
    .clk, .rst_n,
    .dct_first, .dct_x, .dct_y,
    .idct_first, .idct_y, .idct_x
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic round_trip();
    longint xs [R][8];
    longint yref [R][8];
    longint zref [R][8];
    longint rec;
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) xs[r][n] = longint'($signed(8'($urandom)));
    if (n_back_to_back == 0)
      for (int n = 0; n < 8; n++) xs[0][n] = (n % 2 != 0) ? -128 : 127;
    for (int r = 0; r < R; r++) begin
      for (int k = 0; k < 8; k++) begin
        yref[r][k] = 0;
        for (int n = 0; n < 8; n++) yref[r][k] += xs[r][n] * longint'(coef[k][n]);
        if (yref[r][k] < 0) n_negative++;
        if (yref[r][k] >= 65536 || yref[r][k] < -65536) n_large++;
      end
      for (int n = 0; n < 8; n++) begin
        zref[r][n] = 0;
        for (int k = 0; k < 8; k++) zref[r][n] += yref[r][k] * longint'(coef[k][n]);
        rec = (zref[r][n] + 131072) >>> 18;
        check(rec >= xs[r][n] - 1 && rec <= xs[r][n] + 1,
              $sformatf("round trip row %0d x%0d: %0d -> %0d", r, n, xs[r][n], rec));
        if (rec == xs[r][n]) n_exact++;
        else n_off_by_one++;
      end
    end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      dct_first = (i == 0);
      idct_first = (i == 0);
      for (int r = 0; r < R; r++)
        for (int n = 0; n < 8; n++) dct_x[r][n] = xs[r][n][i];
      #1;
      for (int r = 0; r < R; r++)
        for (int k = 0; k < 8; k++) begin
          check(dct_y[r][k] === yref[r][k][i], $sformatf("dct row %0d Y%0d bit %0d", r, k, i));
          check(idct_x[r][k] === zref[r][k][i], $sformatf("idct row %0d x%0d bit %0d", r, k, i));
        end
    end
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      dct_first = 1'b0;
      idct_first = 1'b0;
      for (int r = 0; r < R; r++) dct_x[r] = 8'($urandom);
    end
  endtask

  // Inverse alone on random coefficients; the forward unit gets frames of
  // its own that start 7 clocks later.
  task automatic separate_block();
    longint ys [R][8];
    longint zref [R][8];
    loop_back = 1'b0;
    for (int r = 0; r < R; r++)
      for (int k = 0; k < 8; k++) ys[r][k] = longint'($signed(19'($urandom)));
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) begin
        zref[r][n] = 0;
        for (int k = 0; k < 8; k++) zref[r][n] += ys[r][k] * longint'(coef[k][n]);
      end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      idct_first = (i == 0);
      dct_first = (i == 7);
      for (int r = 0; r < R; r++) begin
        dct_x[r] = 8'($urandom);
        for (int k = 0; k < 8; k++) idct_y_tb[r][k] = ys[r][k][i];
      end
      #1;
      for (int r = 0; r < R; r++)
        for (int n = 0; n < 8; n++)
          check(idct_x[r][n] === zref[r][n][i], $sformatf("separate idct row %0d x%0d bit %0d", r, n, i));
    end
    n_separate++;
    loop_back = 1'b1;
  endtask

  initial begin
    longint t0;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        coef[k][n] = (k == 0) ? int'(256.0 * $cos(PI / 4.0))
                              : int'(256.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    round_trip();
    n_after_reset++;
    t0 = cycle;
    for (int b = 0; b < 20; b++) begin
      round_trip();
      n_back_to_back++;
    end
    check(cycle - t0 == longint'(20 * F), "20 back-to-back blocks take 20 frames");
    for (int b = 0; b < 10; b++) begin
      idle($urandom_range(1, 9));
      round_trip();
      n_after_idle++;
    end
    for (int b = 0; b < 5; b++) separate_block();
    idle(3);
    round_trip();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    round_trip();
    n_after_reset++;

    $display("mechanisms: back_to_back=%0d after_idle=%0d after_reset=%0d negative=%0d large=%0d exact=%0d off_by_one=%0d separate=%0d",
             n_back_to_back, n_after_idle, n_after_reset, n_negative, n_large, n_exact, n_off_by_one, n_separate);
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back block"); end
    if (n_after_idle == 0)   begin failures++; $display("FAIL: no block after idle clocks"); end
    if (n_after_reset == 0)  begin failures++; $display("FAIL: no block after reset"); end
    if (n_negative == 0)     begin failures++; $display("FAIL: no negative result"); end
    if (n_large == 0)        begin failures++; $display("FAIL: no result above 2^16"); end
    if (n_exact == 0)        begin failures++; $display("FAIL: no exact round trip"); end
    if (n_separate == 0)     begin failures++; $display("FAIL: inverse never run on its own"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
