// tb_dct1d_bitserial: end-to-end test of the 1-D DCT of 8x8 blocks, eight
// bit-serial single DCTs at the default size.
//
// Random 8x8 blocks of signed 8-bit samples are sent as 64 serial streams,
// LSB first, sign extended over 20-bit frames.  Every output bit of all 64
// outputs is checked in the clock of the input bits of the same weight
// against the DCT computed here from the cosine formula (see
// tb_dct8_bitserial).  The run counts how often each mechanism of the
// design was exercised and fails if one never was:
//   - blocks that follow the previous one back to back (carry latches and
//     latch chains restarted by the frame pulse, no idle clock),
//   - blocks after idle clocks and after a reset,
//   - negative results (subtractor paths, sign carried by the carries),
//   - results above 2^16 in size (carries running past the input width),
//   - blocks with all samples at -128 or 127 (largest sums).
// It also checks the rate: back-to-back blocks finish every 20 clocks.
module tb_dct1d_bitserial;
  localparam int F = 20;
  localparam int R = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic [R-1:0][7:0] x = '0;
  logic [R-1:0][7:0] y;
  int checks = 0, failures = 0;
  int coef [8][8];
  longint cycle = 0;

  int n_back_to_back = 0, n_after_idle = 0, n_after_reset = 0;
  int n_negative = 0, n_large = 0, n_extreme = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dct1d_bitserial dut (.clk, .rst_n, .first, .x, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input longint xs [R][8]);
    longint yref [R][8];
    for (int r = 0; r < R; r++)
      for (int k = 0; k < 8; k++) begin
        yref[r][k] = 0;
        for (int n = 0; n < 8; n++) yref[r][k] += xs[r][n] * longint'(coef[k][n]);
        if (yref[r][k] < 0) n_negative++;
        if (yref[r][k] >= 65536 || yref[r][k] < -65536) n_large++;
      end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      for (int r = 0; r < R; r++)
        for (int n = 0; n < 8; n++) x[r][n] = xs[r][n][i];
      #1;
      for (int r = 0; r < R; r++)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (y[r][k] !== yref[r][k][i]) begin
            failures++;
            $display("FAIL: row %0d Y%0d bit %0d want %0d", r, k, i, yref[r][k]);
          end
        end
    end
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      first = 1'b0;
      for (int r = 0; r < R; r++) x[r] = 8'($urandom);
    end
  endtask

  function automatic void random_block(ref longint xs [R][8]);
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) xs[r][n] = longint'($signed(8'($urandom)));
  endfunction

  initial begin
    longint xs [R][8];
    longint t0, t1;
    int nblk;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++)
        coef[k][n] = (k == 0) ? int'(256.0 * $cos(PI / 4.0))
                              : int'(256.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Extreme blocks.
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) xs[r][n] = (r % 2 != 0) ? -128 : 127;
    run_block(xs);
    n_extreme++;
    n_after_reset++;
    for (int r = 0; r < R; r++)
      for (int n = 0; n < 8; n++) xs[r][n] = ((n + r) % 2 != 0) ? -128 : 127;
    run_block(xs);
    n_extreme++;
    n_back_to_back++;

    // Back-to-back random blocks; the rate must be one block per F clocks.
    nblk = 40;
    t0 = cycle;
    for (int b = 0; b < nblk; b++) begin
      random_block(xs);
      run_block(xs);
      n_back_to_back++;
    end
    t1 = cycle;
    checks++;
    if (t1 - t0 != longint'(nblk * F)) begin
      failures++;
      $display("FAIL: %0d back-to-back blocks took %0d clocks, want %0d", nblk, t1 - t0, nblk * F);
    end

    // Blocks after idle gaps.
    for (int b = 0; b < 20; b++) begin
      idle($urandom_range(1, 7));
      random_block(xs);
      run_block(xs);
      n_after_idle++;
    end

    // Reset in the middle, then more blocks.
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    random_block(xs);
    run_block(xs);
    n_after_reset++;
    for (int b = 0; b < 10; b++) begin
      random_block(xs);
      run_block(xs);
      n_back_to_back++;
    end

    $display("mechanisms: back_to_back=%0d after_idle=%0d after_reset=%0d negative=%0d large=%0d extreme=%0d",
             n_back_to_back, n_after_idle, n_after_reset, n_negative, n_large, n_extreme);
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back block"); end
    if (n_after_idle == 0)   begin failures++; $display("FAIL: no block after idle clocks"); end
    if (n_after_reset == 0)  begin failures++; $display("FAIL: no block after reset"); end
    if (n_negative == 0)     begin failures++; $display("FAIL: no negative result"); end
    if (n_large == 0)        begin failures++; $display("FAIL: no result above 2^16"); end
    if (n_extreme == 0)      begin failures++; $display("FAIL: no extreme block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
