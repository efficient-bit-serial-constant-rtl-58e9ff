// tb_dct_pair_unit: self-checking test of one DCT input pair unit.
//
// Random signed 8-bit samples xi, xj, sign extended over 20-bit frames sent
// back to back or after idle clocks.  The seven product lines must carry
// (xi + xj) * {181, 237, 98} and (xi - xj) * {251, 213, 142, 50}, bit by bit
// in the clock of the input bits of the same weight.
module tb_dct_pair_unit;
  localparam int F = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic xi = 1'b0, xj = 1'b0;
  bs_pkg::even_prod_t pe;
  bs_pkg::odd_prod_t  po;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dct_pair_unit dut (.clk, .rst_n, .first, .xi, .xj, .pe, .po);

  initial begin
    repeat (30000) @(posedge clk);
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

  task automatic run_frame(input longint vi, input longint vj);
    longint s, d;
    longint q [7];
    logic   got [7];
    s = vi + vj;
    d = vi - vj;
    q = '{s * 181, s * 237, s * 98, d * 251, d * 213, d * 142, d * 50};
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      xi = vi[i];
      xj = vj[i];
      #1;
      got = '{pe.a, pe.c, pe.f, po.b, po.d, po.e, po.g};
      for (int c = 0; c < 7; c++)
        check(got[c] === q[c][i], $sformatf("line %0d xi=%0d xj=%0d bit %0d", c, vi, vj, i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(-128, 127);
    run_frame(127, -128);
    run_frame(-128, -128);
    run_frame(127, 127);
    for (int n = 0; n < 300; n++) begin
      run_frame(longint'($signed(8'($urandom))), longint'($signed(8'($urandom))));
      if (n % 5 == 2) begin
        @(negedge clk);
        first = 1'b0;
        xi = 1'b1;
        xj = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
