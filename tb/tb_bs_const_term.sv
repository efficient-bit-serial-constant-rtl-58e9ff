// tb_bs_const_term: self-checking test of the adder chain of one constant,
// on a latch chain of its own.
//
// 1. The worked example: 1001 times 1001111.  In the plain form (adders on
//    taps 0, 1, 2, 3, 6) the outputs of the first three adders and the
//    product must follow, clock by clock from the first input bit, the
//    columns
//        h: 1 1 0 1 1 0 0 0 0 0     i: 1 1 1 1 1 1 0 0 0 0
//        j: 1 1 1 0 0 0 0 1 0 0     k: 1 1 1 0 0 0 1 1 0 1
//    (k read from the last clock down is 1011000111 = 711 = 9 * 79).  The
//    recoded form (tap4 - tap0 + tap6) must give the same product bits.
// 2. Random signed 8-bit inputs times several recoded constants, and a term
//    that starts from a shared input (ref_in + x * 16), bit by bit against
//    values computed here.
module tb_bs_const_term;
  localparam int F  = 18;
  localparam int ND = 9;
  localparam int NC = 7;
  localparam int unsigned KS [NC] = '{79, 79, 103, 7, 255, 181, 1};
  localparam bit          SD [NC] = '{0, 1, 1, 1, 1, 1, 1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic x = 1'b0;
  logic r = 1'b0;
  logic [ND-1:0] tap;
  logic [NC-1:0] p;
  logic p_ref;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_latch_chain #(.DEPTH(ND - 1)) u_chain (.clk, .rst_n, .first, .d(x), .tap);

  for (genvar c = 0; c < NC; c++) begin : g_dut
    bs_const_term #(
      .ND(ND),
      .POS(ND'(bs_pkg::recode_pos(longint'(KS[c]), SD[c]))),
      .NEG(ND'(bs_pkg::recode_neg(longint'(KS[c]), SD[c])))
    ) dut (.clk, .rst_n, .first, .tap, .ref_in(1'b0), .p(p[c]));
  end

  bs_const_term #(.ND(ND), .POS(9'b000010000), .NEG('0), .USE_REF(1'b1)) dut_ref (
    .clk, .rst_n, .first, .tap, .ref_in(r), .p(p_ref)
  );

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run_frame(input longint v, input longint rv);
    longint q;
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      x = v[i];
      r = rv[i];
      #1;
      for (int c = 0; c < NC; c++) begin
        q = v * longint'(KS[c]);
        check(p[c] === q[i], $sformatf("K=%0d sd=%0d x=%0d bit %0d", KS[c], SD[c], v, i));
      end
      q = rv + v * 16;
      check(p_ref === q[i], $sformatf("ref %0d + 16*%0d bit %0d", rv, v, i));
    end
  endtask

  // Columns h, i, j, k of the worked example, time 1 in bit 0.
  localparam logic [9:0] COL_H = 10'b0000011011;
  localparam logic [9:0] COL_I = 10'b0000111111;
  localparam logic [9:0] COL_J = 10'b0010000111;
  localparam logic [9:0] COL_K = 10'b1011000111;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      first = (t == 0);
      x = (t == 0 || t == 3);
      #1;
      check(g_dut[0].dut.acc[2] === COL_H[t], $sformatf("worked example h, time %0d", t + 1));
      check(g_dut[0].dut.acc[3] === COL_I[t], $sformatf("worked example i, time %0d", t + 1));
      check(g_dut[0].dut.acc[4] === COL_J[t], $sformatf("worked example j, time %0d", t + 1));
      check(p[0] === COL_K[t], $sformatf("worked example k (plain), time %0d", t + 1));
      check(p[1] === COL_K[t], $sformatf("worked example k (recoded), time %0d", t + 1));
    end
    for (int n = 0; n < 400; n++)
      run_frame(longint'($signed(8'($urandom))), longint'($signed(12'($urandom))));
    run_frame(-128, -2048);
    run_frame(127, 2047);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
