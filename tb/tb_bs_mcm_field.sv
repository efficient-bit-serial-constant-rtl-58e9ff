// tb_bs_mcm_field: self-checking test of the field of constants.
//
// Field 1 holds 1001111 and 1100111.  Sharing 1000000-1 must bring it to four
// elements (one subtractor, three adders), and both products must be right.
// Field 2 holds the DCT sum coefficients a, c, f (181, 237, 98); field 3 the
// difference coefficients b, d, e, g (251, 213, 142, 50).  Random signed
// 9-bit inputs, frames back to back; every product bit is compared with
// the product computed here.
module tb_bs_mcm_field;
  localparam int F = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic x = 1'b0;
  logic [1:0] p1;
  logic [2:0] p2;
  logic [3:0] p3;
  int checks = 0, failures = 0;

  localparam logic [1:0][6:0] K1 = {7'd103, 7'd79};
  localparam logic [2:0][7:0] K2 = {8'd98, 8'd237, 8'd181};
  localparam logic [3:0][7:0] K3 = {8'd50, 8'd142, 8'd213, 8'd251};

  always #5 clk = ~clk;

  bs_mcm_field #(.NK(2), .CW(7), .K(K1)) dut1 (.clk, .rst_n, .first, .x, .p(p1));
  bs_mcm_field #(.NK(3), .CW(8), .K(K2)) dut2 (.clk, .rst_n, .first, .x, .p(p2));
  bs_mcm_field #(.NK(4), .CW(8), .K(K3)) dut3 (.clk, .rst_n, .first, .x, .p(p3));

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

  task automatic run_frame(input longint v);
    longint q;
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      x = v[i];
      #1;
      for (int c = 0; c < 2; c++) begin
        q = v * longint'(K1[c]);
        check(p1[c] === q[i], $sformatf("field1 K=%0d x=%0d bit %0d", K1[c], v, i));
      end
      for (int c = 0; c < 3; c++) begin
        q = v * longint'(K2[c]);
        check(p2[c] === q[i], $sformatf("field2 K=%0d x=%0d bit %0d", K2[c], v, i));
      end
      for (int c = 0; c < 4; c++) begin
        q = v * longint'(K3[c]);
        check(p3[c] === q[i], $sformatf("field3 K=%0d x=%0d bit %0d", K3[c], v, i));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    $display("elements: field1 %0d, field2 %0d, field3 %0d", dut1.N_OPS, dut2.N_OPS, dut3.N_OPS);
    check(dut1.N_OPS == 4, "field 1001111/1100111 uses 4 elements");
    // Recoded, a, c and f have 5, 5 and 3 digits: 4 + 4 + 2 = 10 elements
    // without sharing; the part common to a and c saves one.
    check(dut2.N_OPS == 9, "field a,c,f uses 9 elements");
    // b, d, e, g: 3 + 4 + 2 + 2 = 11 without sharing; d&e saves one.
    check(dut3.N_OPS == 10, "field b,d,e,g uses 10 elements");
    run_frame(9);
    run_frame(-256);
    run_frame(255);
    for (int n = 0; n < 400; n++) run_frame(longint'($signed(9'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
