// tb_bs_addsub: self-checking test of the bit-serial adder and subtractor.
//
// Random signed 12-bit operands are sent LSB first, sign extended over
// 16-bit frames; frames follow each other back to back or after idle
// cycles.  Every result bit is compared, in the clock of its operand bits,
// with the sum and difference worked out here.  A reset in the middle of a
// run checks that a word still starts with the right carry.
module tb_bs_addsub;
  localparam int F = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic a = 1'b0, b = 1'b0;
  logic s_add, s_sub;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_addsub #(.SUB(1'b0)) dut_add (.clk, .rst_n, .first, .a, .b, .s(s_add));
  bs_addsub #(.SUB(1'b1)) dut_sub (.clk, .rst_n, .first, .a, .b, .s(s_sub));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input longint va, input longint vb);
    longint sum, dif;
    sum = va + vb;
    dif = va - vb;
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      a = va[i];
      b = vb[i];
      #1;
      checks += 2;
      if (s_add !== sum[i]) begin
        failures++;
        $display("add %0d+%0d bit %0d: got %b", va, vb, i, s_add);
      end
      if (s_sub !== dif[i]) begin
        failures++;
        $display("sub %0d-%0d bit %0d: got %b", va, vb, i, s_sub);
      end
    end
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      first = 1'b0;
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
    end
  endtask

  initial begin
    longint va, vb;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(5, 3);
    run_frame(3, 5);
    run_frame(-2048, 2047);
    run_frame(2047, -2048);
    run_frame(-1, -1);
    for (int n = 0; n < 300; n++) begin
      va = longint'($signed(12'($urandom)));
      vb = longint'($signed(12'($urandom)));
      run_frame(va, vb);
      if (n % 7 == 3) idle($urandom_range(1, 5));
      if (n == 150) begin
        @(negedge clk);
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
