// tb_bs_latch_chain: self-checking test of the latch chain.
//
// A random bit stream is cut into frames of random length.  Within a frame,
// tap k must show the input of k clocks earlier, and 0 during the first k
// clocks of the frame (the word times 2^k).
module tb_bs_latch_chain;
  localparam int DEPTH = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  logic d = 1'b0;
  logic [DEPTH:0] tap;
  int checks = 0, failures = 0;
  logic hist [$];   // inputs of the current frame

  always #5 clk = ~clk;

  bs_latch_chain #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .first, .d, .tap);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    logic exp_bit;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 400; f++) begin
      len = $urandom_range(1, 3 * DEPTH);
      hist.delete();
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        first = (i == 0);
        d = 1'($urandom_range(0, 1));
        hist.push_back(d);
        #1;
        for (int k = 0; k <= DEPTH; k++) begin
          exp_bit = (i >= k) ? hist[i-k] : 1'b0;
          checks++;
          if (tap[k] !== exp_bit) begin
            failures++;
            $display("frame %0d bit %0d tap %0d: got %b want %b", f, i, k, tap[k], exp_bit);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
