// tb_dct_combine: self-checking test of the DCT output network.
//
// The 28 product lines are driven with random signed 16-bit words (serial,
// sign extended over 20-bit frames).  The reference applies the Chen
// coefficient matrices directly:
//   even rows  Y0,Y2,Y4,Y6 = [a a a a; c f -f -c; a -a -a a; f -c c -f] . s
//   odd rows   Y1,Y3,Y5,Y7 = [b d e g; d -g -b -e; e -b g d; g -e d -b] . d
// where a product "c" of pair i stands for c * s_i (or the matching d_i).
module tb_dct_combine;
  localparam int F = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic first = 1'b0;
  bs_pkg::even_prod_t pe [4];
  bs_pkg::odd_prod_t  po [4];
  logic [7:0] y;
  int checks = 0, failures = 0;

  // Letter codes: even a=0 c=1 f=2, odd b=0 d=1 e=2 g=3; sign in the matrix.
  localparam int EV_L [4][4] = '{'{0, 0, 0, 0}, '{1, 2, 2, 1}, '{0, 0, 0, 0}, '{2, 1, 1, 2}};
  localparam int EV_S [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
  localparam int OD_L [4][4] = '{'{0, 1, 2, 3}, '{1, 3, 0, 2}, '{2, 0, 3, 1}, '{3, 2, 1, 0}};
  localparam int OD_S [4][4] = '{'{1, 1, 1, 1}, '{1, -1, -1, -1}, '{1, -1, 1, 1}, '{1, -1, 1, -1}};

  always #5 clk = ~clk;

  dct_combine dut (.clk, .rst_n, .first, .pe, .po, .y);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame();
    longint ve [4][3];
    longint vo [4][4];
    longint yref [8];
    for (int p = 0; p < 4; p++) begin
      for (int l = 0; l < 3; l++) ve[p][l] = longint'($signed(16'($urandom)));
      for (int l = 0; l < 4; l++) vo[p][l] = longint'($signed(16'($urandom)));
    end
    for (int r = 0; r < 4; r++) begin
      yref[2*r]   = 0;
      yref[2*r+1] = 0;
      for (int p = 0; p < 4; p++) begin
        yref[2*r]   += EV_S[r][p] * ve[p][EV_L[r][p]];
        yref[2*r+1] += OD_S[r][p] * vo[p][OD_L[r][p]];
      end
    end
    for (int i = 0; i < F; i++) begin
      @(negedge clk);
      first = (i == 0);
      for (int p = 0; p < 4; p++) begin
        pe[p] = '{a: ve[p][0][i], c: ve[p][1][i], f: ve[p][2][i]};
        po[p] = '{b: vo[p][0][i], d: vo[p][1][i], e: vo[p][2][i], g: vo[p][3][i]};
      end
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
    for (int p = 0; p < 4; p++) begin
      pe[p] = '0;
      po[p] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
