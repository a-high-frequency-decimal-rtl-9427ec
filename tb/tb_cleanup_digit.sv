// tb_cleanup_digit: feeds sequences of random overloaded digit pairs with
// random carry flags in the multiplier's timing (stage 1 of weight w in the
// same cycle as stage 2 of weight w-1) and checks that the emitted BCD digits
// and the final decimal carry form the exact decimal value of
// sum_w 10^w * (pr_1 + 6*ft_1 + 6*fb_1 + fb_0 + pr_0 + 6*ft_0 + 6*fb_0).
// Also checks that a digit leaves stage 4 two cycles after its stage-2 cycle.
module tb_cleanup_digit;
  import dm_pkg::*;
  localparam int K = 20;   // digits per sequence

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       s1_valid = 1'b0, s1_zero = 1'b0, s1_ft = 1'b0, s1_fb = 1'b0, s1_fbl = 1'b0;
  logic       s2_valid = 1'b0, s2_first = 1'b0, s2_ft = 1'b0, s2_fb = 1'b0;
  digit_t     s1_p = '0, s2_p = '0;
  logic       out_valid;
  digit_t     out_digit;
  logic [2:0] cy_out;
  int checks = 0, failures = 0, n_big = 0;

  cleanup_digit dut (.*);
  always #5 clk = ~clk;

  int val [K + 4];
  int got [$];
  int got_cy;
  int cyc = 0, s2_cyc [$], out_cyc [$];

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (out_valid) begin
    got.push_back(int'(out_digit));
    got_cy = int'(cy_out);
    out_cyc.push_back(cyc);
    if (cy_out > 3'd1) n_big++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 300; m++) begin
      foreach (val[i]) val[i] = 0;
      got.delete();
      s2_cyc.delete();
      out_cyc.delete();
      for (int j = 0; j <= K; j++) begin
        @(negedge clk);
        s1_valid = (j < K);
        s1_zero  = (j == 0) && (m % 2 == 0);
        s1_p   = 4'($urandom_range(0, 15));
        s1_ft  = $urandom_range(0, 1);
        s1_fb  = $urandom_range(0, 1);
        s1_fbl = $urandom_range(0, 1);
        if (j < K && !s1_zero)
          val[j] += int'(s1_p) + 6 * int'(s1_ft) + 6 * int'(s1_fb) + int'(s1_fbl);
        s2_valid = (j >= 1);
        s2_first = (j == 1);
        s2_p  = 4'($urandom_range(0, 15));
        s2_ft = $urandom_range(0, 1);
        s2_fb = $urandom_range(0, 1);
        if (j >= 1) begin
          val[j-1] += int'(s2_p) + 6 * int'(s2_ft) + 6 * int'(s2_fb);
          s2_cyc.push_back(cyc);
        end
      end
      @(negedge clk);
      s1_valid = 1'b0;
      s2_valid = 1'b0;
      s2_first = 1'b0;
      repeat (4) @(negedge clk);
      begin
        int c, v;
        c = 0;
        checks++;
        if (got.size() != K) begin
          failures++;
          $display("FAIL %0d digits out", got.size());
        end else begin
          for (int w = 0; w < K; w++) begin
            v = val[w] + c;
            checks += 2;
            if (got[w] != v % 10) begin failures++; $display("FAIL digit %0d", w); end
            if (out_cyc[w] - s2_cyc[w] != 2) begin failures++; $display("FAIL delay"); end
            c = v / 10;
          end
          checks++;
          if (got_cy != c) begin failures++; $display("FAIL final carry %0d expected %0d", got_cy, c); end
        end
      end
    end
    checks++;
    if (n_big == 0) begin failures++; $display("FAIL no carry above one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
