// tb_ip_cleanup: presents two random intermediate products in consecutive
// cycles (the first read two positions up, the second one position up) and a
// random serial carry in the stage-4 cycle, and checks that the BCD sum
// digits and carry bits together equal the exact decimal value of the merged
// digits, owed sixes and owed ones. Also checks that every sum digit is BCD
// and that the result appears four cycles after s1_en.
module tb_ip_cleanup;
  import dm_pkg::*;
  localparam int unsigned N = 34;
  localparam int unsigned W = N + 1;

  logic           clk = 1'b0, rst_n = 1'b0, s1_en = 1'b0;
  digit_t [W-1:0] pr_d;
  logic   [W-1:0] pr_ft, pr_fb;
  logic   [2:0]   cy_in;
  logic           out_valid;
  digit_t [N-1:0] sum;
  logic   [N-1:0] cry;
  int checks = 0, failures = 0, n_cry = 0;

  ip_cleanup dut (.*);
  always #5 clk = ~clk;

  function automatic void rnd_pr(output digit_t [W-1:0] d, output logic [W-1:0] ft,
                                 output logic [W-1:0] fb);
    for (int j = 0; j < W; j++) begin
      d[j]  = 4'($urandom_range(0, 15));
      ft[j] = $urandom_range(0, 1);
      fb[j] = $urandom_range(0, 1);
    end
    // keep the top digit small, as the multiplier's value bound does
    d[W-1]  = 4'($urandom_range(0, 4));
    ft[W-1] = 1'b0;
    fb[W-1] = 1'b0;
  endfunction

  initial begin
    int acc [N + 2];
    digit_t [W-1:0] d;
    logic   [W-1:0] ft, fb;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 500; m++) begin
      foreach (acc[i]) acc[i] = 0;
      @(negedge clk);
      rnd_pr(d, ft, fb);
      pr_d = d; pr_ft = ft; pr_fb = fb;
      s1_en = 1'b1;
      for (int k = 0; k < N; k++) begin
        if (k + 2 < W) acc[k] += int'(d[k+2]) + 6 * int'(ft[k+2]) + 6 * int'(fb[k+2]);
        acc[k] += int'(fb[k+1]);
      end
      @(negedge clk);
      s1_en = 1'b0;
      rnd_pr(d, ft, fb);
      pr_d = d; pr_ft = ft; pr_fb = fb;
      for (int k = 0; k < N; k++)
        acc[k] += int'(d[k+1]) + 6 * int'(ft[k+1]) + 6 * int'(fb[k+1]) + int'(fb[k]);
      @(negedge clk);
      rnd_pr(d, ft, fb);
      pr_d = d; pr_ft = ft; pr_fb = fb;
      @(negedge clk);
      cy_in = 3'($urandom_range(0, 6));
      acc[0] += int'(cy_in);
      checks++;
      if (out_valid) begin failures++; $display("FAIL early valid"); end
      @(negedge clk);
      cy_in = 3'($urandom_range(0, 6));
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid"); end
      // remove the design's digits and carries from the exact value
      for (int k = 0; k < N; k++) begin
        checks++;
        if (sum[k] > 4'd9) begin failures++; $display("FAIL digit %0d not BCD", k); end
        acc[k]   -= int'(sum[k]);
        acc[k+1] -= int'(cry[k]);
        if (cry[k]) n_cry++;
      end
      // what is left must be zero
      begin
        int c;
        logic bad;
        c = 0;
        bad = 1'b0;
        for (int k = 0; k < N + 2; k++) begin
          c = acc[k] + c;
          if (c % 10 != 0) bad = 1'b1;
          c = c / 10;
        end
        if (c != 0) bad = 1'b1;
        checks++;
        if (bad) begin failures++; $display("FAIL value mismatch in run %0d", m); end
      end
    end
    checks++;
    if (n_cry == 0) begin failures++; $display("FAIL no carry bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
