// tb_od_adder: runs the overloaded decimal adder through whole sequences of
// N iterations with secondary multiples of random operands (computed here),
// the way the multiplier uses it. After every iteration t it checks that the
// value represented by PR (digits plus the sixes and ones owed by the carry
// flags) equals the value of PR two iterations earlier with its two lowest
// digit positions dropped, plus A*b_t. Counts overloaded digits and both
// kinds of carry flag, and checks the two-cycle loop timing.
module tb_od_adder;
  import dm_pkg::*;
  localparam int unsigned N = 34;
  localparam int unsigned W = N + 1;
  localparam int unsigned L = N + 6;   // digits of the reference numbers

  logic           clk = 1'b0, rst_n = 1'b0, s1_valid = 1'b0, clr = 1'b0;
  digit_t [N:0]   sm1, sm2;
  digit_t [W-1:0] pr_d;
  logic   [W-1:0] pr_ft, pr_fb;
  int checks = 0, failures = 0;
  int n_ovl = 0, n_ft = 0, n_fb = 0;

  od_adder dut (.*);
  always #5 clk = ~clk;

  typedef int num_t [L];

  function automatic num_t norm(input num_t x);
    int c = 0;
    for (int i = 0; i < L; i++) begin
      int v = x[i] + c;
      x[i] = v % 10;
      c = v / 10;
    end
    return x;
  endfunction

  // value of PR above its two lowest positions, divided by 100
  function automatic num_t pr_high(input digit_t [W-1:0] d, input logic [W-1:0] ft,
                                   input logic [W-1:0] fb);
    num_t r;
    foreach (r[i]) r[i] = 0;
    for (int j = 2; j < W; j++) r[j-2] += int'(d[j]) + 6 * int'(ft[j]) + 6 * int'(fb[j]);
    for (int j = 1; j < W; j++) r[j-1] += int'(fb[j]);
    return norm(r);
  endfunction

  function automatic num_t pr_value(input digit_t [W-1:0] d, input logic [W-1:0] ft,
                                    input logic [W-1:0] fb);
    num_t r;
    foreach (r[i]) r[i] = 0;
    for (int j = 0; j < W; j++) r[j] += int'(d[j]) + 6 * int'(ft[j]) + 6 * int'(fb[j]);
    for (int j = 0; j < W; j++) r[j+1] += int'(fb[j]);
    return norm(r);
  endfunction

  function automatic digit_t [N:0] times(input digit_t [N-1:0] x, input int k);
    digit_t [N:0] r;
    int c = 0;
    for (int i = 0; i <= N; i++) begin
      int v = ((i < N) ? int'(x[i]) * k : 0) + c;
      r[i] = 4'(v % 10);
      c = v / 10;
    end
    return r;
  endfunction

  typedef digit_t [L-1:0] packed_t;

  function automatic packed_t pack(input num_t x);
    packed_t r;
    for (int i = 0; i < L; i++) r[i] = 4'(x[i]);
    return r;
  endfunction

  packed_t exp_q [$];

  initial begin
    digit_t [N-1:0] a;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 40; m++) begin
      for (int i = 0; i < N; i++) a[i] = (m == 0) ? 4'd9 : 4'($urandom_range(0, 9));
      for (int t = 0; t < N + 2; t++) begin
        @(negedge clk);
        // check the result of iteration t-2, written one cycle ago
        if (t >= 2) begin
          packed_t e, g;
          e = exp_q.pop_front();
          g = pack(pr_value(pr_d, pr_ft, pr_fb));
          checks++;
          if (g != e) begin failures++; $display("FAIL value after iteration %0d", t - 2); end
          for (int j = 0; j < W; j++) if (pr_d[j] >= 4'd10) n_ovl++;
          if (|pr_ft) n_ft++;
          if (|pr_fb) n_fb++;
        end
        if (t < N) begin
          int b, k1, k2;
          num_t e;
          b = (m == 0) ? 9 : $urandom_range(0, 9);
          // a split of b into two multiples chosen here, not the selector's
          k1 = (b >= 5) ? 5 : b;
          k2 = b - k1;
          sm1 = times(a, k1);
          sm2 = times(a, k2);
          clr = (t < 2);
          s1_valid = 1'b1;
          if (t >= 2) e = pr_high(pr_d, pr_ft, pr_fb);
          else foreach (e[i]) e[i] = 0;
          for (int i = 0; i <= N; i++) e[i] += int'(sm1[i]) + int'(sm2[i]);
          exp_q.push_back(pack(norm(e)));
        end else begin
          s1_valid = 1'b0;
          clr = 1'b0;
        end
      end
      @(negedge clk);
      s1_valid = 1'b0;
      exp_q.delete();
    end
    checks += 3;
    if (n_ovl == 0) begin failures++; $display("FAIL no overloaded digit"); end
    if (n_ft == 0)  begin failures++; $display("FAIL no co_top flag"); end
    if (n_fb == 0)  begin failures++; $display("FAIL no co_bot flag"); end
    $display("overloaded=%0d ft=%0d fb=%0d", n_ovl, n_ft, n_fb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
