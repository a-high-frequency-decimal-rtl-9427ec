// tb_dm_ctrl: issues multiplications alone, back to back and with random
// gaps, and compares every control output in every cycle with a model built
// from the list of accepted start cycles (step t of a multiplication started
// in cycle s is cycle s+2+t).
module tb_dm_ctrl;
  localparam int N = 34;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic ready, load, iter_v, iter_clr, ser1_v, ser1_zero, ser2_v, ser2_first, ip_s1;
  int checks = 0, failures = 0, n_b2b = 0;

  dm_ctrl dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  int starts [$];

  // model and comparison, evaluated before each rising edge
  always @(negedge clk) if (rst_n) begin
    logic e_rdy, e_iv, e_ic, e_s1, e_s1z, e_s2, e_s2f, e_ip;
    e_rdy = 1'b1;
    {e_iv, e_ic, e_s1, e_s1z, e_s2, e_s2f, e_ip} = '0;
    foreach (starts[i]) begin
      int st;
      st = cyc - starts[i] - 2;
      if (st >= -1 && st <= N - 2) e_rdy = 1'b0;
      if (st >= 0 && st <= N - 1) e_iv = 1'b1;
      if (st == 0 || st == 1) e_ic = 1'b1;
      if (st >= 1 && st <= N) e_s1 = 1'b1;
      if (st == 1) e_s1z = 1'b1;
      if (st >= 2 && st <= N + 1) e_s2 = 1'b1;
      if (st == 2) e_s2f = 1'b1;
      if (st == N) e_ip = 1'b1;
    end
    checks++;
    if ({ready, iter_v, iter_clr, ser1_v, ser1_zero, ser2_v, ser2_first, ip_s1} !==
        {e_rdy, e_iv, e_ic, e_s1, e_s1z, e_s2, e_s2f, e_ip}) begin
      failures++;
      $display("FAIL cycle %0d got %b expected %b", cyc,
               {ready, iter_v, iter_clr, ser1_v, ser1_zero, ser2_v, ser2_first, ip_s1},
               {e_rdy, e_iv, e_ic, e_s1, e_s1z, e_s2, e_s2f, e_ip});
    end
    checks++;
    if (load !== (start && ready)) begin failures++; $display("FAIL load"); end
  end

  always @(posedge clk) begin
    if (rst_n && start && ready) begin
      if (starts.size() > 0 && cyc - starts[$] == N + 1) n_b2b++;
      starts.push_back(cyc);
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      start = (n < 100) ? 1'b1 : ($urandom_range(0, 3) == 0);
    end
    start = 1'b0;
    repeat (3 * N) @(negedge clk);
    checks++;
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
