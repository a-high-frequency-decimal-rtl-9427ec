// tb_dec_mult: end-to-end test of the decimal multiplier at its default size.
//
// Drives random and corner-case BCD operand pairs, both back to back (a new
// start in every cycle ready is high) and with idle gaps, and compares every
// product with a schoolbook decimal multiplication done here on integer
// digit arrays. Checks the latency (done exactly N+8 cycles after the start
// was accepted) and the issue interval (ready again N+1 cycles after an
// accepted start while busy). Counts how often the design's mechanisms
// occur: overloaded digits (A-F) in the intermediate product, stage-1 and
// stage-2 carries of sixteen, decimal carries above one in the clean-up,
// and overlapped (back-to-back) starts; each must occur at least once.
module tb_dec_mult;
  import dm_pkg::*;

  localparam int unsigned N      = 34;
  localparam int unsigned NOPS   = 300;
  localparam int unsigned LAT    = N + 8;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             start;
  digit_t [N-1:0]   a_in, b_in;
  logic             ready, done;
  digit_t [2*N-1:0] p;

  dec_mult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results queue
  digit_t [2*N-1:0] exp_q [$];
  int               t0_q  [$];

  function automatic digit_t [2*N-1:0] ref_mul(input digit_t [N-1:0] a, input digit_t [N-1:0] b);
    int acc [2*N+1];
    digit_t [2*N-1:0] r;
    foreach (acc[i]) acc[i] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        acc[i+j] += int'(a[i]) * int'(b[j]);
    for (int k = 0; k < 2*N; k++) begin
      acc[k+1] += acc[k] / 10;
      r[k] = 4'(acc[k] % 10);
    end
    return r;
  endfunction

  function automatic digit_t [N-1:0] rnd_op(input int kind);
    digit_t [N-1:0] v;
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: v[i] = 4'd9;
        1: v[i] = 4'd0;
        2: v[i] = (i == 0) ? 4'd1 : 4'd0;
        3: v[i] = ($urandom_range(0, 3) == 0) ? 4'd9 : 4'($urandom_range(5, 9));
        default: v[i] = 4'($urandom_range(0, 9));
      endcase
    end
    return v;
  endfunction

  // mechanism counters
  int n_overload = 0, n_cotop = 0, n_cobot = 0, n_bigcy = 0, n_b2b = 0, n_idle_start = 0;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j <= N; j++) if (dut.pr_d[j] >= 4'd10) n_overload++;
    if (|dut.pr_ft) n_cotop++;
    if (|dut.pr_fb) n_cobot++;
    if (dut.dig_v && dut.cy > 3'd1) n_bigcy++;
  end

  // issue interval check
  int last_accept = -1000;
  logic busy_accept;
  always @(posedge clk) if (rst_n && start && ready) begin
    busy_accept = (dut.u_ctrl.state != dut.u_ctrl.IDLE);
    if (busy_accept) begin
      n_b2b++;
      checks++;
      if (cycle - last_accept != N + 1) begin
        failures++;
        $display("FAIL issue interval %0d, expected %0d", cycle - last_accept, N + 1);
      end
    end else n_idle_start++;
    last_accept = cycle;
  end

  // result checker
  always @(posedge clk) if (rst_n && done) begin
    checks += 2;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected done at cycle %0d", cycle);
    end else begin
      digit_t [2*N-1:0] e;
      int t0;
      e  = exp_q.pop_front();
      t0 = t0_q.pop_front();
      if (p !== e) begin
        failures++;
        $display("FAIL product %h expected %h", p, e);
      end
      if (cycle - t0 != LAT) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cycle - t0, LAT);
      end
    end
  end

  int issued = 0;

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    a_in  = '0;
    b_in  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (issued < NOPS) begin
      int ka, kb;
      // every 8th group runs with an idle gap
      if (issued % 8 == 7) begin
        start <= 1'b0;
        repeat ($urandom_range(1, 3 * N)) @(posedge clk);
      end
      // first pairs: all-nines, zero, one, large digits, random
      ka = (issued < 25) ? issued % 5 : (($urandom_range(0, 7) == 0) ? 3 : 4);
      kb = (issued < 25) ? issued / 5 : (($urandom_range(0, 7) == 0) ? 3 : 4);
      a_in  <= rnd_op(ka);
      b_in  <= rnd_op(kb);
      start <= 1'b1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      // accepted at this edge
      exp_q.push_back(ref_mul(a_in, b_in));
      t0_q.push_back(cycle);
      issued++;
    end
    start <= 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    checks += 6;
    if (n_overload == 0)   begin failures++; $display("FAIL no overloaded digit seen"); end
    if (n_cotop == 0)      begin failures++; $display("FAIL no stage-1 carry seen"); end
    if (n_cobot == 0)      begin failures++; $display("FAIL no stage-2 carry seen"); end
    if (n_bigcy == 0)      begin failures++; $display("FAIL no clean-up carry above one seen"); end
    if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back start"); end
    if (n_idle_start == 0) begin failures++; $display("FAIL no start from idle"); end
    $display("cycles=%0d", cycle);
    $display("mechanisms: overloaded_digits=%0d cotop_cycles=%0d cobot_cycles=%0d big_carries=%0d back_to_back=%0d idle_starts=%0d",
             n_overload, n_cotop, n_cobot, n_bigcy, n_b2b, n_idle_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * (LAT + 3 * N) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
