// dm_size_run: drives one dec_mult of size N with random operand pairs,
// back to back and with idle gaps, and checks every product against a
// schoolbook decimal multiplication and its latency against N+8 cycles.
// Reports its counts through ports; used by tb_dec_mult_sizes.
module dm_size_run #(
  parameter int unsigned N    = 8,
  parameter int unsigned NOPS = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import dm_pkg::*;

  logic             start;
  digit_t [N-1:0]   a_in, b_in;
  logic             ready, done;
  digit_t [2*N-1:0] p;

  dec_mult #(.N(N)) dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  always @(posedge clk) if (rst_n && done) begin
    checks += 2;
    if (exp_q.size() == 0) failures++;
    else begin
      digit_t [2*N-1:0] e;
      int t0;
      e  = exp_q.pop_front();
      t0 = t0_q.pop_front();
      if (p !== e) begin failures++; $display("FAIL N=%0d product %h expected %h", N, p, e); end
      if (cycle - t0 != N + 8) begin failures++; $display("FAIL N=%0d latency %0d", N, cycle - t0); end
    end
  end

  initial begin
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    start    = 1'b0;
    a_in     = '0;
    b_in     = '0;
    @(posedge rst_n);
    @(posedge clk);
    for (int n = 0; n < NOPS; n++) begin
      if (n % 8 == 7) begin
        start <= 1'b0;
        repeat ($urandom_range(1, 2 * N)) @(posedge clk);
      end
      for (int i = 0; i < N; i++) begin
        a_in[i] <= (n == 0) ? 4'd9 : 4'($urandom_range(0, 9));
        b_in[i] <= (n == 0) ? 4'd9 : 4'($urandom_range(0, 9));
      end
      start <= 1'b1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      exp_q.push_back(ref_mul(a_in, b_in));
      t0_q.push_back(cycle);
    end
    start <= 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    finished = 1'b1;
  end
endmodule
