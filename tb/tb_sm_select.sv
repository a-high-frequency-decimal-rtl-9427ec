// tb_sm_select: for every multiplier digit 0-9 checks that the two selected
// secondary multiples add up to A*b, using independently computed multiples.
module tb_sm_select;
  import dm_pkg::*;
  localparam int unsigned N = 34;

  digit_t         b;
  digit_t [N-1:0] a;
  digit_t [N:0]   m2, m4, m5, sm1, sm2;
  int checks = 0, failures = 0;

  sm_select dut (.*);

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

  function automatic digit_t [N:0] add(input digit_t [N:0] x, input digit_t [N:0] y);
    digit_t [N:0] r;
    int c = 0;
    for (int i = 0; i <= N; i++) begin
      int v = int'(x[i]) + int'(y[i]) + c;
      r[i] = 4'(v % 10);
      c = v / 10;
    end
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < N; i++) a[i] = 4'($urandom_range(0, 9));
      m2 = times(a, 2);
      m4 = times(a, 4);
      m5 = times(a, 5);
      for (int d = 0; d < 10; d++) begin
        b = 4'(d);
        #1;
        checks++;
        if (add(sm1, sm2) !== times(a, d)) begin
          failures++;
          $display("FAIL b=%0d", d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
