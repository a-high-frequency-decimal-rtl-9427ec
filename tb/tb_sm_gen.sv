// tb_sm_gen: checks the secondary multiples 2A, 4A, 5A of random and corner
// multiplicands against multiplications done digit by digit with integers.
module tb_sm_gen;
  import dm_pkg::*;
  localparam int unsigned N = 34;

  digit_t [N-1:0] a;
  digit_t [N:0]   m2, m4, m5;
  int checks = 0, failures = 0;

  sm_gen dut (.*);

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

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++)
        a[i] = (n == 0) ? 4'd9 : (n == 1) ? 4'd5 : 4'($urandom_range(0, 9));
      #1;
      checks += 3;
      if (m2 !== times(a, 2)) begin failures++; $display("FAIL 2A %h", a); end
      if (m4 !== times(a, 4)) begin failures++; $display("FAIL 4A %h", a); end
      if (m5 !== times(a, 5)) begin failures++; $display("FAIL 5A %h", a); end
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
