// tb_dec_cpa: feeds random BCD sum digits and carry bits (with long runs of
// nines to make carries propagate) and compares the result with the integer
// sum done digit by digit; checks the two-cycle latency.
module tb_dec_cpa;
  import dm_pkg::*;
  localparam int unsigned N = 34;

  logic           clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  digit_t [N-1:0] s, r;
  logic   [N-1:0] c;
  int checks = 0, failures = 0;

  dec_cpa dut (.*);
  always #5 clk = ~clk;

  function automatic digit_t [N-1:0] ref_add(input digit_t [N-1:0] x, input logic [N-1:0] y);
    digit_t [N-1:0] o;
    int cc = 0;
    for (int k = 0; k < N; k++) begin
      int v = int'(x[k]) + ((k > 0) ? int'(y[k-1]) : 0) + cc;
      o[k] = 4'(v % 10);
      cc = v / 10;
    end
    return o;
  endfunction

  initial begin
    digit_t [N-1:0] e;
    int nprop = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < N; k++) begin
        s[k] = ($urandom_range(0, 1) == 1) ? 4'd9 : 4'($urandom_range(0, 9));
        c[k] = ($urandom_range(0, 3) == 0);
      end
      c[N-1] = 1'b0;
      s[N-1] = 4'($urandom_range(0, 7));
      e = ref_add(s, c);
      @(negedge clk);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL early valid"); end
      @(negedge clk);
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL no valid after two cycles"); end
      if (r !== e) begin failures++; $display("FAIL %h + %h -> %h expected %h", s, c, r, e); end
      for (int k = 1; k < N; k++) if (s[k] == 4'd9 && r[k] == 4'd0 && s[k-1] != 4'd9) nprop++;
    end
    checks++;
    if (nprop == 0) begin failures++; $display("FAIL no carry propagation seen"); end
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
