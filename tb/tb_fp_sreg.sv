// tb_fp_sreg: shifts in N random digits with gaps and checks that digit k of
// the register is the k-th digit entered; checks that it holds without shift.
module tb_fp_sreg;
  import dm_pkg::*;
  localparam int unsigned N = 34;

  logic           clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  digit_t         d_in;
  digit_t [N-1:0] q, e;
  int checks = 0, failures = 0;

  fp_sreg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        e[k] = 4'($urandom_range(0, 9));
        d_in = e[k];
        shift_en = 1'b1;
        @(negedge clk);
        shift_en = 1'b0;
        if ($urandom_range(0, 1) == 1) @(negedge clk);
      end
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (q !== e) begin failures++; $display("FAIL %h expected %h", q, e); end
    end
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
