// tb_operand_regs: loads random operands, shifts the multiplier N times and
// checks that b_digit walks through the multiplier digits from the least
// significant one while the multiplicand stays unchanged.
module tb_operand_regs;
  import dm_pkg::*;
  localparam int unsigned N = 34;

  logic           clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  digit_t [N-1:0] a_in, b_in, a;
  digit_t         b_digit;
  int checks = 0, failures = 0;

  operand_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    digit_t [N-1:0] ea, eb;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < N; k++) begin
        ea[k] = 4'($urandom_range(0, 9));
        eb[k] = 4'($urandom_range(0, 9));
      end
      a_in <= ea;
      b_in <= eb;
      load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      a_in <= '0;
      for (int k = 0; k < N; k++) begin
        #1;
        checks += 2;
        if (b_digit !== eb[k]) begin failures++; $display("FAIL b digit %0d", k); end
        if (a !== ea) begin failures++; $display("FAIL a changed"); end
        shift <= 1'b1;
        @(posedge clk);
        shift <= 1'b0;
      end
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
