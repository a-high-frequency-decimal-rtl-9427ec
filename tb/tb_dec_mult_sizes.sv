// tb_dec_mult_sizes: the operand sizes of the published synthesis table,
// 8 and 16 digits (34 digits is the default size, covered by tb_dec_mult).
// Runs one multiplier of each size side by side with random operands and
// checks products and the N+8 latency.
module tb_dec_mult_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin8, fin16;
  int   c8, f8, c16, f16;

  always #5 clk = ~clk;

  dm_size_run #(.N(8),  .NOPS(300)) u8  (.clk, .rst_n, .finished(fin8),  .checks(c8),  .failures(f8));
  dm_size_run #(.N(16), .NOPS(300)) u16 (.clk, .rst_n, .finished(fin16), .checks(c16), .failures(f16));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (fin8 && fin16);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16, f8 + f16 + 1);
    $finish;
  end
endmodule
