// operand_regs: multiplicand register and multiplier digit shift register.
//
// On load both BCD operands are captured. The multiplicand A then stays
// unchanged for the whole multiplication (the secondary multiples are
// formed from it without registers of their own). The multiplier B shifts
// one digit towards position 0 on every shift, so b_digit is the multiplier
// digit of the current iteration, least significant first.
// Interface: load/a_in/b_in and shift sampled on the clock (load wins).
module operand_regs
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  digit_t [N-1:0] a_in,
  input  digit_t [N-1:0] b_in,
  input  logic           shift,
  output digit_t [N-1:0] a,
  output digit_t         b_digit
);

  digit_t [N-1:0] b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a   <= '0;
      b_q <= '0;
    end else if (load) begin
      a   <= a_in;
      b_q <= b_in;
    end else if (shift) begin
      b_q <= {4'd0, b_q[N-1:1]};
    end
  end

  assign b_digit = b_q[0];

endmodule
