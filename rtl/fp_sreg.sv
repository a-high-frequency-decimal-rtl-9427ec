// fp_sreg: final product shift register (low half of the product).
//
// The one-digit clean-up block emits the low product digits one per cycle,
// least significant first. Each valid digit enters at the top and the
// register shifts one digit towards position 0, so after N digits position k
// holds product digit k.
// Interface: shift_en/d_in sampled on the clock; q is the register.
module fp_sreg
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  digit_t         d_in,
  output digit_t [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {d_in, q[N-1:1]};
  end

endmodule
