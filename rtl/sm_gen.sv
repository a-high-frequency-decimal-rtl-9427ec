// sm_gen: secondary multiple generation.
//
// Forms 2A, 4A and 5A of the N-digit BCD multiplicand A. Each result digit
// depends only on two neighbouring digits of its input, so there is no carry
// ripple:
//   2A : digit i = (2*a_i mod 10) + (a_{i-1} >= 5)     (even + 0/1, never > 9)
//   4A : 2A applied twice
//   5A : digit i = (a_i odd ? 5 : 0) + floor(a_{i-1} / 2)   (at most 9)
// Purely combinational. The multiplicand register upstream is held constant
// for a whole multiplication, so these multiples need no register of their
// own; the multiplier spends its first cycle letting them settle.
// Interface: a (N digits) in; m2, m4, m5 (N+1 digits each) out.
module sm_gen
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  digit_t [N-1:0] a,
  output digit_t [N:0]   m2,
  output digit_t [N:0]   m4,
  output digit_t [N:0]   m5
);

  function automatic digit_t dbl_lo(input digit_t d);
    return (d >= 4'd5) ? 4'(d + d - 4'd10) : 4'(d + d);
  endfunction

  digit_t [N:0] ax;
  assign ax = {4'd0, a};

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      m2[i] = dbl_lo(ax[i]) + ((i > 0 && ax[(i > 0) ? i - 1 : 0] >= 4'd5) ? 4'd1 : 4'd0);
      m5[i] = (ax[i][0] ? 4'd5 : 4'd0) + ((i > 0) ? 4'(ax[(i > 0) ? i - 1 : 0] >> 1) : 4'd0);
    end
    for (int i = 0; i <= N; i++) begin
      m4[i] = dbl_lo(m2[i]) + ((i > 0 && m2[(i > 0) ? i - 1 : 0] >= 4'd5) ? 4'd1 : 4'd0);
    end
  end

endmodule
