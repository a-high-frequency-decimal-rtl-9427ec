// cleanup_digit: one-digit, four-stage clean-up block (serial product digits).
//
// Each cycle the overloaded decimal adder drops the two lowest digits of the
// intermediate product it reads, pr_1 and pr_0. Because the adder loop holds
// two interleaved intermediate products, a product weight w receives one
// digit from each of them, one cycle apart: pr_1 of one product in cycle c
// and pr_0 of the other in cycle c+1. This block merges the two, pays the
// sixes owed by their carry flags, resolves the decimal carry from the digit
// below, and emits one BCD product digit per cycle:
//   stage 1: u = pr_1 + 6*ft_1 + 6*fb_1 + fb_0            (0..28)
//   stage 2: carry-save sum of u, pr_0 and 6*ft_0 + 6*fb_0 (next cycle's PR)
//   stage 3: d = sum + carry                                (0..55)
//   stage 4: d = 10*h + l; s = l + cy_prev (0..15);
//            digit = s, or s+6 mod 16 with a carry k when s >= 10;
//            cy = h + k (0..6) is the decimal carry into the next weight.
// Stage 4 is the "add six when the digit is A-F" correction. The published
// block adds one correction of six in stage 1 and two in stage 2; here each
// owed six of both flags is added, so the corrections are 0/6/12 and the
// carry into the next digit can exceed one (this design's choice).
// Interface: s1_* are sampled with stage 1, s2_* with stage 2 (one cycle
// later); s2_first marks weight 0 of a multiplication and clears the carry.
// out_valid/out_digit appear two cycles after the stage-2 cycle (stage 4);
// cy_out is the combinational carry of the digit currently in stage 4.
module cleanup_digit
  import dm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // stage 1: pr_1 of the current PR (masked by s1_zero)
  input  logic       s1_valid,
  input  logic       s1_zero,
  input  digit_t     s1_p,
  input  logic       s1_ft,
  input  logic       s1_fb,
  input  logic       s1_fbl,     // fb of the digit below (owed one)
  // stage 2: pr_0 of the current PR
  input  logic       s2_valid,
  input  logic       s2_first,
  input  digit_t     s2_p,
  input  logic       s2_ft,
  input  logic       s2_fb,
  // stage 4 outputs
  output logic       out_valid,
  output digit_t     out_digit,
  output logic [2:0] cy_out
);

  // stage 1
  logic [4:0] u_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_q <= '0;
    else if (s1_valid)
      u_q <= s1_zero ? 5'd0
                     : 5'(s1_p) + 5'(six_if(s1_ft)) + 5'(six_if(s1_fb)) + 5'(s1_fbl);
  end

  // stage 2: carry-save addition of three 5-bit words
  logic [5:0] cs_s_q, cs_c_q;
  logic       v3_q, f3_q;
  logic [4:0] e2, b2, s2, c2;
  always_comb begin
    e2 = 5'(six_if(s2_ft)) + 5'(six_if(s2_fb));
    b2 = 5'(s2_p);
    s2 = u_q ^ b2 ^ e2;
    c2 = (u_q & b2) | (u_q & e2) | (b2 & e2);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_s_q <= '0;
      cs_c_q <= '0;
      v3_q   <= 1'b0;
      f3_q   <= 1'b0;
    end else begin
      v3_q <= s2_valid;
      f3_q <= s2_first;
      if (s2_valid) begin
        cs_s_q <= {1'b0, s2};
        cs_c_q <= {c2, 1'b0};
      end
    end
  end

  // stage 3: carry-propagate addition
  logic [5:0] d_q;
  logic       v4_q, f4_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      v4_q <= 1'b0;
      f4_q <= 1'b0;
    end else begin
      v4_q <= v3_q;
      f4_q <= f3_q;
      if (v3_q) d_q <= cs_s_q + cs_c_q;
    end
  end

  // stage 4: decimal correction and carry to the next weight
  logic [2:0] cy_q;
  logic [4:0] s4;
  logic [6:0] hl;
  logic       k4;
  always_comb begin
    hl        = div10(d_q);
    s4        = 5'(hl[3:0]) + 5'(f4_q ? 3'd0 : cy_q);
    k4        = (s4 >= 5'd10);
    out_digit = k4 ? 4'(s4 + 5'd6) : s4[3:0];
    cy_out    = hl[6:4] + 3'(k4);
    out_valid = v4_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cy_q <= '0;
    else if (v4_q) cy_q <= cy_out;
  end

endmodule
