// dec_cpa: simplified decimal carry-propagate adder, two pipeline stages.
//
// Adds N BCD digits s_k and N one-bit carries c_k (c_k belongs to weight
// k+1), the decimal carry-save form left by the intermediate product
// clean-up. Because each position receives at most one extra unit, the
// position sum e_k = s_k + c_{k-1} lies in 0..10, so a position only
// generates a carry (e_k = 10) or propagates one (e_k = 9):
//   stage 1: e_k, generate g_k = (e_k == 10), propagate p_k = (e_k == 9)
//   stage 2: carries c'_{k+1} = g_k | p_k & c'_k (c'_0 = 0), then
//            r_k = (e_k + c'_k) mod 10.
// The carry out of the top digit is always zero for a product of two N-digit
// numbers (checked by an assertion). The carry chain is written as a loop;
// a prefix network is left to synthesis.
// Interface: in_valid with s/c; r and out_valid are registered two cycles later.
module dec_cpa
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  digit_t [N-1:0] s,
  input  logic   [N-1:0] c,
  output logic           out_valid,
  output digit_t [N-1:0] r
);

  typedef struct packed {
    logic [3:0] e;  // position sum 0..10
    logic       g;
    logic       p;
  } pos_t;

  pos_t [N-1:0] pos_d, pos_q;
  logic         v1;

  always_comb begin
    logic [4:0] e;
    for (int k = 0; k < N; k++) begin
      e = 5'(s[k]) + ((k > 0) ? 5'(c[(k > 0) ? k - 1 : 0]) : 5'd0);
      pos_d[k].e = e[3:0];
      pos_d[k].g = (e == 5'd10);
      pos_d[k].p = (e == 5'd9);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0;
      v1    <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) pos_q <= pos_d;
    end
  end

  digit_t [N-1:0] r_d;
  logic   [N:0]   cc;
  always_comb begin
    logic [4:0] t;
    logic       ci;
    ci = 1'b0;
    for (int k = 0; k < N; k++) begin
      cc[k]  = ci;
      t      = 5'(pos_q[k].e) + 5'(ci);
      r_d[k] = (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
      ci     = pos_q[k].g | (pos_q[k].p & ci);
    end
    cc[N] = ci;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) r <= r_d;
    end
  end

  a_no_top_carry: assert property (@(posedge clk) disable iff (!rst_n)
                                   v1 |-> !cc[N]);

endmodule
