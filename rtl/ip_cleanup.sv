// ip_cleanup: intermediate product clean-up (N modified one-digit clean-ups).
//
// When the last iteration ends, the high N digits of the product still sit in
// the two intermediate products of the adder loop: R_{N-2} (read from PR in
// the first cycle, shifted two positions) and R_{N-1} (read one cycle later,
// shifted one position). For each product digit k (weight N+k) this block
// merges the two digits and the sixes and ones owed by their carry flags:
//   stage 1: x_k = p[k+2] + 6*ft[k+2] + 6*fb[k+2] + fb[k+1]   of R_{N-2}
//   stage 2: carry-save sum of x_k, p[k+1], 6*ft[k+1] + 6*fb[k+1] of R_{N-1}
//            (fb[k] of R_{N-1} is kept as a carry-in)
//   stage 3: d_k = sum + carry + carry-in                         (0..56)
//   stage 4: d_k = 10*h_k + l_k; s_k = l_k + h_{k-1} (0..15), with h_{-1}
//            the decimal carry cy_in from the serial clean-up digit;
//            out digit = s_k (+6 mod 16 when s_k >= 10), carry bit = s_k >= 10.
// The result is one BCD digit and one carry bit per position (decimal
// carry-save form) for the simplified decimal carry-propagate adder.
// The ranges above and the h/l split are this design's own.
// Interface: s1_en in the cycle PR holds R_{N-2}; stage 2 follows by itself
// one cycle later. cy_in is sampled in the stage-4 cycle (three cycles after
// s1_en). sum/cry/out_valid are registered at the end of stage 4.
module ip_cleanup
  import dm_pkg::*;
#(
  parameter int unsigned N = 34,
  localparam int unsigned W = N + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           s1_en,
  input  digit_t [W-1:0] pr_d,
  input  logic   [W-1:0] pr_ft,
  input  logic   [W-1:0] pr_fb,
  input  logic   [2:0]   cy_in,
  output logic           out_valid,
  output digit_t [N-1:0] sum,
  output logic   [N-1:0] cry
);

  logic [4:0] x_q [N];
  logic [5:0] cs_s_q [N], cs_c_q [N];
  logic       cin_q [N];
  logic [5:0] d_q [N];
  logic       v2, v3, v4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      v3 <= 1'b0;
      v4 <= 1'b0;
    end else begin
      v2 <= s1_en;
      v3 <= v2;
      v4 <= v3;
    end
  end

  // stage 1: R_{N-2}, positions k+2 (the top position of R is W-1 = N)
  always_ff @(posedge clk) begin
    if (s1_en) begin
      for (int k = 0; k < N; k++) begin
        if (k + 2 < W)
          x_q[k] <= 5'(pr_d[(k + 2 < W) ? k + 2 : 0])
                  + 5'(six_if(pr_ft[(k + 2 < W) ? k + 2 : 0]))
                  + 5'(six_if(pr_fb[(k + 2 < W) ? k + 2 : 0]))
                  + 5'(pr_fb[k + 1]);
        else
          x_q[k] <= 5'(pr_fb[k + 1]);
      end
    end
  end

  // stage 2: R_{N-1}, positions k+1
  always_ff @(posedge clk) begin
    logic [4:0] b, e, s, c;
    if (v2) begin
      for (int k = 0; k < N; k++) begin
        b = 5'(pr_d[k + 1]);
        e = 5'(six_if(pr_ft[k + 1])) + 5'(six_if(pr_fb[k + 1]));
        s = x_q[k] ^ b ^ e;
        c = (x_q[k] & b) | (x_q[k] & e) | (b & e);
        cs_s_q[k] <= {1'b0, s};
        cs_c_q[k] <= {c, 1'b0};
        cin_q[k]  <= pr_fb[k];
      end
    end
  end

  // stage 3: carry-propagate addition per digit
  always_ff @(posedge clk) begin
    if (v3)
      for (int k = 0; k < N; k++) d_q[k] <= cs_s_q[k] + cs_c_q[k] + 6'(cin_q[k]);
  end

  // stage 4: split, add the tens of the digit below, correct
  digit_t [N-1:0] sum_d;
  logic   [N-1:0] cry_d;
  always_comb begin
    logic [6:0] hl;
    logic [2:0] h_prev;
    logic [4:0] s;
    h_prev = cy_in;
    for (int k = 0; k < N; k++) begin
      hl       = div10(d_q[k]);
      s        = 5'(hl[3:0]) + 5'(h_prev);
      cry_d[k] = (s >= 5'd10);
      sum_d[k] = cry_d[k] ? 4'(s + 5'd6) : s[3:0];
      h_prev   = hl[6:4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      cry <= '0;
    end else if (v4) begin
      sum <= sum_d;
      cry <= cry_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v4;
  end

endmodule
