// od_adder: two-stage overloaded decimal adder and intermediate product register.
//
// Adds the two selected secondary multiples (BCD) to the intermediate product
// PR, which is kept in the overloaded decimal representation (digits 0-15,
// weight ten per digit). PR has W = N+1 digit positions and two flags per
// position:
//   ft[j] : the stage-1 carry-save adder of digit j produced a carry of
//           sixteen ("co top"); the one went to digit j+1, six is still owed
//           to digit j.
//   fb[j] : the stage-2 4-bit adder of digit j produced a carry of sixteen
//           ("co bot"); six is owed to digit j and one is owed to digit j+1.
// The represented value is sum_j 10^j*(p_j + 6*ft_j + 6*fb_j + fb_{j-1}).
//
// Stage 1, digit i (PR read with a shift of two digits, pr_{i+2}):
//   x = ft_{i+2} ? sm1_i + 6 : sm1_i,  y = fb_{i+2} ? sm2_i + 6 : sm2_i
//   (s, c) = 4-bit carry-save sum of x, y, pr_{i+2}
//   co_top_i = c[3]; the carry word into stage 2 is {c[2:0], co_top_{i-1}}.
// Stage 2, digit i: {co_bot_i, pr_i} = s + {c[2:0], co_top_{i-1}} + fb_{i+1},
//   a 4-bit adder with carry-in; no carry travels between digits here.
// Paying the six owed by a carry in the next iteration, instead of at once,
// keeps decimal correction off this loop, as the published design does.
//
// The loop is two cycles long, so two intermediate products live in it at
// once: one in the stage-1 register and one in PR. Iteration t reads the
// result of iteration t-2, which has meanwhile moved two digit positions
// (hence pr_{i+2}); the two digits it drops, pr_1 and pr_0, go to the digit
// clean-up block. clr forces the PR read to zero for the first two
// iterations of a multiplication.
// Interface: s1_valid/clr/sm1/sm2 enter stage 1; PR (pr_d, pr_ft, pr_fb) is
// written one cycle later and is visible the cycle after that.
// The carry-save/flag bookkeeping above (which carry is paid where) is this
// design's reading of the published block diagram.
module od_adder
  import dm_pkg::*;
#(
  parameter int unsigned N = 34,
  localparam int unsigned W = N + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           s1_valid,
  input  logic           clr,
  input  digit_t [N:0]   sm1,
  input  digit_t [N:0]   sm2,
  output digit_t [W-1:0] pr_d,
  output logic   [W-1:0] pr_ft,
  output logic   [W-1:0] pr_fb
);

  // Stage-1 pipeline register (the "latch half-way" through the adder).
  typedef struct packed {
    logic [3:0] s;    // carry-save sum bits
    logic [3:0] cc;   // carry bits shifted into place, bit 0 from the digit below
    logic       cin;  // owed one from the previous iteration's co_bot
    logic       ct;   // this digit's co_top
  } s1_t;

  s1_t  [W-1:0] s1_d, s1_q;
  logic         s2_valid;

  // ---------------- stage 1 ----------------
  always_comb begin
    logic [3:0] q, x, y;
    logic       qft, qfb, qfbl;
    logic [7:0] cs;
    logic [W:0] co_top;
    co_top = '0;
    for (int i = 0; i < W; i++) begin
      q    = 4'd0;
      qft  = 1'b0;
      qfb  = 1'b0;
      qfbl = 1'b0;
      if (!clr && i + 2 < W) begin
        q   = pr_d[(i + 2 < W) ? i + 2 : 0];
        qft = pr_ft[(i + 2 < W) ? i + 2 : 0];
        qfb = pr_fb[(i + 2 < W) ? i + 2 : 0];
      end
      if (!clr && i + 1 < W) qfbl = pr_fb[(i + 1 < W) ? i + 1 : 0];
      // the carry flags choose between the multiple digit and digit plus six
      x  = qft ? plus6(sm1[i]) : sm1[i];
      y  = qfb ? plus6(sm2[i]) : sm2[i];
      cs = csa4(x, y, q);
      co_top[i+1]  = cs[7];
      s1_d[i].s    = cs[3:0];
      s1_d[i].cc   = {cs[6:4], co_top[i]};
      s1_d[i].cin  = qfbl;
      s1_d[i].ct   = cs[7];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q     <= '0;
      s2_valid <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      if (s1_valid) s1_q <= s1_d;
    end
  end

  // ---------------- stage 2 ----------------
  digit_t [W-1:0] r_d;
  logic   [W-1:0] cb_d;

  always_comb begin
    logic [4:0] sum;
    for (int i = 0; i < W; i++) begin
      sum     = 5'(s1_q[i].s) + 5'(s1_q[i].cc) + 5'(s1_q[i].cin);
      r_d[i]  = sum[3:0];
      cb_d[i] = sum[4];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr_d  <= '0;
      pr_ft <= '0;
      pr_fb <= '0;
    end else if (s2_valid) begin
      pr_d <= r_d;
      for (int i = 0; i < W; i++) pr_ft[i] <= s1_q[i].ct;
      pr_fb <= cb_d;
    end
  end

  // The accumulated value stays below 10^(N+1), so the top digit never
  // carries out.
  a_top_ct: assert property (@(posedge clk) disable iff (!rst_n)
                             s2_valid |-> !s1_q[W-1].ct);
  a_top_cb: assert property (@(posedge clk) disable iff (!rst_n)
                             s2_valid |-> !cb_d[W-1]);

endmodule
