// dec_mult: iterative N x N digit BCD multiplier with overloaded decimal
// intermediate products.
//
// The multiplicand A and multiplier B (N BCD digits each) give the 2N-digit
// BCD product P = A*B. One multiplier digit is retired per cycle: the
// selected secondary multiples SM1 + SM2 = A*b_t are added to the
// intermediate product by a two-stage overloaded decimal adder whose loop
// carries two interleaved intermediate products. The digits that drop off
// the bottom of the loop are cleaned up serially into the low N product
// digits; after the last iteration the two intermediate products are merged
// by the intermediate product clean-up into decimal carry-save form and
// finished by a two-stage simplified decimal carry-propagate adder.
//
// Timing: start is accepted when ready is high (cycle 0). done pulses in
// cycle N+8 with p valid; p holds until the next product. ready rises again
// in cycle N, so a new multiplication may start every N+1 cycles.
// Unit placement follows the published block diagram; the handling of the
// carry flags and the carry ranges of the clean-up blocks are this design's
// own.
module dec_mult
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  digit_t [N-1:0]   a_in,
  input  digit_t [N-1:0]   b_in,
  output logic             ready,
  output logic             done,
  output digit_t [2*N-1:0] p
);

  localparam int unsigned W = N + 1;

  // control
  logic load, iter_v, iter_clr, ser1_v, ser1_zero, ser2_v, ser2_first, ip_s1;

  dm_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .ready, .load, .iter_v, .iter_clr,
    .ser1_v, .ser1_zero, .ser2_v, .ser2_first, .ip_s1
  );

  // operands and secondary multiples
  digit_t [N-1:0] a;
  digit_t         b_digit;
  digit_t [N:0]   m2, m4, m5, sm1, sm2;

  operand_regs #(.N(N)) u_ops (
    .clk, .rst_n, .load, .a_in, .b_in, .shift(iter_v), .a, .b_digit
  );

  sm_gen #(.N(N)) u_smg (.a, .m2, .m4, .m5);

  sm_select #(.N(N)) u_sms (.b(b_digit), .a, .m2, .m4, .m5, .sm1, .sm2);

  // iterative part
  digit_t [W-1:0] pr_d;
  logic   [W-1:0] pr_ft, pr_fb;

  od_adder #(.N(N)) u_add (
    .clk, .rst_n, .s1_valid(iter_v), .clr(iter_clr), .sm1, .sm2,
    .pr_d, .pr_ft, .pr_fb
  );

  // serial clean-up of the digits leaving the loop
  logic       dig_v;
  digit_t     dig;
  logic [2:0] cy;

  cleanup_digit u_cln (
    .clk, .rst_n,
    .s1_valid(ser1_v), .s1_zero(ser1_zero),
    .s1_p(pr_d[1]), .s1_ft(pr_ft[1]), .s1_fb(pr_fb[1]), .s1_fbl(pr_fb[0]),
    .s2_valid(ser2_v), .s2_first(ser2_first),
    .s2_p(pr_d[0]), .s2_ft(pr_ft[0]), .s2_fb(pr_fb[0]),
    .out_valid(dig_v), .out_digit(dig), .cy_out(cy)
  );

  digit_t [N-1:0] lo;

  fp_sreg #(.N(N)) u_fps (.clk, .rst_n, .shift_en(dig_v), .d_in(dig), .q(lo));

  // final clean-up and carry-propagate addition of the high half
  logic           ipc_v;
  digit_t [N-1:0] ipc_sum;
  logic   [N-1:0] ipc_cry;

  ip_cleanup #(.N(N)) u_ipc (
    .clk, .rst_n, .s1_en(ip_s1), .pr_d, .pr_ft, .pr_fb, .cy_in(cy),
    .out_valid(ipc_v), .sum(ipc_sum), .cry(ipc_cry)
  );

  digit_t [N-1:0] hi;

  dec_cpa #(.N(N)) u_cpa (
    .clk, .rst_n, .in_valid(ipc_v), .s(ipc_sum), .c(ipc_cry),
    .out_valid(done), .r(hi)
  );

  // The low half is copied in the same edge as the high half is written:
  // the serial digits of the next multiplication only enter fp_sreg from
  // that edge on.
  logic           cpa_busy;
  digit_t [N-1:0] lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpa_busy <= 1'b0;
      lo_q     <= '0;
    end else begin
      cpa_busy <= ipc_v;
      if (cpa_busy) lo_q <= lo;
    end
  end

  assign p = {hi, lo_q};

endmodule
