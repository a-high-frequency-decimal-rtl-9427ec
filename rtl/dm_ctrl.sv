// dm_ctrl: sequencer of the iterative decimal multiplier.
//
// Steps of one multiplication (cycle 0 is the cycle start is accepted):
//   cycle 1        GEN: secondary multiples settle from the new multiplicand
//   cycle t+2      step t = 0..N-1: iteration t in adder stage 1 (digit b_t)
//   cycle N+2      step N (tail1): PR holds R_{N-2}
//   cycle N+3      step N+1 (tail2): PR holds R_{N-1}
// Per step it raises the enables of the blocks that read PR:
//   adder stage 1 : steps 0..N-1, PR masked to zero at steps 0 and 1
//   clean-up s1   : steps 1..N (pr_1), masked at step 1
//   clean-up s2   : steps 2..N+1 (pr_0); step 2 starts the carry chain
//   ip clean-up   : step N (stage 1)
// ready is high when idle and in the cycle of the last iteration, so a new
// multiplication can start every N+1 cycles; its steps 0.. overlap the
// previous one's step N+1, which only the back end uses.
// Interface: start is accepted when start && ready. N must be at least 2.
module dm_ctrl #(
  parameter int unsigned N = 34
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ready,
  output logic load,
  output logic iter_v,
  output logic iter_clr,
  output logic ser1_v,
  output logic ser1_zero,
  output logic ser2_v,
  output logic ser2_first,
  output logic ip_s1
);

  typedef enum logic [1:0] {IDLE, GEN, ITER} state_e;

  localparam int unsigned TW = $clog2(N + 1);

  state_e        state;
  logic [TW-1:0] t;
  logic          tail1, tail2;
  logic          last;

  assign last  = (state == ITER) && (t == TW'(N - 1));
  assign ready = (state == IDLE) || last;
  assign load  = start && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      t     <= '0;
      tail1 <= 1'b0;
      tail2 <= 1'b0;
    end else begin
      tail1 <= last;
      tail2 <= tail1;
      unique case (state)
        IDLE: if (load) state <= GEN;
        GEN: begin
          state <= ITER;
          t     <= '0;
        end
        ITER: begin
          if (last) state <= load ? GEN : IDLE;
          else      t     <= t + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign iter_v     = (state == ITER);
  assign iter_clr   = iter_v && (t < TW'(2));
  assign ser1_v     = (iter_v && t >= TW'(1)) || tail1;
  assign ser1_zero  = iter_v && (t == TW'(1));
  assign ser2_v     = (iter_v && t >= TW'(2)) || tail1 || tail2;
  assign ser2_first = (iter_v && t == TW'(2)) || (tail1 && N == 2);
  assign ip_s1      = tail1;

endmodule
