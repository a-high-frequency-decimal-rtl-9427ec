// sm_select: secondary multiple selection.
//
// For one multiplier digit b (0-9) picks two secondary multiples whose sum is
// A*b: SM1 from {0, A, 4A, 5A} and SM2 from {0, A, 2A, 4A}:
//   b : 0 1 2 3  4  5  6  7  8  9
//   SM1 0 A A A  4A 5A 4A 5A 4A 5A
//   SM2 0 0 A 2A 0  0  2A 2A 4A 4A
// Each selection is a 4-to-1 multiplexer per digit. Combinational.
// Interface: b (BCD digit), a/m2/m4/m5 multiples in; sm1, sm2 (N+1 digits) out.
module sm_select
  import dm_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  digit_t         b,
  input  digit_t [N-1:0] a,
  input  digit_t [N:0]   m2,
  input  digit_t [N:0]   m4,
  input  digit_t [N:0]   m5,
  output digit_t [N:0]   sm1,
  output digit_t [N:0]   sm2
);

  typedef enum logic [1:0] {SEL_0, SEL_A, SEL_4A, SEL_5A} sel1_e;
  typedef enum logic [1:0] {SEL2_0, SEL2_A, SEL2_2A, SEL2_4A} sel2_e;

  sel1_e s1;
  sel2_e s2;

  always_comb begin
    unique case (b)
      4'd1, 4'd2, 4'd3: s1 = SEL_A;
      4'd4, 4'd6, 4'd8: s1 = SEL_4A;
      4'd5, 4'd7, 4'd9: s1 = SEL_5A;
      default:          s1 = SEL_0;
    endcase
    unique case (b)
      4'd2:                   s2 = SEL2_A;
      4'd3, 4'd6, 4'd7:       s2 = SEL2_2A;
      4'd8, 4'd9:             s2 = SEL2_4A;
      default:                s2 = SEL2_0;
    endcase
  end

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      case (s1)
        SEL_A:   sm1[i] = (i < N) ? a[(i < N) ? i : 0] : 4'd0;
        SEL_4A:  sm1[i] = m4[i];
        SEL_5A:  sm1[i] = m5[i];
        default: sm1[i] = 4'd0;
      endcase
      case (s2)
        SEL2_A:  sm2[i] = (i < N) ? a[(i < N) ? i : 0] : 4'd0;
        SEL2_2A: sm2[i] = m2[i];
        SEL2_4A: sm2[i] = m4[i];
        default: sm2[i] = 4'd0;
      endcase
    end
  end

endmodule
