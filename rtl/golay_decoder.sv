// golay_decoder: corrects up to three bit errors in a 24-bit extended Golay
// word and returns the 12-bit message (HF_I).
//
// The word is split into received message bits wm = gd_i[11:0] and parity
// bits wp = gd_i[23:12].  A nine-state FSM first forms the two syndromes
// s1 = wm*B ^ wp and s2 = s1*B = wm ^ wp*B (B*B = I), then tries the error
// cases of the design one state after the other, stopping at the first
// that fits:
//   (i)   s1 == 0                      no error
//   (ii)  weight(s2) <= 3              message errors s2, parity clean
//   (iii) weight(s2 ^ B[i]) <= 2       message errors s2^B[i], parity bit i
//   (iv)  weight(s1 ^ B[i]) <= 2       message bit i, parity errors s1^B[i]
//   (v)   weight(s1) <= 3              message clean, parity errors s1
// Cases (iii) and (iv) test all 12 rows B[i] in parallel in one cycle.
// The case order and the state count follow the design; the syndrome
// algorithm itself is the standard one for this code.  If no case fits
// (four errors) the received message bits are passed on unchanged and
// fail_o is set; what to do then is this implementation's choice.
//
// Interface and timing: start_i samples gd_i; done_o is high for one cycle
// when msg_o, case_o and fail_o are valid (they hold until the next
// result).  Counting edges from the start edge to the edge that sees
// done_o: 4 for case (i), 5 to 8 for cases (ii) to (v) and for a failure,
// within the 10-cycle maximum of the design.
module golay_decoder
  import fe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [CODE_W-1:0] gd_i,
  output logic              done_o,
  output logic [MSG_W-1:0]  msg_o,
  output golay_case_e       case_o,
  output logic              fail_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_SYND, S_CASE_I, S_CASE_II, S_CASE_III, S_CASE_IV, S_CASE_V,
    S_CORRECT, S_DONE
  } state_e;

  state_e           state_q;
  logic [MSG_W-1:0] wm_q, wp_q;     // received message / parity bits
  logic [MSG_W-1:0] s1_q, s2_q;     // syndromes
  logic [MSG_W-1:0] em_q;           // error pattern on the message bits
  golay_case_e      case_q;

  // Row search of cases (iii) and (iv).
  logic             hit_iii, hit_iv;
  logic [MSG_W-1:0] em_iii, em_iv;

  always_comb begin
    hit_iii = 1'b0;
    hit_iv  = 1'b0;
    em_iii  = '0;
    em_iv   = '0;
    for (int unsigned i = 0; i < MSG_W; i++) begin
      if (!hit_iii && popcount12(s2_q ^ golay_b_row(i)) <= 2) begin
        hit_iii = 1'b1;
        em_iii  = s2_q ^ golay_b_row(i);
      end
      if (!hit_iv && popcount12(s1_q ^ golay_b_row(i)) <= 2) begin
        hit_iv = 1'b1;
        em_iv  = MSG_W'(1) << i;
      end
    end
  end

  assign done_o = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      wm_q    <= '0;
      wp_q    <= '0;
      s1_q    <= '0;
      s2_q    <= '0;
      em_q    <= '0;
      case_q  <= GCASE_I;
      msg_o   <= '0;
      case_o  <= GCASE_I;
      fail_o  <= 1'b0;
    end else if (start_i) begin
      wm_q    <= gd_i[MSG_W-1:0];
      wp_q    <= gd_i[CODE_W-1:MSG_W];
      state_q <= S_SYND;
    end else begin
      unique case (state_q)
        S_IDLE: ;
        S_SYND: begin
          s1_q    <= golay_mul_b(wm_q) ^ wp_q;
          s2_q    <= wm_q ^ golay_mul_b(wp_q);
          state_q <= S_CASE_I;
        end
        S_CASE_I:
          if (s1_q == '0) begin
            em_q <= '0; case_q <= GCASE_I; state_q <= S_CORRECT;
          end else state_q <= S_CASE_II;
        S_CASE_II:
          if (popcount12(s2_q) <= 3) begin
            em_q <= s2_q; case_q <= GCASE_II; state_q <= S_CORRECT;
          end else state_q <= S_CASE_III;
        S_CASE_III:
          if (hit_iii) begin
            em_q <= em_iii; case_q <= GCASE_III; state_q <= S_CORRECT;
          end else state_q <= S_CASE_IV;
        S_CASE_IV:
          if (hit_iv) begin
            em_q <= em_iv; case_q <= GCASE_IV; state_q <= S_CORRECT;
          end else state_q <= S_CASE_V;
        S_CASE_V: begin
          em_q    <= '0;
          case_q  <= (popcount12(s1_q) <= 3) ? GCASE_V : GCASE_FAIL;
          state_q <= S_CORRECT;
        end
        S_CORRECT: begin
          msg_o   <= wm_q ^ em_q;
          case_o  <= case_q;
          fail_o  <= (case_q == GCASE_FAIL);
          state_q <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
