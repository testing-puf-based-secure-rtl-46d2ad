// repetition_decoder: majority vote over groups of REP serial bits.
//
// The serial input RD_I arrives as groups of REP bits (24 groups for one
// 264-bit round).  Three counters do the work, as in the design: the one
// counter counts the 1s of the current group, the repetition counter
// counts REP input bits, and the destination counter gives the index of
// the output bit that receives the majority of the group.  After a group
// the decoder spends one cycle writing that bit (input not ready), then
// clears the one counter and moves to the next index.  When all 24 bits
// are written they are published on gd_o in a closing cycle.
//
// Interface and timing: start_i at a rising edge begins a word; bits are
// taken on edges where valid_i and ready_o are both high.  With valid_i
// held high, done_o is seen 290 edges after the start edge
// (24 x (11 + 1) + 2), the latency of the design.  gd_o holds the word
// until the next done_o.  Bit i of gd_o is the vote of the i-th group.
module repetition_decoder
  import fe_pkg::*;
#(
  parameter int unsigned REP = REP_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic              bit_i,
  input  logic              valid_i,
  output logic              ready_o,
  output logic              done_o,
  output logic [CODE_W-1:0] gd_o
);

  localparam int unsigned CW = $clog2(REP + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WRITE, S_CLOSE} state_e;

  state_e            state_q;
  logic [CW-1:0]     one_cnt_q;    // ones in the current group
  logic [CW-1:0]     rep_cnt_q;    // input bits of the current group
  logic [4:0]        dest_cnt_q;   // output bit index 0..23
  logic [CODE_W-1:0] buf_q;

  assign ready_o = (state_q == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      one_cnt_q  <= '0;
      rep_cnt_q  <= '0;
      dest_cnt_q <= '0;
      buf_q      <= '0;
      gd_o       <= '0;
      done_o     <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        one_cnt_q  <= '0;
        rep_cnt_q  <= '0;
        dest_cnt_q <= '0;
        state_q    <= S_RUN;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_RUN: if (valid_i) begin
            one_cnt_q <= one_cnt_q + CW'(bit_i);
            if (rep_cnt_q == CW'(REP - 1)) begin
              rep_cnt_q <= '0;
              state_q   <= S_WRITE;
            end else begin
              rep_cnt_q <= rep_cnt_q + 1'b1;
            end
          end
          S_WRITE: begin
            buf_q[dest_cnt_q] <= (one_cnt_q > CW'(REP / 2));
            one_cnt_q         <= '0;
            if (dest_cnt_q == 5'(CODE_W - 1)) begin
              state_q <= S_CLOSE;
            end else begin
              dest_cnt_q <= dest_cnt_q + 1'b1;
              state_q    <= S_RUN;
            end
          end
          S_CLOSE: begin
            gd_o    <= buf_q;
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
