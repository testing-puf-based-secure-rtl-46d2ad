// repetition_encoder: sends every bit of a 24-bit Golay code word REP
// times in a row as one serial stream (264 bits for REP = 11).
//
// Two counters do the work, as in the design: a bit counter walks over the
// 24 code bits (bit 0 first) and a repetition counter repeats the current
// bit REP times.  The serial output uses a valid/ready handshake so that
// a consumer that needs a pause (the repetition decoder writes one result
// per group) can stall it; this handshake is this implementation's choice.
//
// Timing: start_i (with code_i) is sampled at a rising edge; the next cycle
// loads the word, then one bit is offered per cycle (valid_o) and moves on
// whenever ready_i is high; after the last bit a closing cycle follows and
// done_o pulses.  With ready_i held high, done_o is seen 267 edges after
// the start edge (1 load + 264 bits + 2 closing cycles), the latency of
// the design.
module repetition_encoder
  import fe_pkg::*;
#(
  parameter int unsigned REP = REP_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [CODE_W-1:0] code_i,
  output logic              bit_o,
  output logic              valid_o,
  input  logic              ready_i,
  output logic              done_o
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_CLOSE} state_e;

  state_e            state_q;
  logic [CODE_W-1:0] data_q;
  logic [4:0]        bit_cnt_q;   // 0..23
  logic [$clog2(REP+1)-1:0] rep_cnt_q;   // 0..REP-1
  logic [CODE_W-1:0] code_q;

  assign valid_o = (state_q == S_RUN);
  assign bit_o   = data_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      data_q    <= '0;
      code_q    <= '0;
      bit_cnt_q <= '0;
      rep_cnt_q <= '0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        code_q  <= code_i;
        state_q <= S_LOAD;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_LOAD: begin
            data_q    <= code_q;
            bit_cnt_q <= '0;
            rep_cnt_q <= '0;
            state_q   <= S_RUN;
          end
          S_RUN: if (ready_i) begin
            if (rep_cnt_q == ($bits(rep_cnt_q))'(REP - 1)) begin
              rep_cnt_q <= '0;
              data_q    <= data_q >> 1;
              if (bit_cnt_q == 5'(CODE_W - 1)) state_q <= S_CLOSE;
              else bit_cnt_q <= bit_cnt_q + 1'b1;
            end else begin
              rep_cnt_q <= rep_cnt_q + 1'b1;
            end
          end
          S_CLOSE: begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
