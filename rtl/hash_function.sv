// hash_function: LFSR-based privacy amplification that compresses the
// stream of 12-bit words from the Golay decoder into a 128-bit key.
//
// Three parts, as in the design: an input buffer, a 128-bit LFSR and a
// 128-bit accumulator.  A word is copied into the buffer and examined one
// bit per cycle, bit 0 first: when the bit is 1 the current LFSR state is
// XORed into the accumulator, when it is 0 the accumulator keeps its
// value; the LFSR advances once per examined bit.  After the word marked
// last_i the accumulator is copied to key_o and key_valid_o is set.  The
// polynomial, the LFSR seed, the bit order and the choice to step the LFSR
// only while bits are examined (so the key depends only on the words, not
// on gaps between them) are this implementation's choices.
//
// For self-test the same hardware is reused: prng_o exposes the low 12
// LFSR bits as the pattern generator of the daisy chain, and acc_o the
// accumulator, which compacts the responses into a signature.  The top
// only lets acc_o out at the end of a self-test.
//
// Interface and timing: clear_i reloads the LFSR seed and zeroes the
// accumulator and key.  start_i samples word_i and last_i; done_o is seen
// 14 edges after the start edge (load, 12 bits, closing cycle).  This is
// shorter than the 32 cycles quoted for the original block, whose internal
// schedule is not known; nothing else in the design depends on it.
module hash_function
  import fe_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear_i,
  input  logic             start_i,
  input  logic [MSG_W-1:0] word_i,
  input  logic             last_i,
  output logic             done_o,
  output logic             busy_o,
  output logic [KEY_W-1:0] key_o,
  output logic             key_valid_o,
  output logic [MSG_W-1:0] prng_o,
  output logic [KEY_W-1:0] acc_o
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CLOSE} state_e;

  state_e           state_q;
  logic [MSG_W-1:0] buf_q;
  logic [3:0]       cnt_q;
  logic             last_q;
  logic [KEY_W-1:0] lfsr_q, acc_q;

  assign prng_o = lfsr_q[MSG_W-1:0];
  assign acc_o  = acc_q;
  assign busy_o = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      buf_q       <= '0;
      cnt_q       <= '0;
      last_q      <= 1'b0;
      lfsr_q      <= LFSR_SEED;
      acc_q       <= '0;
      key_o       <= '0;
      key_valid_o <= 1'b0;
      done_o      <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (clear_i) begin
        state_q     <= S_IDLE;
        lfsr_q      <= LFSR_SEED;
        acc_q       <= '0;
        key_o       <= '0;
        key_valid_o <= 1'b0;
      end else if (start_i) begin
        buf_q   <= word_i;
        last_q  <= last_i;
        cnt_q   <= '0;
        state_q <= S_RUN;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_RUN: begin
            if (buf_q[0]) acc_q <= acc_q ^ lfsr_q;
            lfsr_q <= lfsr_next(lfsr_q);
            buf_q  <= buf_q >> 1;
            if (cnt_q == 4'(MSG_W - 1)) state_q <= S_CLOSE;
            else cnt_q <= cnt_q + 1'b1;
          end
          S_CLOSE: begin
            if (last_q) begin
              key_o       <= acc_q;
              key_valid_o <= 1'b1;
            end
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
