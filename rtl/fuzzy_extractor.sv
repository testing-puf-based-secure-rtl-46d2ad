// fuzzy_extractor: PUF-based key storage core with a scan-chain-free
// built-in self-test.
//
// Datapath: Golay encoder -> repetition encoder -> peripheral circuitry
// (XOR with the PUF) for enrollment, and peripheral circuitry (PUF XOR
// helper data) -> repetition decoder -> Golay decoder -> hash function for
// reconstruction.  A sequencer in this module runs ROUNDS rounds of 12
// seed bits / 264 PUF bits each:
//   enrollment      a seed word is requested, Golay-encoded, repeated 11x
//                   and XORed with 264 PUF bits into helper data; the same
//                   seed word is fed to the hash, so enrollment also yields
//                   the key.
//   reconstruction  264 PUF bits XOR helper data are majority-voted into
//                   24 bits, Golay-decoded into 12 bits and hashed; after
//                   the last round the 128-bit key is valid.
//                   uncorrectable_o reports that some round held more
//                   errors than the Golay code corrects.
//   self-test       the blocks form a loop (daisy chain): the hash LFSR
//                   supplies the 12-bit pattern, the Golay encoder output
//                   is repeated, optionally scrambled by the SISR on the
//                   serial line, voted, decoded and compacted into the
//                   hash accumulator.  The SISR is switched into the loop
//                   at the first round that starts at or after cycle
//                   sisr_start_i (0: SISR from the start; beyond the budget:
//                   the plain daisy chain).  The test ends at the first
//                   round boundary at or after TEST_CYCLES cycles, and the
//                   accumulator is given out as signature_o.  PUF, helper
//                   data and seed ports stay idle in self-test.
// The blocks, their order, the round counts, the daisy chain and the SISR
// position follow the design; the port protocol, the sequencing (blocks
// run one after the other, no overlap between rounds), the end-of-test
// rule and feeding the seed to the hash during enrollment are this
// implementation's choices.
//
// Interface and timing: mode_i is sampled with start_i; busy_o is high
// until done_o pulses.  seed_i is sampled in cycles where seed_req_o is
// high.  PUF and helper-data bits are addressed by addr_o (round*264+bit)
// and must be valid in the cycle their read strobe is high.  A round takes
// 270 cycles in enrollment and about 310 in reconstruction and self-test.
module fuzzy_extractor
  import fe_pkg::*;
#(
  parameter int unsigned ROUNDS      = 86,
  parameter int unsigned TEST_CYCLES = 150000,
  parameter int unsigned ADDR_W      = $clog2(ROUNDS * RUN_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start_i,
  input  fe_mode_e          mode_i,
  output logic              busy_o,
  output logic              done_o,
  // random seed (enrollment)
  output logic              seed_req_o,
  input  logic [MSG_W-1:0]  seed_i,
  // PUF and helper-data memory
  output logic [ADDR_W-1:0] addr_o,
  output logic              puf_rd_o,
  input  logic              puf_bit_i,
  output logic              hd_rd_o,
  input  logic              hd_bit_i,
  output logic              hd_we_o,
  output logic              hd_bit_o,
  // key
  output logic [KEY_W-1:0]  key_o,
  output logic              key_valid_o,
  output logic              uncorrectable_o,
  // self-test
  input  logic [31:0]       sisr_start_i,
  output logic              sisr_active_o,
  output logic [31:0]       test_rounds_o,
  output logic [KEY_W-1:0]  signature_o,
  output logic              signature_valid_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_SEED, S_ENC_WAIT, S_RE_WAIT, S_RD_START, S_RD_WAIT, S_GD_WAIT,
    S_HASH_WAIT, S_FINISH
  } state_e;

  state_e   state_q;
  fe_mode_e mode_q;
  logic [$clog2(ROUNDS+1)-1:0] round_q;
  logic [31:0] cycle_q;
  logic        last_round;

  // block handshakes
  logic              ge_start, ge_done;
  logic [MSG_W-1:0]  ge_msg;
  logic [CODE_W-1:0] ge_code;
  logic              re_start, re_done, re_bit, re_valid, re_ready;
  logic              rd_start, rd_done, rd_bit, rd_valid, rd_ready;
  logic [CODE_W-1:0] rd_word;
  logic              gd_start, gd_done, gd_fail;
  logic [MSG_W-1:0]  gd_msg;
  golay_case_e       gd_case;
  logic              h_clear, h_start, h_last, h_done, h_busy, h_key_valid;
  logic [MSG_W-1:0]  h_word, h_prng;
  logic [KEY_W-1:0]  h_key, h_acc;
  logic              loop_bit;
  logic              op_clear;
  fe_mode_e          pc_mode;

  assign last_round = (round_q == ($bits(round_q))'(ROUNDS - 1));
  assign op_clear   = start_i && (state_q == S_IDLE);
  assign busy_o     = (state_q != S_IDLE);
  assign pc_mode    = busy_o ? mode_q : MODE_IDLE;
  assign seed_req_o = (state_q == S_SEED) && (mode_q == MODE_ENROLL);

  // ---------------------------------------------------------------- blocks
  assign ge_start = (state_q == S_SEED);
  assign ge_msg   = (mode_q == MODE_ENROLL) ? seed_i : h_prng;

  golay_encoder u_ge (
    .clk, .rst_n, .start_i(ge_start), .msg_i(ge_msg),
    .done_o(ge_done), .code_o(ge_code)
  );

  assign re_start = (state_q == S_ENC_WAIT) && ge_done;

  repetition_encoder u_re (
    .clk, .rst_n, .start_i(re_start), .code_i(ge_code),
    .bit_o(re_bit), .valid_o(re_valid), .ready_i(re_ready), .done_o(re_done)
  );

  sisr u_sisr (
    .clk, .rst_n, .clear_i(op_clear), .en_i(sisr_active_o),
    .bit_i(re_bit), .valid_i(re_valid), .ready_i(re_ready),
    .bit_o(loop_bit), .state_o()
  );

  peripheral_circuitry #(.ADDR_W(ADDR_W)) u_pc (
    .clk, .rst_n, .mode_i(pc_mode), .clear_i(op_clear),
    .re_bit_i(re_bit), .re_valid_i(re_valid), .re_ready_o(re_ready),
    .loop_bit_i(loop_bit),
    .rd_bit_o(rd_bit), .rd_valid_o(rd_valid), .rd_ready_i(rd_ready),
    .addr_o, .puf_rd_o, .puf_bit_i, .hd_rd_o, .hd_bit_i, .hd_we_o, .hd_bit_o
  );

  // Reconstruction starts the decoder on its own; self-test starts it
  // together with the encoder so the loop streams through.
  assign rd_start = ((state_q == S_RD_START) && (mode_q == MODE_RECONSTRUCT)) ||
                    ((mode_q == MODE_SELFTEST) && re_start);

  repetition_decoder u_rd (
    .clk, .rst_n, .start_i(rd_start), .bit_i(rd_bit), .valid_i(rd_valid),
    .ready_o(rd_ready), .done_o(rd_done), .gd_o(rd_word)
  );

  assign gd_start = (state_q == S_RD_WAIT) && rd_done;

  golay_decoder u_gd (
    .clk, .rst_n, .start_i(gd_start), .gd_i(rd_word),
    .done_o(gd_done), .msg_o(gd_msg), .case_o(gd_case), .fail_o(gd_fail)
  );

  assign h_clear = op_clear;
  assign h_start = ((state_q == S_SEED) && (mode_q == MODE_ENROLL)) ||
                   ((state_q == S_GD_WAIT) && gd_done);
  assign h_word  = (mode_q == MODE_ENROLL) ? seed_i : gd_msg;
  assign h_last  = last_round && (mode_q != MODE_SELFTEST);

  hash_function u_hash (
    .clk, .rst_n, .clear_i(h_clear), .start_i(h_start), .word_i(h_word),
    .last_i(h_last), .done_o(h_done), .busy_o(h_busy), .key_o(h_key),
    .key_valid_o(h_key_valid), .prng_o(h_prng), .acc_o(h_acc)
  );

  // In self-test the key port stays quiet; the accumulator leaves only as
  // the final signature.
  assign key_o       = (mode_q != MODE_SELFTEST) ? h_key : '0;
  assign key_valid_o = (mode_q != MODE_SELFTEST) && h_key_valid;

  // ------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q           <= S_IDLE;
      mode_q            <= MODE_IDLE;
      round_q           <= '0;
      cycle_q           <= '0;
      done_o            <= 1'b0;
      sisr_active_o     <= 1'b0;
      test_rounds_o     <= '0;
      signature_o       <= '0;
      signature_valid_o <= 1'b0;
      uncorrectable_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (busy_o) cycle_q <= cycle_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (start_i && mode_i != MODE_IDLE) begin
          mode_q            <= mode_i;
          round_q           <= '0;
          cycle_q           <= '0;
          sisr_active_o     <= 1'b0;
          test_rounds_o     <= '0;
          signature_o       <= '0;
          signature_valid_o <= 1'b0;
          uncorrectable_o   <= 1'b0;
          state_q           <= (mode_i == MODE_RECONSTRUCT) ? S_RD_START : S_SEED;
        end
        S_SEED: begin
          if (mode_q == MODE_SELFTEST && cycle_q >= sisr_start_i)
            sisr_active_o <= 1'b1;
          state_q <= S_ENC_WAIT;
        end
        S_ENC_WAIT: if (ge_done)
          state_q <= (mode_q == MODE_ENROLL) ? S_RE_WAIT : S_RD_WAIT;
        S_RE_WAIT: if (re_done && !h_busy) begin
          round_q <= round_q + 1'b1;
          state_q <= last_round ? S_FINISH : S_SEED;
        end
        S_RD_START: state_q <= S_RD_WAIT;
        S_RD_WAIT:  if (rd_done) state_q <= S_GD_WAIT;
        S_GD_WAIT:  if (gd_done) begin
          if (mode_q == MODE_RECONSTRUCT && gd_fail) uncorrectable_o <= 1'b1;
          state_q <= S_HASH_WAIT;
        end
        S_HASH_WAIT: if (h_done) begin
          if (mode_q == MODE_SELFTEST) begin
            test_rounds_o <= test_rounds_o + 1;
            if (cycle_q >= TEST_CYCLES) begin
              signature_o       <= h_acc;
              signature_valid_o <= 1'b1;
              state_q           <= S_FINISH;
            end else begin
              state_q <= S_SEED;
            end
          end else begin
            round_q <= round_q + 1'b1;
            state_q <= last_round ? S_FINISH : S_RD_START;
          end
        end
        S_FINISH: begin
          done_o  <= 1'b1;
          mode_q  <= MODE_IDLE;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Security rule: self-test never touches the PUF, the seed or the
  // helper-data memory.
  a_test_isolated: assert property (@(posedge clk) disable iff (!rst_n)
    (mode_q == MODE_SELFTEST) |-> !(puf_rd_o || hd_rd_o || hd_we_o || seed_req_o));

endmodule
