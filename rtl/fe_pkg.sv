// fe_pkg: types and constants shared by the fuzzy-extractor blocks.
//
// The code sizes follow the design: 12-bit seed words, a [24,12,8]
// extended Golay code, 11-fold repetition (264 serial bits per round),
// 86 rounds (1032 seed bits, 22704 PUF and helper-data bits) and a
// 128-bit key.  The Golay parity matrix B is the usual symmetric one with
// B*B = I: row i (i < 11) is the 11-bit pattern 11011100010 rotated left
// by i with a 1 appended, and row 11 is eleven 1s followed by a 0.  Bit j
// of golay_b_row(i) is column j.  The 128-bit hash LFSR uses the maximal
// polynomial with taps 128, 126, 101, 99; both the polynomial and the
// LFSR seed are choices of this design.
package fe_pkg;

  localparam int unsigned MSG_W   = 12;              // Golay message / seed word
  localparam int unsigned CODE_W  = 24;              // extended Golay code word
  localparam int unsigned REP_N   = 11;              // repetition factor
  localparam int unsigned RUN_LEN = CODE_W * REP_N;  // 264 serial bits per round
  localparam int unsigned KEY_W   = 128;             // cryptographic key

  // Operating modes selected by the peripheral circuitry.
  typedef enum logic [1:0] {
    MODE_IDLE        = 2'd0,
    MODE_ENROLL      = 2'd1,
    MODE_RECONSTRUCT = 2'd2,
    MODE_SELFTEST    = 2'd3
  } fe_mode_e;

  // Which error case of the Golay decoder produced the result.
  typedef enum logic [2:0] {
    GCASE_I     = 3'd0,  // no error
    GCASE_II    = 3'd1,  // <=3 message errors, parity clean
    GCASE_III   = 3'd2,  // <=2 message errors, 1 parity error
    GCASE_IV    = 3'd3,  // 1 message error, <=2 parity errors
    GCASE_V     = 3'd4,  // message clean, <=3 parity errors
    GCASE_FAIL  = 3'd5   // more than 3 errors, not correctable
  } golay_case_e;

  localparam logic [10:0] GOLAY_BASE = 11'b01000111011; // 11011100010 read with bit 0 first

  // Row i of the parity matrix B, bit j = column j.
  function automatic logic [MSG_W-1:0] golay_b_row(input int unsigned i);
    logic [MSG_W-1:0] r;
    if (i == MSG_W - 1) begin
      r = {1'b0, {(MSG_W-1){1'b1}}};
    end else begin
      for (int unsigned j = 0; j < MSG_W - 1; j++)
        r[j] = GOLAY_BASE[(j + i) % (MSG_W - 1)];
      r[MSG_W-1] = 1'b1;
    end
    return r;
  endfunction

  // v * B over GF(2): XOR of the rows selected by the ones of v.
  function automatic logic [MSG_W-1:0] golay_mul_b(input logic [MSG_W-1:0] v);
    logic [MSG_W-1:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < MSG_W; i++)
      if (v[i]) acc ^= golay_b_row(i);
    return acc;
  endfunction

  function automatic int unsigned popcount12(input logic [MSG_W-1:0] v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < MSG_W; i++) n += int'(v[i]);
    return n;
  endfunction

  // 128-bit hash LFSR step (Fibonacci form, shifts left).
  localparam logic [KEY_W-1:0] LFSR_SEED = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

  function automatic logic [KEY_W-1:0] lfsr_next(input logic [KEY_W-1:0] s);
    return {s[KEY_W-2:0], s[127] ^ s[125] ^ s[100] ^ s[98]};
  endfunction

endpackage
