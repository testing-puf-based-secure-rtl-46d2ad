// sisr: single-input signature register for a serial line.
//
// Placed on the serial RE_O -> RD_I line of the self-test loop, it makes
// the bit stream pseudo-random so that the repetition and Golay decoders
// receive words with errors and every error case of the Golay decoder is
// exercised.  The register is an internal-XOR (Galois) divider: for each
// bit that passes, fb = state[W-1] ^ in, the state shifts left by one and
// is XORed with POLY when fb is 1, and fb is the output bit.  The width
// and polynomial (x^16 + x^12 + x^5 + 1) are this implementation's
// choices; the design only names the register and its place.
//
// Interface and timing: the stream passes through combinationally with
// its valid/ready handshake; the state moves on an edge where a bit is
// transferred (valid_i && ready_i) and en_i is high.  With en_i low the
// register is bypassed (out = in) and keeps its state.  clear_i loads the
// all-zero state.
module sisr #(
  parameter int unsigned     W    = 16,
  parameter logic [W-1:0]    POLY = 16'h1021
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear_i,
  input  logic en_i,
  input  logic bit_i,
  input  logic valid_i,
  input  logic ready_i,
  output logic bit_o,
  output logic [W-1:0] state_o
);

  logic [W-1:0] state_q;
  logic         fb;

  assign fb      = state_q[W-1] ^ bit_i;
  assign bit_o   = en_i ? fb : bit_i;
  assign state_o = state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       state_q <= '0;
    else if (clear_i)                 state_q <= '0;
    else if (en_i && valid_i && ready_i)
      state_q <= {state_q[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

endmodule
