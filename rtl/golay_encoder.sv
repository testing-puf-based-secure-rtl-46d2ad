// golay_encoder: systematic [24,12,8] extended Golay encoder.
//
// A 12-bit message word is turned into a 24-bit code word by appending the
// 12 parity bits p = m * B (B from fe_pkg).  The code word is laid out as
// code_o[11:0] = message, code_o[23:12] = parity.  The 12-bit in, 24-bit
// out function and the two-cycle latency are those of the design; the
// two-stage split (stage 1 captures the message, stage 2 forms the parity
// as an XOR of matrix rows and registers the code word) and the bit layout
// are this implementation's choice.
//
// Interface and timing: start_i is sampled with msg_i at a rising edge;
// two edges later done_o is high for one cycle and code_o holds the code
// word until the next start.  A start while busy restarts the pipeline.
module golay_encoder
  import fe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [MSG_W-1:0]  msg_i,
  output logic              done_o,
  output logic [CODE_W-1:0] code_o
);

  logic             stage1_q;
  logic [MSG_W-1:0] msg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1_q <= 1'b0;
      msg_q    <= '0;
      done_o   <= 1'b0;
      code_o   <= '0;
    end else begin
      stage1_q <= start_i;
      done_o   <= stage1_q;
      if (start_i) msg_q <= msg_i;
      if (stage1_q) code_o <= {golay_mul_b(msg_q), msg_q};
    end
  end

endmodule
