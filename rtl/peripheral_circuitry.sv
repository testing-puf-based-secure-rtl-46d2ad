// peripheral_circuitry: mode selection and the XOR between the PUF and the
// serial code streams, plus the serial bit address of the PUF and the
// helper-data memory.
//
// Enrollment:     helper bit = RE_O ^ PUF bit, written to the helper-data
//                 memory; one PUF bit is read per repetition-encoder bit.
// Reconstruction: RD_I = stored helper bit ^ PUF bit, one PUF bit and one
//                 helper bit read per bit the repetition decoder accepts.
// Self-test:      the repetition-encoder stream (after the optional SISR,
//                 loop_bit_i) goes straight to the repetition decoder; the
//                 PUF and helper-data strobes stay low, so no PUF bit is
//                 read and nothing is written during test.
// The two XOR functions and the mode selection are those of the design;
// the strobe-and-address interface to the PUF and the memory, and the
// self-test routing through this block, are this implementation's choices.
//
// Interface and timing: all data paths are combinational.  The PUF and the
// memory must present the bit at addr_o in the cycle their read strobe is
// high (puf_rd_o, hd_rd_o); a write (hd_we_o) takes effect at the rising
// edge.  addr_o counts transferred bits from clear_i and advances on each
// edge with a transfer.
module peripheral_circuitry
  import fe_pkg::*;
#(
  parameter int unsigned ADDR_W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fe_mode_e          mode_i,
  input  logic              clear_i,
  // repetition encoder side
  input  logic              re_bit_i,
  input  logic              re_valid_i,
  output logic              re_ready_o,
  input  logic              loop_bit_i,
  // repetition decoder side
  output logic              rd_bit_o,
  output logic              rd_valid_o,
  input  logic              rd_ready_i,
  // PUF and helper-data memory
  output logic [ADDR_W-1:0] addr_o,
  output logic              puf_rd_o,
  input  logic              puf_bit_i,
  output logic              hd_rd_o,
  input  logic              hd_bit_i,
  output logic              hd_we_o,
  output logic              hd_bit_o
);

  logic step;

  always_comb begin
    re_ready_o = 1'b0;
    rd_bit_o   = 1'b0;
    rd_valid_o = 1'b0;
    puf_rd_o   = 1'b0;
    hd_rd_o    = 1'b0;
    hd_we_o    = 1'b0;
    hd_bit_o   = 1'b0;
    step       = 1'b0;
    unique case (mode_i)
      MODE_ENROLL: begin
        re_ready_o = 1'b1;
        puf_rd_o   = re_valid_i;
        hd_we_o    = re_valid_i;
        hd_bit_o   = re_bit_i ^ puf_bit_i;
        step       = re_valid_i;
      end
      MODE_RECONSTRUCT: begin
        rd_valid_o = 1'b1;
        rd_bit_o   = hd_bit_i ^ puf_bit_i;
        puf_rd_o   = rd_ready_i;
        hd_rd_o    = rd_ready_i;
        step       = rd_ready_i;
      end
      MODE_SELFTEST: begin
        rd_bit_o   = loop_bit_i;
        rd_valid_o = re_valid_i;
        re_ready_o = rd_ready_i;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr_o <= '0;
    else if (clear_i) addr_o <= '0;
    else if (step)    addr_o <= addr_o + 1'b1;
  end

endmodule
