// tb_peripheral_circuitry: drives random stream, PUF and helper-data bits
// in every mode and checks the XOR results, the handshake routing, that
// self-test and idle never strobe the PUF or the memory, and that the bit
// address counts exactly the transferred bits and clears.
module tb_peripheral_circuitry;
  import fe_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  fe_mode_e mode = MODE_IDLE;
  logic re_bit = 0, re_valid = 0, re_ready, loop_bit = 0;
  logic rd_bit, rd_valid, rd_ready = 0;
  logic [14:0] addr;
  logic puf_rd, puf_bit = 0, hd_rd, hd_bit = 0, hd_we, hd_out;
  int checks = 0, failures = 0;

  peripheral_circuitry dut (
    .clk, .rst_n, .mode_i(mode), .clear_i(clear),
    .re_bit_i(re_bit), .re_valid_i(re_valid), .re_ready_o(re_ready), .loop_bit_i(loop_bit),
    .rd_bit_o(rd_bit), .rd_valid_o(rd_valid), .rd_ready_i(rd_ready),
    .addr_o(addr), .puf_rd_o(puf_rd), .puf_bit_i(puf_bit), .hd_rd_o(hd_rd),
    .hd_bit_i(hd_bit), .hd_we_o(hd_we), .hd_bit_o(hd_out));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: mode %s got %0b exp %0b", what, mode.name(), got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expaddr;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    expaddr = 0;
    for (int i = 0; i < 4000; i++) begin
      mode     <= fe_mode_e'(i / 1000);
      re_bit   <= 1'($urandom); re_valid <= 1'($urandom); loop_bit <= 1'($urandom);
      rd_ready <= 1'($urandom); puf_bit  <= 1'($urandom); hd_bit   <= 1'($urandom);
      #1;
      unique case (mode)
        MODE_ENROLL: begin
          check(hd_out, re_bit ^ puf_bit, "helper bit");
          check(hd_we, re_valid, "helper write");
          check(puf_rd, re_valid, "puf read");
          check(re_ready, 1'b1, "re ready");
          check(hd_rd, 1'b0, "no helper read");
          check(rd_valid, 1'b0, "no rd valid");
          if (re_valid) expaddr++;
        end
        MODE_RECONSTRUCT: begin
          check(rd_bit, hd_bit ^ puf_bit, "rd bit");
          check(rd_valid, 1'b1, "rd valid");
          check(puf_rd, rd_ready, "puf read");
          check(hd_rd, rd_ready, "helper read");
          check(hd_we, 1'b0, "no helper write");
          if (rd_ready) expaddr++;
        end
        MODE_SELFTEST: begin
          check(rd_bit, loop_bit, "loop bit");
          check(rd_valid, re_valid, "loop valid");
          check(re_ready, rd_ready, "loop ready");
          check(puf_rd | hd_rd | hd_we, 1'b0, "test isolation");
        end
        default: begin
          check(puf_rd | hd_rd | hd_we | rd_valid | re_ready, 1'b0, "idle");
        end
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (int'(addr) != expaddr % 32768) begin failures++; $display("addr %0d exp %0d", addr, expaddr); end
      if (i == 2500) begin
        clear <= 1; @(posedge clk); clear <= 0; expaddr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
