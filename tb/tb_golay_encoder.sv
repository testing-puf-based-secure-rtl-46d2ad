// tb_golay_encoder: checks all 4096 messages of the Golay encoder against
// the reference encoder, that every code word has weight 0, 8, 12, 16 or
// 24, and that done_o comes exactly two edges after start_i.
module tb_golay_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [11:0] msg = '0;
  logic [23:0] code;
  int checks = 0, failures = 0;

  golay_encoder dut (.clk, .rst_n, .start_i(start), .msg_i(msg), .done_o(done), .code_o(code));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, w;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < 4096; m++) begin
      start <= 1; msg <= 12'(m);
      @(posedge clk);
      start <= 0; msg <= 12'($urandom);
      lat = 0;
      do begin @(posedge clk); lat++; end while (!done);
      checks++;
      if (lat != 2) begin failures++; $display("latency %0d for m=%0d", lat, m); end
      checks++;
      if (code !== ref_golay_encode(12'(m))) begin
        failures++; $display("m=%03h code=%06h exp=%06h", m, code, ref_golay_encode(12'(m)));
      end
      w = ref_weight24(code);
      checks++;
      if (!(w == 0 || w == 8 || w == 12 || w == 16 || w == 24)) begin
        failures++; $display("m=%03h weight %0d", m, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
