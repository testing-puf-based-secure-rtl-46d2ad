// tb_repetition_encoder: sends random code words through the repetition
// encoder, with ready held high and with random stalls, and checks that
// the serial stream is each code bit 11 times (bit 0 first), 264 bits in
// all, and that done_o arrives 267 edges after start_i without stalls.
module tb_repetition_encoder;
  logic clk = 0, rst_n = 0, start = 0, done, bit_o, valid, ready = 1;
  logic [23:0] code = '0;
  int checks = 0, failures = 0;

  repetition_encoder dut (.clk, .rst_n, .start_i(start), .code_i(code),
                          .bit_o, .valid_o(valid), .ready_i(ready), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, n;
    logic [23:0] w;
    bit stall;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      stall = (t >= 20);
      w = (t == 0) ? 24'hFFFFFF : (t == 1) ? 24'h000001 : 24'($urandom);
      start <= 1; code <= w;
      @(posedge clk);
      start <= 0; code <= 24'($urandom);
      lat = 0; n = 0;
      do begin
        ready <= stall ? 1'($urandom) : 1'b1;
        @(posedge clk); lat++;
        if (valid && ready) begin
          checks++;
          if (n >= 264 || bit_o !== w[n / 11]) begin
            failures++; $display("word %0d bit %0d got %0b", t, n, bit_o);
          end
          n++;
        end
      end while (!done);
      ready <= 1;
      checks++;
      if (n != 264) begin failures++; $display("word %0d: %0d bits", t, n); end
      if (!stall) begin
        checks++;
        if (lat != 267) begin failures++; $display("latency %0d", lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
