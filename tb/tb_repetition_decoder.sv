// tb_repetition_decoder: feeds 24 groups of 11 bits, each group a code bit
// with up to 5 (correctable) or more flipped copies, and checks the
// majority word against a count made in the testbench, the 290-edge
// latency with the input always valid, and operation with input gaps.
module tb_repetition_decoder;
  logic clk = 0, rst_n = 0, start = 0, done, ready, bit_i = 0, valid = 0;
  logic [23:0] gd;
  int checks = 0, failures = 0;

  repetition_decoder dut (.clk, .rst_n, .start_i(start), .bit_i, .valid_i(valid),
                          .ready_o(ready), .done_o(done), .gd_o(gd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, n, ones;
    logic [263:0] stream;
    logic [23:0] expw, truew;
    bit gaps;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      gaps  = (t >= 25);
      truew = 24'($urandom);
      for (int g = 0; g < 24; g++) begin
        int flips;
        flips = (t < 20) ? $urandom_range(0, 5) : $urandom_range(0, 11);
        if (t == 0) flips = 5;
        if (t == 1) flips = 6;
        for (int k = 0; k < 11; k++) stream[g*11+k] = truew[g];
        for (int k = 0; k < flips; k++) stream[g*11+k] = ~truew[g];
        ones = 0;
        for (int k = 0; k < 11; k++) ones += int'(stream[g*11+k]);
        expw[g] = (ones >= 6);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0; n = 0;
      valid <= !gaps || 1'($urandom);
      bit_i <= stream[0];
      do begin
        @(posedge clk); lat++;
        if (valid && ready) n++;
        valid <= (n < 264) && (!gaps || 1'($urandom));
        bit_i <= (n < 264) ? stream[n] : 1'b0;
      end while (!done);
      valid <= 0;
      checks++;
      if (gd !== expw) begin failures++; $display("word %0d got %06h exp %06h", t, gd, expw); end
      if (t < 20 && t != 1) begin
        checks++;
        if (gd !== truew) begin failures++; $display("word %0d not corrected", t); end
      end
      if (!gaps) begin
        checks++;
        if (lat != 290) begin failures++; $display("latency %0d", lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
