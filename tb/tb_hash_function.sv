// tb_hash_function: hashes several 86-word key derivations and compares
// the key with the reference LFSR/accumulator model, checks that the key
// is published only after the word marked last, that clear_i restarts the
// derivation, that prng_o follows the LFSR, and the 14-edge word latency.
module tb_hash_function;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, start = 0, last = 0, done, busy, kv;
  logic [11:0] word = '0, prng;
  logic [127:0] key, acc;
  int checks = 0, failures = 0;

  hash_function dut (.clk, .rst_n, .clear_i(clear), .start_i(start), .word_i(word),
                     .last_i(last), .done_o(done), .busy_o(busy), .key_o(key),
                     .key_valid_o(kv), .prng_o(prng), .acc_o(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rl, ra;
    logic [11:0] w;
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      clear <= 1;
      @(posedge clk);
      clear <= 0;
      @(posedge clk);
      rl = REF_LFSR_SEED; ra = '0;
      for (int i = 0; i < 86; i++) begin
        w = (k == 0) ? 12'hFFF : (k == 1) ? 12'h000 : 12'($urandom);
        checks++;
        if (prng !== rl[11:0]) begin failures++; $display("prng %03h exp %03h", prng, rl[11:0]); end
        start <= 1; word <= w; last <= (i == 85);
        @(posedge clk);
        start <= 0; word <= 12'($urandom); last <= 0;
        lat = 0;
        do begin @(posedge clk); lat++; end while (!done);
        ref_hash_word(rl, ra, w);
        checks++;
        if (lat != 14) begin failures++; $display("latency %0d", lat); end
        checks++;
        if (acc !== ra) begin failures++; $display("acc mismatch k=%0d i=%0d", k, i); end
        if (i < 85) begin
          checks++;
          if (kv) begin failures++; $display("key valid too early"); end
        end
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      checks++;
      if (!kv || key !== ra) begin failures++; $display("key mismatch k=%0d %h exp %h", k, key, ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
