// tb_golay_decoder: decodes code words with 0 to 4 random bit errors and
// compares the message, the error case and the failure flag with a
// brute-force nearest-code-word search.  Also counts how often each case
// (i) to (v) occurred (each must occur) and checks the latency: 4 edges
// for an error-free word and never more than 10.
module tb_golay_decoder;
  import tb_ref_pkg::*;
  import fe_pkg::golay_case_e;

  logic clk = 0, rst_n = 0, start = 0, done, fail;
  logic [23:0] gd = '0;
  logic [11:0] msg;
  golay_case_e gcase;
  int checks = 0, failures = 0;
  int seen [6];

  golay_decoder dut (.clk, .rst_n, .start_i(start), .gd_i(gd), .done_o(done),
                     .msg_o(msg), .case_o(gcase), .fail_o(fail));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, nm, np, exp_case, nerr;
    bit ok;
    logic [11:0] m, expm;
    logic [23:0] r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      m = 12'($urandom);
      r = ref_golay_encode(m);
      nerr = t % 5;
      for (int k = 0; k < nerr; k++) begin
        int pos;
        do pos = $urandom_range(0, 23); while (r[pos] != ref_golay_encode(m)[pos]);
        r[pos] = ~r[pos];
      end
      expm = ref_golay_decode(r, ok, nm, np);
      exp_case = ref_case(ok, nm, np);
      start <= 1; gd <= r;
      @(posedge clk);
      start <= 0; gd <= 24'($urandom);
      lat = 0;
      do begin @(posedge clk); lat++; end while (!done);
      seen[int'(gcase)]++;
      checks++;
      if (msg !== expm) begin failures++; $display("r=%06h msg=%03h exp=%03h", r, msg, expm); end
      checks++;
      if (int'(gcase) != exp_case) begin failures++; $display("r=%06h case %0d exp %0d", r, gcase, exp_case); end
      checks++;
      if (fail !== !ok) begin failures++; $display("r=%06h fail flag", r); end
      if (nerr <= 3) begin
        checks++;
        if (msg !== m) begin failures++; $display("r=%06h not corrected", r); end
      end
      checks++;
      if (lat > 10 || (exp_case == 0 && lat != 4)) begin failures++; $display("latency %0d case %0d", lat, exp_case); end
    end
    for (int c = 0; c < 6; c++) begin
      $display("case %0d seen %0d times", c, seen[c]);
      checks++;
      if (seen[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
