// tb_sisr: streams random bits with random valid/ready through the SISR,
// enabled and bypassed, and compares the output bits and final state with
// the reference divider; also checks clear_i and that bypass keeps the
// state.
module tb_sisr;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, bi = 0, valid = 0, ready = 0, bo;
  logic [15:0] st;
  int checks = 0, failures = 0;

  sisr dut (.clk, .rst_n, .clear_i(clear), .en_i(en), .bit_i(bi), .valid_i(valid),
            .ready_i(ready), .bit_o(bo), .state_o(st));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rs;
    logic eb;
    int ndiff;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    rs = '0; ndiff = 0;
    for (int i = 0; i < 4000; i++) begin
      en    <= (i < 3000) || (i % 2 == 0);
      bi    <= (i < 100) ? 1'b1 : 1'($urandom);
      valid <= 1'($urandom);
      ready <= 1'($urandom);
      #1;
      if (en) begin
        logic [15:0] tmp;
        tmp = rs;
        eb = ref_sisr_bit(tmp, bi);
        if (valid && ready) rs = tmp;
      end else eb = bi;
      checks++;
      if (bo !== eb) begin failures++; $display("bit %0d got %0b exp %0b", i, bo, eb); end
      if (bo !== bi) ndiff++;
      @(posedge clk);
      #1;
      checks++;
      if (st !== rs) begin failures++; $display("state %04h exp %04h", st, rs); end
    end
    checks++;
    if (ndiff < 500) begin failures++; $display("stream hardly changed: %0d", ndiff); end
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    #1;
    checks++;
    if (st !== 16'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
