// tb_fuzzy_extractor: end-to-end test of the fuzzy extractor at its
// default size (86 rounds, 150000-cycle self-test budget).
//
// Models in the testbench: a PUF (random 22704-bit response, with noise
// added for reconstruction), the helper-data memory and the seed source.
//   1. Enrollment: helper data must equal PUF ^ repeat11(Golay(seed)) bit
//      for bit, and the key must equal the reference hash of the seeds.
//   2. Reconstruction with a clean PUF: same key, every round in case (i).
//   3. Reconstruction with noise chosen so that rounds hit every decoder
//      case (i)-(v) and groups with up to 5 flipped copies are out-voted:
//      same key, nothing reported uncorrectable.
//   4. Reconstruction with four Golay errors in one round: uncorrectable_o
//      and a different key.
//   5. Self-test as the plain daisy chain, with the SISR from the start,
//      and with the SISR switched in after 25% of the budget: the signature
//      must match a round-by-round reference model of the loop, the run
//      must end at the first round boundary past the budget, and in self-
//      test the PUF, memory and seed ports must stay idle.
// The number of times each mechanism happened is counted and printed; a
// mechanism that never happened counts as a failure.
module tb_fuzzy_extractor;
  import fe_pkg::*;
  import tb_ref_pkg::*;

  localparam int NR = 86, NB = NR * 264, BUDGET = 150000;

  logic clk = 0, rst_n = 0, start = 0;
  fe_mode_e mode = MODE_IDLE;
  logic busy, done, seed_req, puf_rd, hd_rd, hd_we, hd_wbit, kv, unc, sisr_act, sig_valid;
  logic [11:0] seed;
  logic [14:0] addr;
  logic [127:0] key, sig;
  logic [31:0] sisr_start = '1, test_rounds;

  bit puf_enr [NB];
  bit noise   [NB];
  bit hd_mem  [NB];
  logic [11:0] seeds [NR];
  int seed_idx;

  int checks = 0, failures = 0;
  int cyc = 0;

  fuzzy_extractor dut (
    .clk, .rst_n, .start_i(start), .mode_i(mode), .busy_o(busy), .done_o(done),
    .seed_req_o(seed_req), .seed_i(seed),
    .addr_o(addr), .puf_rd_o(puf_rd), .puf_bit_i(puf_enr[addr] ^ noise[addr]),
    .hd_rd_o(hd_rd), .hd_bit_i(hd_mem[addr]), .hd_we_o(hd_we), .hd_bit_o(hd_wbit),
    .key_o(key), .key_valid_o(kv), .uncorrectable_o(unc),
    .sisr_start_i(sisr_start), .sisr_active_o(sisr_act), .test_rounds_o(test_rounds),
    .signature_o(sig), .signature_valid_o(sig_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign seed = seeds[seed_idx % NR];

  // seed source and helper-data memory
  always @(posedge clk) begin
    if (seed_req) seed_idx <= seed_idx + 1;
    if (hd_we) hd_mem[addr] <= hd_wbit;
  end

  // mechanism counters
  int gd_case_cnt [6];
  int isolation_viol = 0, puf_reads = 0, seed_reqs = 0, hd_writes = 0;
  int outvoted_groups = 0;
  int round_start [$];
  int sisr_first = -1;

  always @(posedge clk) begin
    if (dut.gd_done) gd_case_cnt[int'(dut.gd_case)]++;
    if (puf_rd) puf_reads++;
    if (seed_req) seed_reqs++;
    if (hd_we) hd_writes++;
    if (mode == MODE_SELFTEST && busy && (puf_rd || hd_rd || hd_we || seed_req)) isolation_viol++;
    if (dut.ge_start) round_start.push_back(cyc);
    if (sisr_act && dut.re_valid && sisr_first < 0) sisr_first = int'(test_rounds);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input fe_mode_e m, output int cycles);
    int t0;
    @(posedge clk);
    mode <= m; start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    cycles = cyc - t0;
    @(posedge clk);
  endtask

  function automatic logic [127:0] ref_key_of(input logic [11:0] w [NR]);
    logic [127:0] l, a;
    l = REF_LFSR_SEED; a = '0;
    for (int i = 0; i < NR; i++) ref_hash_word(l, a, w[i]);
    return a;
  endfunction

  // Round-by-round reference of the self-test loop.
  function automatic logic [127:0] ref_selftest(input int rounds, input int sisr_from);
    logic [127:0] l, a;
    logic [15:0] ss;
    logic [23:0] c, v;
    logic [11:0] mm;
    bit ok;
    int nm, np, ones;
    l = REF_LFSR_SEED; a = '0; ss = '0;
    for (int r = 0; r < rounds; r++) begin
      c = ref_golay_encode(l[11:0]);
      for (int g = 0; g < 24; g++) begin
        ones = 0;
        for (int k = 0; k < 11; k++)
          ones += int'((r >= sisr_from) ? ref_sisr_bit(ss, c[g]) : c[g]);
        v[g] = (ones >= 6);
      end
      mm = ref_golay_decode(v, ok, nm, np);
      ref_hash_word(l, a, mm);
    end
    return a;
  endfunction

  // Flip 6..11 copies of Golay bit g in round r (majority flips), or 1..5
  // copies (out-voted).
  task automatic flip_group(input int r, input int g, input bit majority);
    int n;
    n = majority ? $urandom_range(6, 11) : $urandom_range(1, 5);
    for (int k = 0; k < n; k++) noise[r*264 + g*11 + k] = 1;
  endtask

  initial begin
    int cycles, lat_e, lat_r, expect_unc_round;
    logic [127:0] enr_key, rk;
    logic [23:0] c;
    bit ok;
    int cnt_before [6];
    seed_idx = 0;
    for (int i = 0; i < NB; i++) begin puf_enr[i] = 1'($urandom); noise[i] = 0; hd_mem[i] = 0; end
    for (int i = 0; i < NR; i++) seeds[i] = 12'($urandom);
    seeds[0] = 12'h000; seeds[1] = 12'hFFF;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---- 1. enrollment
    run(MODE_ENROLL, lat_e);
    enr_key = key;
    chk(kv, "key valid after enrollment");
    chk(key == ref_key_of(seeds), "enrollment key equals reference hash of the seeds");
    chk(seed_reqs == NR, $sformatf("%0d seed words requested", seed_reqs));
    chk(hd_writes == NB, $sformatf("%0d helper bits written", hd_writes));
    begin
      int bad = 0;
      for (int r = 0; r < NR; r++) begin
        c = ref_golay_encode(seeds[r]);
        for (int b = 0; b < 264; b++)
          if (hd_mem[r*264+b] != (puf_enr[r*264+b] ^ c[b/11])) bad++;
      end
      chk(bad == 0, $sformatf("helper data mismatches: %0d", bad));
    end
    $display("enrollment: %0d cycles", lat_e);
    chk(lat_e >= NR * 267 && lat_e <= NR * 275, "enrollment cycle count");

    // ---- 2. reconstruction, clean PUF
    cnt_before = gd_case_cnt;
    run(MODE_RECONSTRUCT, lat_r);
    $display("reconstruction: %0d cycles", lat_r);
    chk(kv && key == enr_key, "clean reconstruction key");
    chk(!unc, "clean reconstruction correctable");
    chk(gd_case_cnt[0] - cnt_before[0] == NR, "clean PUF: all rounds case (i)");
    chk(lat_r >= NR * (290 + 4 + 14) && lat_r <= NR * (290 + 10 + 14 + 6), "reconstruction cycle count");

    // ---- 3. reconstruction, correctable noise
    for (int r = 0; r < NR; r++) begin
      int kind, perm [24], nmsg, npar;
      for (int g = 0; g < 24; g++) perm[g] = g;
      perm.shuffle();
      kind = r % 6;
      case (kind)
        0: begin nmsg = 0; npar = 0; end
        1: begin nmsg = $urandom_range(1, 3); npar = 0; end
        2: begin nmsg = $urandom_range(1, 2); npar = 1; end
        3: begin nmsg = 1; npar = $urandom_range(1, 2); end
        4: begin nmsg = 0; npar = $urandom_range(1, 3); end
        default: begin nmsg = 0; npar = 0; end
      endcase
      begin
        int placed_m, placed_p;
        placed_m = 0; placed_p = 0;
        for (int i = 0; i < 24; i++) begin
          int g;
          g = perm[i];
          if (g < 12 && placed_m < nmsg) begin flip_group(r, g, 1); placed_m++; end
          else if (g >= 12 && placed_p < npar) begin flip_group(r, g, 1); placed_p++; end
          else if ($urandom_range(0, 3) == 0) begin flip_group(r, g, 0); outvoted_groups++; end
        end
      end
    end
    cnt_before = gd_case_cnt;
    run(MODE_RECONSTRUCT, lat_r);
    chk(kv && key == enr_key, "noisy reconstruction key");
    chk(!unc, "noisy reconstruction correctable");
    for (int k = 0; k < 5; k++) begin
      $display("noisy reconstruction: decoder case %0d in %0d rounds", k, gd_case_cnt[k] - cnt_before[k]);
      chk(gd_case_cnt[k] - cnt_before[k] > 0, $sformatf("decoder case %0d exercised in reconstruction", k));
    end
    $display("noisy reconstruction: %0d groups out-voted by the repetition decoder", outvoted_groups);
    chk(outvoted_groups > 0, "repetition majority exercised");

    // ---- 4. reconstruction, four Golay errors in round 7
    for (int i = 0; i < NB; i++) noise[i] = 0;
    for (int g = 0; g < 4; g++) flip_group(7, g * 5, 1);
    run(MODE_RECONSTRUCT, lat_r);
    chk(unc, "four errors reported uncorrectable");
    chk(key != enr_key, "four errors change the key");
    for (int i = 0; i < NB; i++) noise[i] = 0;

    // ---- 5. self-test
    for (int s = 0; s < 3; s++) begin
      int first_expected, nrounds;
      sisr_start = (s == 0) ? 32'hFFFF_FFFF : (s == 1) ? 32'd0 : 32'(BUDGET / 4);
      cnt_before = gd_case_cnt;
      puf_reads = 0; seed_reqs = 0; hd_writes = 0; isolation_viol = 0;
      round_start.delete();
      sisr_first = -1;
      run(MODE_SELFTEST, cycles);
      nrounds = int'(test_rounds);
      $display("self-test %0d: %0d rounds, %0d cycles, signature %h", s, nrounds, cycles, sig);
      for (int k = 0; k < 6; k++)
        $display("  decoder case %0d: %0d", k, gd_case_cnt[k] - cnt_before[k]);
      chk(sig_valid, "signature valid");
      chk(isolation_viol == 0 && puf_reads == 0 && hd_writes == 0 && seed_reqs == 0,
          "self-test leaves PUF, memory and seed untouched");
      chk(!kv && key == '0, "no key output during self-test");
      chk(round_start.size() == nrounds, "one encoder start per round");
      chk(cycles >= BUDGET && round_start[nrounds-1] - round_start[0] < BUDGET,
          "test ends at the first round boundary past the budget");
      first_expected = (s == 0) ? nrounds : sisr_first;
      if (s == 1) chk(sisr_first == 0, "SISR active from the first round");
      if (s == 2) begin
        chk(sisr_first > 0 && sisr_first < nrounds, "SISR switched in during the test");
        chk(round_start[sisr_first] - round_start[0] + 1 >= BUDGET / 4 &&
            round_start[sisr_first - 1] - round_start[0] + 1 < BUDGET / 4,
            "SISR switched in at the first round after 25% of the budget");
      end
      chk(sig == ref_selftest(nrounds, first_expected), "signature equals loop reference");
      if (s == 0) begin
        chk(!sisr_act, "plain daisy chain never enables the SISR");
        chk(gd_case_cnt[0] - cnt_before[0] == nrounds, "plain daisy chain: decoder only sees error-free words");
      end else begin
        for (int k = 0; k < 6; k++)
          chk(gd_case_cnt[k] - cnt_before[k] > 0, $sformatf("self-test %0d exercises decoder case %0d", s, k));
      end
    end

    // ---- 6. enrollment again after a self-test gives the same helper data and key
    seed_idx = 0;
    run(MODE_ENROLL, lat_e);
    chk(key == enr_key, "enrollment repeatable after self-test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
