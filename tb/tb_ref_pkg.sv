// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL.  The Golay parity matrix is given here as twelve literal rows
// (bit j = column j) of the standard symmetric matrix of the [24,12,8]
// extended Golay code; decoding is done by brute force over all 4096 code
// words instead of by syndromes.
package tb_ref_pkg;

  localparam logic [11:0] REF_B [12] = '{
    12'hA3B, 12'hD1D, 12'hE8E, 12'hB47, 12'hDA3, 12'hED1,
    12'hF68, 12'hBB4, 12'h9DA, 12'h8ED, 12'hC76, 12'h7FF
  };

  function automatic logic [23:0] ref_golay_encode(input logic [11:0] m);
    logic [11:0] p;
    p = '0;
    for (int i = 0; i < 12; i++) if (m[i]) p ^= REF_B[i];
    return {p, m};
  endfunction

  function automatic int ref_weight24(input logic [23:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 24; i++) n += int'(v[i]);
    return n;
  endfunction

  // Nearest code word within distance 3; if none, the received message bits
  // and ok = 0.  nerr_m / nerr_p give the error count on message / parity.
  function automatic logic [11:0] ref_golay_decode(input logic [23:0] r,
                                                   output bit ok,
                                                   output int nerr_m,
                                                   output int nerr_p);
    logic [23:0] e;
    ok = 0; nerr_m = 0; nerr_p = 0;
    for (int m = 0; m < 4096; m++) begin
      e = ref_golay_encode(12'(m)) ^ r;
      if (ref_weight24(e) <= 3) begin
        ok = 1;
        nerr_m = ref_weight24({12'b0, e[11:0]});
        nerr_p = ref_weight24({12'b0, e[23:12]});
        return 12'(m);
      end
    end
    return r[11:0];
  endfunction

  // Which error case of the decoder applies to (message errors, parity errors).
  function automatic int ref_case(input bit ok, input int nm, input int np);
    if (!ok)                   return 5;
    if (nm == 0 && np == 0)    return 0;
    if (np == 0)               return 1;
    if (np == 1 && nm <= 2)    return 2;
    if (nm == 1)               return 3;
    return 4;
  endfunction

  // Hash reference: 128-bit LFSR (taps 128,126,101,99) stepped per bit,
  // XORed into the accumulator for every 1 bit, bit 0 of each word first.
  localparam logic [127:0] REF_LFSR_SEED = 128'h0123456789ABCDEFFEDCBA9876543210;

  function automatic logic [127:0] ref_lfsr_step(input logic [127:0] s);
    logic nb;
    nb = s[127] ^ s[125] ^ s[100] ^ s[98];
    return {s[126:0], nb};
  endfunction

  function automatic void ref_hash_word(inout logic [127:0] lfsr, inout logic [127:0] acc,
                               input logic [11:0] w);
    for (int i = 0; i < 12; i++) begin
      if (w[i]) acc ^= lfsr;
      lfsr = ref_lfsr_step(lfsr);
    end
  endfunction

  // SISR reference (16 bits, polynomial 0x1021): returns the output bit.
  function automatic logic ref_sisr_bit(inout logic [15:0] st, input logic b);
    logic fb;
    fb = st[15] ^ b;
    st = {st[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0);
    return fb;
  endfunction

endpackage
