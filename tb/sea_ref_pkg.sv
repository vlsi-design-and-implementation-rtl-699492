// sea_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL and at the default sizes (SEA_96,8, an
// MSIC generator with a 12-bit seed and an 11-stage Johnson counter, a 96-bit MISR): the S-box is a table look-up per
// bit position, the key schedule fills whole arrays first, the generator is
// modelled from its state sequence. Nothing here is synthesizable design.
package sea_ref_pkg;

  localparam int HB  = 48;  // half block
  localparam int WB  = 8;   // word bits
  localparam int NBW = 6;   // words per half

  typedef logic [HB-1:0] half_t;

  localparam logic [2:0] SBOX [8] = '{3'd0, 3'd5, 3'd6, 3'd7, 3'd4, 3'd3, 3'd1, 3'd2};

  function automatic logic [WB-1:0] word(half_t x, int i);
    return x[WB*i +: WB];
  endfunction

  function automatic half_t add(half_t x, half_t k);
    half_t y;
    for (int i = 0; i < NBW; i++) y[WB*i +: WB] = (word(x, i) + word(k, i)) % 256;
    return y;
  endfunction

  function automatic half_t sbox(half_t x);
    half_t y;
    for (int t = 0; t < NBW / 3; t++)
      for (int p = 0; p < WB; p++) begin
        logic [2:0] v;
        v = {x[WB*(3*t+2) + p], x[WB*(3*t+1) + p], x[WB*(3*t) + p]};
        v = SBOX[v];
        y[WB*(3*t) + p]   = v[0];
        y[WB*(3*t+1) + p] = v[1];
        y[WB*(3*t+2) + p] = v[2];
      end
    return y;
  endfunction

  function automatic half_t bitrot(half_t x);
    half_t y = x;
    for (int t = 0; t < NBW / 3; t++)
      for (int p = 0; p < WB; p++) begin
        // word 3t: y[p] = x[p+1] (rotate right); word 3t+2: y[p] = x[p-1]
        y[WB*(3*t) + p]   = x[WB*(3*t) + (p + 1) % WB];
        y[WB*(3*t+2) + p] = x[WB*(3*t+2) + (p + WB - 1) % WB];
      end
    return y;
  endfunction

  function automatic half_t wrot(half_t x);      // word i -> word i+1
    half_t y;
    for (int i = 0; i < NBW; i++) y[WB*((i + 1) % NBW) +: WB] = word(x, i);
    return y;
  endfunction

  function automatic half_t wrot_inv(half_t x);  // word i+1 -> word i
    half_t y;
    for (int i = 0; i < NBW; i++) y[WB*i +: WB] = word(x, (i + 1) % NBW);
    return y;
  endfunction

  // one data round, returns {L', R'}
  function automatic logic [2*HB-1:0] fe(half_t l, half_t r, half_t k, bit dec);
    half_t f = bitrot(sbox(add(r, k)));
    if (!dec) return {r, wrot(l) ^ f};
    else      return {r, wrot_inv(l ^ f)};
  endfunction

  // one key round, returns {KL', KR'}
  function automatic logic [2*HB-1:0] fk(half_t kl, half_t kr, half_t c);
    return {kr, kl ^ wrot(bitrot(sbox(add(kr, c))))};
  endfunction

  function automatic half_t const_c(int i);
    half_t c = '0;
    c[7:0] = i[7:0];
    return c;
  endfunction

  // Whole cipher following the round-by-round definition.
  function automatic logic [2*HB-1:0] cipher(logic [2*HB-1:0] p, logic [2*HB-1:0] k,
                                             int nr, bit dec);
    half_t kl [] = new[nr];
    half_t kr [] = new[nr];
    half_t l, r, t;
    logic [2*HB-1:0] v;
    int h = nr / 2;
    kl[0] = k[2*HB-1:HB];
    kr[0] = k[HB-1:0];
    for (int i = 1; i <= h; i++) begin
      v = fk(kl[i-1], kr[i-1], const_c(i));
      kl[i] = v[2*HB-1:HB]; kr[i] = v[HB-1:0];
    end
    t = kl[h]; kl[h] = kr[h]; kr[h] = t;
    for (int i = (nr + 1) / 2; i <= nr - 1; i++) begin
      v = fk(kl[i-1], kr[i-1], const_c(nr - i));
      kl[i] = v[2*HB-1:HB]; kr[i] = v[HB-1:0];
    end
    l = p[2*HB-1:HB];
    r = p[HB-1:0];
    for (int i = 1; i <= nr; i++) begin
      v = fe(l, r, (i <= (nr + 1) / 2) ? kr[i-1] : kl[i-1], dec);
      l = v[2*HB-1:HB]; r = v[HB-1:0];
    end
    return {r, l};
  endfunction

  // MSIC generator state -> vector (M = 12, L = 11): XOR array, then seed
  function automatic logic [143:0] tpg_vec(logic [10:0] j, logic [11:0] s);
    logic [143:0] x;
    for (int jj = 0; jj < 12; jj++)
      for (int ii = 0; ii < 11; ii++) x[jj*11 + ii] = j[ii] ^ s[jj];
    for (int jj = 0; jj < 12; jj++) x[132 + jj] = s[jj];
    return x;
  endfunction

  function automatic logic [11:0] lfsr_next(logic [11:0] s);
    // x^12 + x^6 + x^4 + x + 1, shift towards the MSB
    return {s[10:0], s[11] ^ s[5] ^ s[3] ^ s[0]};
  endfunction

  function automatic logic [10:0] johnson_next(logic [10:0] j);
    return {j[9:0], ~j[10]};
  endfunction

  function automatic logic [95:0] misr_next(logic [95:0] s, logic [95:0] d);
    logic [95:0] t = {s[94:0], 1'b0};
    if (s[95]) begin
      t[94] ^= 1'b1; t[49] ^= 1'b1; t[47] ^= 1'b1; t[0] ^= 1'b1;
    end
    return t ^ d;
  endfunction

  // response of the core's round logic to one generator vector
  function automatic logic [95:0] round_resp(logic [143:0] x, bit dec);
    half_t a = x[47:0], b = x[95:48], c = x[143:96];
    return fe(a, b, c, dec) ^ fk(a, b, c);
  endfunction

  // signature of a whole self-test: `pat` vectors per pass, test-per-clock
  // (each vector = next Johnson state) or test-per-scan (each capture after
  // one Johnson step), seed stepping after every 2L vectors
  function automatic logic [95:0] selftest_sig(int pat, bit per_scan);
    logic [10:0] j = '0;
    logic [11:0] s = 12'h001;
    logic [95:0] sig = '0;
    int k = 0;
    if (per_scan) s = lfsr_next(s);
    for (int pass = 0; pass < 2; pass++)
      for (int n = 0; n < pat; n++) begin
        if (per_scan) j = johnson_next(j);
        sig = misr_next(sig, round_resp(tpg_vec(j, s), pass == 1));
        if (!per_scan) j = johnson_next(j);
        k++;
        if (k == 22) begin
          k = 0;
          s = lfsr_next(s);
        end
      end
    return sig;
  endfunction

endpackage
