// blake2b_ref_pkg: plain behavioural BLAKE2b model for the testbenches.
//
// A transcription of the BLAKE2b compression function (RFC 7693, section
// 3.2) with its own copy of the constants and its own G, round and
// compression code (sequential updates of one work vector, unlike the
// RTL's network of G instances), so that the testbenches compare the RTL
// against an independent model.
package blake2b_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t vec16_t [16];
  typedef w64_t vec8_t  [8];

  localparam logic [63:0] SIGMA_ROWS [10] = '{
    64'h0123456789ABCDEF, 64'hEA489FD61C02B753, 64'hB8C052FDAE367194,
    64'h7931DCBE265A40F8, 64'h905724AFE1BC683D, 64'h2C6A0B834D75FE19,
    64'hC51FED4A0763928B, 64'hDB7EC13950F4862A, 64'h6FE9B308C2D714A5,
    64'hA2847615FB9E3CD0
  };

  function automatic w64_t ref_iv(input int i);
    case (i)
      0: return 64'h6A09E667F3BCC908;
      1: return 64'hBB67AE8584CAA73B;
      2: return 64'h3C6EF372FE94F82B;
      3: return 64'hA54FF53A5F1D36F1;
      4: return 64'h510E527FADE682D1;
      5: return 64'h9B05688C2B3E6C1F;
      6: return 64'h1F83D9ABFB41BD6B;
      default: return 64'h5BE0CD19137E2179;
    endcase
  endfunction

  function automatic int ref_sigma(input int r, input int k);
    logic [63:0] row;
    row = SIGMA_ROWS[r % 10];
    return int'(row[60 - 4*k +: 4]);
  endfunction

  function automatic w64_t ror64(input w64_t x, input int n);
    logic [127:0] xx;
    xx = {x, x};
    return xx[n +: 64];
  endfunction

  // G on a whole work vector, indices a,b,c,d
  function automatic void ref_g(ref vec16_t v, input int a, input int b, input int c,
                                input int d, input w64_t x, input w64_t y);
    v[a] = v[a] + v[b] + x;
    v[d] = ror64(v[d] ^ v[a], 32);
    v[c] = v[c] + v[d];
    v[b] = ror64(v[b] ^ v[c], 24);
    v[a] = v[a] + v[b] + y;
    v[d] = ror64(v[d] ^ v[a], 16);
    v[c] = v[c] + v[d];
    v[b] = ror64(v[b] ^ v[c], 63);
  endfunction

  function automatic void ref_round(ref vec16_t v, input vec16_t m, input int r);
    ref_g(v, 0, 4,  8, 12, m[ref_sigma(r,  0)], m[ref_sigma(r,  1)]);
    ref_g(v, 1, 5,  9, 13, m[ref_sigma(r,  2)], m[ref_sigma(r,  3)]);
    ref_g(v, 2, 6, 10, 14, m[ref_sigma(r,  4)], m[ref_sigma(r,  5)]);
    ref_g(v, 3, 7, 11, 15, m[ref_sigma(r,  6)], m[ref_sigma(r,  7)]);
    ref_g(v, 0, 5, 10, 15, m[ref_sigma(r,  8)], m[ref_sigma(r,  9)]);
    ref_g(v, 1, 6, 11, 12, m[ref_sigma(r, 10)], m[ref_sigma(r, 11)]);
    ref_g(v, 2, 7,  8, 13, m[ref_sigma(r, 12)], m[ref_sigma(r, 13)]);
    ref_g(v, 3, 4,  9, 14, m[ref_sigma(r, 14)], m[ref_sigma(r, 15)]);
  endfunction

  // F(h, m, t, f): updates h in place
  function automatic void ref_compress(ref vec8_t h, input vec16_t m,
                                       input logic [127:0] t, input bit f);
    vec16_t v;
    for (int i = 0; i < 8; i++) begin
      v[i]   = h[i];
      v[i+8] = ref_iv(i);
    end
    v[12] ^= t[63:0];
    v[13] ^= t[127:64];
    if (f) v[14] = ~v[14];
    for (int r = 0; r < 12; r++) ref_round(v, m, r);
    for (int i = 0; i < 8; i++) h[i] ^= v[i] ^ v[i+8];
  endfunction

  // Initial hash state for an unkeyed digest of nn bytes
  function automatic void ref_init(ref vec8_t h, input int nn);
    for (int i = 0; i < 8; i++) h[i] = ref_iv(i);
    h[0] ^= 64'h0000000001010000 ^ 64'(nn);
  endfunction

endpackage
