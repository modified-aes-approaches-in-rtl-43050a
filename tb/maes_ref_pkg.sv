// maes_ref_pkg: behavioural reference model of the modified AES-128, used by
// the testbenches to compute expected values independently of the RTL.
//
// It works on the state as an array of 16 bytes and takes the 4-bit S-box
// from its printed table (the simplified-AES nibble S-box,
// 9 4 A B D 1 8 5 6 2 0 3 C E F 7) rather than from the GF(2^4) arithmetic
// the RTL uses; the inverse S-box is found by searching that table. GF(2^8)
// products are computed bit-serially (shift-and-add with reduction by 0x11B).
package maes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  localparam logic [3:0] SBOX_TABLE [16] = '{
    4'h9, 4'h4, 4'hA, 4'hB, 4'hD, 4'h1, 4'h8, 4'h5,
    4'h6, 4'h2, 4'h0, 4'h3, 4'hC, 4'hE, 4'hF, 4'h7
  };

  function automatic logic [3:0] ref_sbox4(logic [3:0] x);
    return SBOX_TABLE[x];
  endfunction

  function automatic logic [3:0] ref_inv_sbox4(logic [3:0] y);
    for (int i = 0; i < 16; i++)
      if (SBOX_TABLE[i] == y) return 4'(i);
    return 4'h0;
  endfunction

  function automatic logic [7:0] ref_sub_byte(logic [7:0] b, bit inv);
    if (inv) return {ref_inv_sbox4(b[7:4]), ref_inv_sbox4(b[3:0])};
    return {ref_sbox4(b[7:4]), ref_sbox4(b[3:0])};
  endfunction

  // Shift-and-add multiply in GF(2^8), reduction polynomial 0x11B.
  function automatic logic [7:0] ref_gmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    bytes16_t b = to_bytes(v);
    foreach (b[i]) b[i] = ref_sub_byte(b[i], inv);
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    bytes16_t a = to_bytes(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[r + 4*((c + r) % 4)] = a[r + 4*c];
        else     o[r + 4*c] = a[r + 4*((c + r) % 4)];
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    bytes16_t a = to_bytes(v), o;
    logic [7:0] m [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r + 4*c] = '0;
        for (int k = 0; k < 4; k++)
          o[r + 4*c] ^= ref_gmul(m[(k - r + 4) % 4], a[k + 4*c]);
      end
    return from_bytes(o);
  endfunction

  // Round keys 0..nr as a queue of 128-bit values, built word by word.
  function automatic void ref_key_expand(logic [127:0] key, int nr, ref logic [127:0] rk [$]);
    logic [31:0] w [$];
    logic [31:0] t;
    logic [7:0]  rc;
    rk.delete();
    for (int i = 0; i < 4; i++) w.push_back(key[127 - 32*i -: 32]);
    rc = 8'h01;
    for (int i = 4; i < 4*(nr + 1); i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sub_byte(t[31:24], 0), ref_sub_byte(t[23:16], 0),
             ref_sub_byte(t[15:8], 0),  ref_sub_byte(t[7:0], 0)};
        t[31:24] ^= rc;
        rc = ref_gmul(rc, 8'h02);
      end
      w.push_back(w[i-4] ^ t);
    end
    for (int r = 0; r <= nr; r++) rk.push_back({w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]});
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key, int nr);
    logic [127:0] rk [$];
    logic [127:0] s;
    ref_key_expand(key, nr, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= nr; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != nr) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] ct, logic [127:0] key, int nr);
    logic [127:0] rk [$];
    logic [127:0] s;
    ref_key_expand(key, nr, rk);
    s = ct ^ rk[nr];
    for (int r = nr - 1; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
