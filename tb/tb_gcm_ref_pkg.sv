// Reference models for the testbenches: a plain (non-pipelined) AES-128
// written from FIPS-197, the GCM field multiply from the GCM specification
// and a sequential (Horner) GHASH, independent of the RTL's pipelined and
// out-of-order formulations.
package tb_gcm_ref_pkg;

  typedef logic [127:0] b128_t;

  function automatic logic [7:0] ref_xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = ref_xtime(x);
    end
    return r;
  endfunction

  // S-box by exponentiation x^254 (the inverse) and the affine transform
  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, p, y;
    inv = 8'h01; p = x;
    for (int e = 0; e < 8; e++) begin     // 254 = 0b11111110
      if (e != 0) inv = ref_mul8(inv, p);
      p = ref_mul8(p, p);
    end
    if (x == 0) inv = 0;
    y = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
            ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return y;
  endfunction

  function automatic b128_t ref_aes(input b128_t key, input b128_t pt);
    logic [7:0] st [4][4];
    logic [7:0] k  [4][4];
    logic [7:0] t  [4][4];
    logic [7:0] rc;
    rc = 8'h01;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        st[r][c] = pt[127 - 8*(4*c+r) -: 8] ^ key[127 - 8*(4*c+r) -: 8];
        k[r][c]  = key[127 - 8*(4*c+r) -: 8];
      end
    for (int round = 1; round <= 10; round++) begin
      // key schedule
      logic [7:0] w [4];
      for (int r = 0; r < 4; r++) w[r] = ref_sbox(k[(r+1)%4][3]);
      w[0] ^= rc;
      rc = ref_xtime(rc);
      for (int r = 0; r < 4; r++) k[r][0] ^= w[r];
      for (int c = 1; c < 4; c++)
        for (int r = 0; r < 4; r++) k[r][c] ^= k[r][c-1];
      // SubBytes + ShiftRows
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = ref_sbox(st[r][(c+r)%4]);
      // MixColumns
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          if (round != 10)
            st[r][c] = ref_mul8(t[r][c], 8'h02) ^ ref_mul8(t[(r+1)%4][c], 8'h03)
                     ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
          else
            st[r][c] = t[r][c];
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) st[r][c] ^= k[r][c];
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) ref_aes[127 - 8*(4*c+r) -: 8] = st[r][c];
  endfunction

  // GCM multiply, bit by bit as in the specification
  function automatic b128_t ref_gfmul(input b128_t x, input b128_t y);
    b128_t z, v;
    z = 0; v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      if (v[0]) v = (v >> 1) ^ {8'hE1, 120'h0};
      else      v = v >> 1;
    end
    return z;
  endfunction

  // 64-byte line <-> four big-endian blocks (byte 0 in bits [7:0] of the line)
  function automatic b128_t ref_blk(input logic [511:0] l, input int b);
    b128_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = l[128*b + 8*i +: 8];
    return r;
  endfunction

  function automatic logic [511:0] ref_put(input logic [511:0] l, input int b, input b128_t v);
    for (int i = 0; i < 16; i++) l[128*b + 8*i +: 8] = v[127-8*i -: 8];
    return l;
  endfunction

endpackage
