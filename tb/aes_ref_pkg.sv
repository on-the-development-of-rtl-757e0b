// aes_ref_pkg: software reference model of AES-128 encryption for the
// testbenches. Written independently of the RTL: the S-box is generated
// with the classic p/q walk over the multiplicative group (p *= 3, q /= 3),
// the state is an array of 16 bytes, and the key schedule is expanded in
// full up front. ref_state(key, pt, n) returns the state after the initial
// AddRoundKey (n = 0) and n rounds (n = 10 gives the ciphertext);
// ref_round_key(key, n) returns round key n. ref_group_of(b) gives the
// parity group of bit b of a 128-bit register and ref_group_parity(v) the 64
// group parities, from the cell diagram: the same bit of two diagonal cells,
// rows 0/1 paired down-right (A0-B1, ..., D0-A1), rows 2/3 down-left
// (B2-A3, ..., A2-D3).
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] p, q, x;
    logic [7:0] tab [256];
    p = 8'h01; q = 8'h01;
    do begin
      // p = p * 3
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      // q = q / 3
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      tab[p] = x ^ 8'h63;
    end while (p != 8'h01);
    tab[0] = 8'h63;
    return tab[a];
  endfunction

  function automatic logic [7:0] mul2(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic bytes16_t to_bytes(input logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(input bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] ref_round_key(input logic [127:0] key, input int n);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        t[31:24] = t[31:24] ^ rc;
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  function automatic logic [127:0] ref_state(input logic [127:0] key,
                                             input logic [127:0] pt, input int n);
    bytes16_t s, t, k;
    s = to_bytes(pt ^ key);
    for (int r = 1; r <= n; r++) begin
      for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
      // ShiftRows: row i%4 of column i/4 takes column (i/4 + i%4) mod 4
      for (int i = 0; i < 16; i++) t[i] = s[((i/4 + i%4) % 4) * 4 + i%4];
      s = t;
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          t[4*c]   = mul2(a0) ^ mul2(a1) ^ a1 ^ a2 ^ a3;
          t[4*c+1] = a0 ^ mul2(a1) ^ mul2(a2) ^ a2 ^ a3;
          t[4*c+2] = a0 ^ a1 ^ mul2(a2) ^ mul2(a3) ^ a3;
          t[4*c+3] = mul2(a0) ^ a0 ^ a1 ^ a2 ^ mul2(a3);
        end
        s = t;
      end
      k = to_bytes(ref_round_key(key, r));
      for (int i = 0; i < 16; i++) s[i] = s[i] ^ k[i];
    end
    return from_bytes(s);
  endfunction

  function automatic int ref_group_of(input int b);
    int i, k, row, col, p;
    i = 15 - b / 8; k = b % 8; row = i % 4; col = i / 4;
    if (row < 2) p = (col - row + 4) % 4;
    else         p = 4 + (col + row - 2) % 4;
    return 8 * p + k;
  endfunction

  function automatic logic [63:0] ref_group_parity(input logic [127:0] v);
    logic [63:0] g = '0;
    for (int b = 0; b < 128; b++) if (v[b]) g[ref_group_of(b)] ^= 1'b1;
    return g;
  endfunction

endpackage
