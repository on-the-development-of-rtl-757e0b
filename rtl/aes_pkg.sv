// aes_pkg: types, constants and helper functions shared by the AES-128
// encryption core and its group-parity countermeasure.
//
// State and key layout: a 128-bit vector holds 16 bytes in the usual AES
// order. Byte i sits in bits [127-8*i -: 8] and belongs to state row i%4
// and state column i/4. The 16 bytes are the 16 identical 8-bit cells of
// the data unit, arranged as four 32-bit rows (row 0..3) of four cells
// (columns A..D = 0..3).
//
// Parity groups (the "FM" grouping): every group holds the same bit k of two
// cells that lie on a diagonal of the 4x4 cell array, so their logic cones
// do not intersect. Cell A0 is paired with B1, B0 with C1, C0 with D1, D0
// with A1 (rows 0/1, down-right diagonals), and rows 2/3 are paired along
// down-left diagonals: B2 with A3, C2 with B3, D2 with C3, A2 with D3. Eight
// cell pairs times eight bits give 64 two-bit groups per 128-bit register.
// The A0/B1 pair and two-cell diagonal groups follow the published method; the rest
// of the diagonal pattern is this design's reading of the published grouping diagram.
//
// The S-box table is computed at elaboration time (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the FIPS-197 affine map), so no
// table file is needed.
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;  // AES block and key size
  localparam int unsigned NR         = 10;   // rounds of AES-128
  localparam int unsigned NGROUPS    = 64;   // parity groups per register
  localparam int unsigned GROUP_SIZE = 2;    // bits per parity group

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [NGROUPS-1:0]    gpar_t;

  // GF(2^8) multiplication by x.
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication (shift and add).
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    // 254 = 0b11111110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  typedef logic [255:0][7:0] sbox_table_t;

  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  localparam sbox_table_t SBOX = sbox_table();

  // Round constant of key-expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic logic [7:0] rcon(input logic [3:0] r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 2; i <= 10; i++)
      if (int'(r) >= i) c = xtime(c);
    return c;
  endfunction

  // Byte index (0..15, AES order) of cell m (0 or 1) of cell pair p (0..7).
  function automatic int unsigned pair_cell(input int unsigned p, input int unsigned m);
    int unsigned row, col;
    if (p < 4) begin
      row = m;                          // rows 0 and 1
      col = (p + m) % 4;                // down-right diagonal
    end else begin
      row = 2 + m;                      // rows 2 and 3
      col = (p - 4 + 4 - m) % 4;        // down-left diagonal
    end
    return col * 4 + row;
  endfunction

  // Bit position, inside a 128-bit register, of member m of parity group g.
  // Group g takes bit k = g%8 of both cells of pair g/8.
  function automatic int unsigned group_bit(input int unsigned g, input int unsigned m);
    return 120 - 8 * pair_cell(g / 8, m) + (g % 8);
  endfunction

endpackage
