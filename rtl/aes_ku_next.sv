// aes_ku_next: next-state logic of the AES key unit (KU), combinational.
//
// Computes the next AES-128 round key from the current one on the fly:
// w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon, w1' = w1 ^ w0', w2' = w2 ^ w1',
// w3' = w3 ^ w2'. On load the cipher key is taken; otherwise the key is
// held. Its output is both the key register's next value and the round key
// used by the data unit in the same clock cycle. Instantiated in the key
// unit and, as duplicated hardware, in the parity predictor.
// AES-128 only; the on-the-fly schedule is this design's choice.
module aes_ku_next
  import aes_pkg::*;
(
  input  block_t     key_q,     // current round key register
  input  block_t     key_in,    // cipher key
  input  logic       load,      // take key_in
  input  logic       round_en,  // advance one round
  input  logic [3:0] round,     // round number 1..10 (selects Rcon)
  output block_t     key_d      // next round key
);
  logic [31:0] w [4];
  logic [31:0] n [4];
  logic [31:0] rot, sub;

  always_comb
    for (int i = 0; i < 4; i++) w[i] = key_q[127-32*i -: 32];

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox u_sbox (.a(rot[31-8*i -: 8]), .y(sub[31-8*i -: 8]));
  end

  always_comb begin
    n[0] = w[0] ^ sub ^ {rcon(round), 24'h0};
    n[1] = w[1] ^ n[0];
    n[2] = w[2] ^ n[1];
    n[3] = w[3] ^ n[2];
  end

  always_comb begin
    if (load)          key_d = key_in;
    else if (round_en) key_d = {n[0], n[1], n[2], n[3]};
    else               key_d = key_q;
  end
endmodule
