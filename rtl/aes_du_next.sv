// aes_du_next: next-state logic of the AES data unit (DU), combinational.
//
// The 128-bit state is split into 16 identical 8-bit cells, four rows of
// four. For a round the cells apply SubBytes, the rows are rotated
// (ShiftRows: row r moves r cells to the left), each column goes through
// MixColumns (skipped in the last round) and the round key is XORed in
// (AddRoundKey). On load the plaintext is XORed with the cipher key (the
// initial AddRoundKey); otherwise the state is held. The same module is
// instantiated twice: once in the data unit and once, as duplicated
// hardware, inside the parity predictor.
//
// Priority: load over round_en over hold. AES itself is standard (FIPS-197);
// one round per evaluation and this control interface are this design's
// choices.
module aes_du_next
  import aes_pkg::*;
(
  input  block_t     state_q,     // current state register
  input  block_t     din,         // plaintext
  input  block_t     key_in,      // cipher key (initial round key)
  input  block_t     round_key,   // round key of the current round
  input  logic       load,        // load din ^ key_in
  input  logic       round_en,    // perform one round
  input  logic       last_round,  // omit MixColumns
  output block_t     state_d      // next state
);
  block_t sb, sr, mc, rnd;

  // SubBytes: one S-box per cell.
  for (genvar i = 0; i < 16; i++) begin : g_cell
    aes_sbox u_sbox (.a(state_q[127-8*i -: 8]), .y(sb[127-8*i -: 8]));
  end

  // ShiftRows: byte (row r, column c) takes byte (r, (c+r) mod 4).
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127-8*(4*c+r) -: 8] = sb[127-8*(4*((c+r)%4)+r) -: 8];
  end

  // MixColumns on the four 32-bit columns.
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mixcolumn u_mc (.col_i(sr[127-32*c -: 32]), .col_o(mc[127-32*c -: 32]));
  end

  assign rnd = (last_round ? sr : mc) ^ round_key;

  always_comb begin
    if (load)          state_d = din ^ key_in;
    else if (round_en) state_d = rnd;
    else               state_d = state_q;
  end
endmodule
