// aes_sbox: the AES SubBytes substitution for one byte, purely
// combinational. The 256-entry table is built at elaboration time by
// aes_pkg::sbox_table() (GF(2^8) inverse followed by the affine map), so the
// module is a single table lookup. Used in every 8-bit cell of the data unit
// and in the key unit; the duplicated next-state logic of the predictor uses
// its own copies. How the S-box is realised is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] a,   // input byte
  output logic [7:0] y    // substituted byte
);
  assign y = SBOX[a];
endmodule
