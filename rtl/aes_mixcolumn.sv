// aes_mixcolumn: AES MixColumns for one 32-bit column, combinational.
// Each output byte is 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3) over GF(2^8),
// written with xtime(). Input and output pack row 0 in the top byte. Used
// four times by the data-unit round logic. Standard AES; the structure is
// this design's own.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  logic [31:0] col_i,   // {row0, row1, row2, row3}
  output logic [31:0] col_o
);
  logic [7:0] a [4];
  logic [7:0] b [4];

  always_comb begin
    for (int r = 0; r < 4; r++) a[r] = col_i[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      b[r] = xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
  end

  assign col_o = {b[0], b[1], b[2], b[3]};
endmodule
