// aes_sbox: the 8-bit AES substitution box as a combinational look-up table.
// MUGI's F-function uses eight of these ("the same as the one in AES ...
// implemented with LUTs"). The table itself is computed at elaboration from
// the AES definition (cipher_pkg::gen_aes_sbox), so nothing is stored in the
// source. Purely combinational: y = S(x).
module aes_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);
  import cipher_pkg::*;
  assign y = AES_SBOX[x];
endmodule
