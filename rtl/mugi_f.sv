// mugi_f: the F-function of MUGI (64-bit in, 64-bit out, combinational).
// The data word is XORed with a Buffer word, each of the eight bytes passes
// an AES S-box, each half (bytes 0..3 and 4..7, byte 0 most significant)
// is multiplied by the AES MDS matrix M, and the bytes are reordered as
// Q4 Q5 Q2 Q3 Q0 Q1 Q6 Q7 (the byte shuffle of the MUGI F-function).
module mugi_f (
  input  logic [63:0] x,
  input  logic [63:0] k,
  output logic [63:0] y
);
  import cipher_pkg::*;
  logic [7:0][7:0] o, p, q;   // index 7 = byte 0 (most significant)

  assign o = x ^ k;

  for (genvar i = 0; i < 8; i++) begin : g_sbox
    aes_sbox u_sbox (.x(o[i]), .y(p[i]));
  end

  assign q[7:4] = aes_mix(p[7:4]);
  assign q[3:0] = aes_mix(p[3:0]);

  // byte j of y (j = 0 most significant) = Q[4,5,2,3,0,1,6,7][j]
  assign y = {q[3], q[2], q[5], q[4], q[7], q[6], q[1], q[0]};
endmodule
