// mugi_lambda: the Buffer b update function lambda of MUGI, combinational.
// Buffer b is sixteen 64-bit words; b[j] is word j. lambda shifts the buffer
// by one word and mixes at three points:
//   b0' = b15 ^ a0,  b4' = b3 ^ b7,  b10' = b9 ^ (b13 <<< 32),
//   bj' = b(j-1) for every other j.
module mugi_lambda (
  input  logic [15:0][63:0] b,
  input  logic [63:0]       a0,
  output logic [15:0][63:0] b_next
);
  always_comb begin
    for (int j = 1; j < 16; j++) b_next[j] = b[j-1];
    b_next[0]  = b[15] ^ a0;
    b_next[4]  = b[3] ^ b[7];
    b_next[10] = b[9] ^ {b[13][31:0], b[13][63:32]};
  end
endmodule
