// mugi_kiinit: the "K / I init" transformation of MUGI, combinational.
// A 128-bit key or initial vector X = X0 || X1 (X0 most significant) is
// expanded to a 192-bit State a value
//   ( X0, X1, (X0 <<< 7) ^ (X1 >>> 7) ^ C0 ).
// The same block serves the key (loaded into State a) and the IV (XORed
// into State a).
module mugi_kiinit (
  input  logic [127:0] ki,
  output logic [191:0] a_init
);
  import cipher_pkg::*;
  logic [63:0] x0, x1;
  assign {x0, x1} = ki;
  assign a_init = {x0, x1, {x0[56:0], x0[63:57]} ^ {x1[6:0], x1[63:7]} ^ MUGI_C0};
endmodule
