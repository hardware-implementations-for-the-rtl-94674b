// mugi_rho: the State a update function rho of MUGI, combinational.
// a = {a0, a1, a2} with a0 in the most significant 64 bits.
//   a0' = a1
//   a1' = a2 ^ F(a1, b4) ^ C1
//   a2' = a0 ^ F(a1, b10 <<< 17) ^ C2
// During initialization the caller forces b4 and b10 to zero to obtain
// rho(a, 0).
module mugi_rho (
  input  logic [191:0] a,
  input  logic [63:0]  b4,
  input  logic [63:0]  b10,
  output logic [191:0] a_next
);
  import cipher_pkg::*;
  logic [63:0] a0, a1, a2, f1, f2, b10r;

  assign {a0, a1, a2} = a;
  assign b10r = {b10[46:0], b10[63:47]};

  mugi_f u_f1 (.x(a1), .k(b4),   .y(f1));
  mugi_f u_f2 (.x(a1), .k(b10r), .y(f2));

  assign a_next = {a1, a2 ^ f1 ^ MUGI_C1, a0 ^ f2 ^ MUGI_C2};
endmodule
