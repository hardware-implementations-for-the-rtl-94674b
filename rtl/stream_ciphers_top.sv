// stream_ciphers_top: the four keystream generators side by side.
// MUGI (64 bits/clock), SNOW 2.0 (32 bits/clock), MICKEY-128 (1 bit/clock)
// and TRIVIUM (1 bit/clock) share only the clock and the reset; every other
// port of each core is brought out with the core's prefix. See the
// individual modules for their key-setup handshakes and timing. MUGI alone
// also contains the plaintext/ciphertext XOR (mugi_din -> mugi_dout).
module stream_ciphers_top (
  input  logic         clk,
  input  logic         rst_n,
  // MUGI
  input  logic [127:0] mugi_ki,
  input  logic         mugi_ki_valid,
  output logic         mugi_iv_req,
  output logic         mugi_busy,
  input  logic         mugi_ks_en,
  output logic [63:0]  mugi_ks,
  output logic         mugi_ks_valid,
  input  logic [63:0]  mugi_din,
  output logic [63:0]  mugi_dout,
  // SNOW 2.0
  input  logic [127:0] snow_key,
  input  logic [127:0] snow_iv,
  input  logic         snow_start,
  output logic         snow_busy,
  input  logic         snow_ks_en,
  output logic [31:0]  snow_ks,
  output logic         snow_ks_valid,
  // MICKEY-128
  input  logic [127:0] mickey_key,
  input  logic [127:0] mickey_iv,
  input  logic [7:0]   mickey_iv_len,
  input  logic         mickey_start,
  output logic         mickey_busy,
  input  logic         mickey_ks_en,
  output logic         mickey_ks,
  output logic         mickey_ks_valid,
  // TRIVIUM
  input  logic [79:0]  triv_key,
  input  logic [79:0]  triv_iv,
  input  logic         triv_start,
  output logic         triv_busy,
  input  logic         triv_ks_en,
  output logic         triv_ks,
  output logic         triv_ks_valid
);
  mugi u_mugi (
    .clk, .rst_n, .ki(mugi_ki), .ki_valid(mugi_ki_valid), .iv_req(mugi_iv_req),
    .busy(mugi_busy), .ks_en(mugi_ks_en), .ks(mugi_ks), .ks_valid(mugi_ks_valid),
    .din(mugi_din), .dout(mugi_dout)
  );

  snow2 u_snow2 (
    .clk, .rst_n, .key(snow_key), .iv(snow_iv), .start(snow_start), .busy(snow_busy),
    .ks_en(snow_ks_en), .ks(snow_ks), .ks_valid(snow_ks_valid)
  );

  mickey128 u_mickey (
    .clk, .rst_n, .key(mickey_key), .iv(mickey_iv), .iv_len(mickey_iv_len),
    .start(mickey_start), .busy(mickey_busy), .ks_en(mickey_ks_en), .ks(mickey_ks),
    .ks_valid(mickey_ks_valid)
  );

  trivium u_trivium (
    .clk, .rst_n, .key(triv_key), .iv(triv_iv), .start(triv_start), .busy(triv_busy),
    .ks_en(triv_ks_en), .ks(triv_ks), .ks_valid(triv_ks_valid)
  );
endmodule
