// tb_stream_ciphers_top: end-to-end test of the four generators at their
// default parameters, run concurrently through the top's ports.
//   MUGI:   published all-zero vector and a random key; encrypts a message
//           with din/dout and decrypts it again after re-keying from GEN.
//   SNOW:   published vector (key 8000..0) and a random key/IV.
//   MICKEY: IV lengths 0 and 96 against the reference model.
//   TRIVIUM: two random key/IV pairs against the reference model.
// Every session stalls ks_en at random. Mechanisms counted (each must occur
// at least once): MUGI IV wait, MUGI re-key from GEN, keystream stalls of
// each core, SNOW restart during output, MICKEY empty IV, MICKEY non-empty
// IV, TRIVIUM restart during output, MUGI encrypt/decrypt round trip.
module tb_stream_ciphers_top;
  import tb_ref_pkg::*;
  localparam mickey_const_t MC = '{rtaps: mickey_pkg::MICKEY_RTAPS, comp0: mickey_pkg::MICKEY_COMP0,
                                   comp1: mickey_pkg::MICKEY_COMP1, fb0: mickey_pkg::MICKEY_FB0,
                                   fb1: mickey_pkg::MICKEY_FB1};
  logic clk = 0, rst_n = 0;
  logic [127:0] mugi_ki = '0;
  logic         mugi_ki_valid = 0, mugi_iv_req, mugi_busy, mugi_ks_en = 0, mugi_ks_valid;
  logic [63:0]  mugi_ks, mugi_din = '0, mugi_dout;
  logic [127:0] snow_key = '0, snow_iv = '0;
  logic         snow_start = 0, snow_busy, snow_ks_en = 0, snow_ks_valid;
  logic [31:0]  snow_ks;
  logic [127:0] mickey_key = '0, mickey_iv = '0;
  logic [7:0]   mickey_iv_len = '0;
  logic         mickey_start = 0, mickey_busy, mickey_ks_en = 0, mickey_ks, mickey_ks_valid;
  logic [79:0]  triv_key = '0, triv_iv = '0;
  logic         triv_start = 0, triv_busy, triv_ks_en = 0, triv_ks, triv_ks_valid;

  int checks = 0, failures = 0;
  int n_mugi_ivwait = 0, n_mugi_rekey = 0, n_mugi_stall = 0, n_mugi_roundtrip = 0;
  int n_snow_stall = 0, n_snow_restart = 0;
  int n_mk_stall = 0, n_mk_iv0 = 0, n_mk_iv = 0;
  int n_tr_stall = 0, n_tr_restart = 0;

  stream_ciphers_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic mugi_setup(logic [127:0] k, logic [127:0] v);
    @(negedge clk);
    mugi_ki = k; mugi_ki_valid = 1;
    @(negedge clk);
    mugi_ki_valid = 0;
    while (!mugi_iv_req) @(negedge clk);
    repeat (4) @(negedge clk);
    if (mugi_iv_req) n_mugi_ivwait++;
    mugi_ki = v; mugi_ki_valid = 1;
    @(negedge clk);
    mugi_ki_valid = 0;
    while (mugi_busy) @(negedge clk);
  endtask

  // n words; msg/ct: plaintext in, dout out
  task automatic mugi_words(logic [63:0] exp [], int n, logic [63:0] msg [], ref logic [63:0] res []);
    int got = 0;
    res = new[n];
    while (got < n) begin
      mugi_ks_en = ($urandom % 4 != 0);
      @(negedge clk);
      if (mugi_ks_en) begin
        check(mugi_ks_valid && mugi_ks == exp[got], $sformatf("MUGI word %0d %016h expected %016h", got, mugi_ks, exp[got]));
        mugi_din = msg[got];
        #1 res[got] = mugi_dout;
        got++;
      end else n_mugi_stall++;
    end
    mugi_ks_en = 0;
  endtask

  task automatic mugi_session();
    logic [63:0] exp [], msg [], ct [], pt [];
    logic [127:0] k, v;
    r_mugi('0, '0, 2, exp);
    check(exp[0] == 64'hC76E14E70836E6B6 && exp[1] == 64'hCB0E9C5A0BF03E1E, "MUGI reference: published vector");
    msg = new[2];
    mugi_setup('0, '0);
    mugi_words(exp, 2, msg, ct);
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    msg = new[16];
    foreach (msg[i]) msg[i] = {$urandom, $urandom};
    r_mugi(k, v, 16, exp);
    n_mugi_rekey++;             // key setup started from the keystream phase
    mugi_setup(k, v);
    mugi_words(exp, 16, msg, ct);
    n_mugi_rekey++;
    mugi_setup(k, v);
    mugi_words(exp, 16, ct, pt);
    for (int i = 0; i < 16; i++) check(pt[i] == msg[i] && ct[i] != msg[i], "MUGI decrypt(encrypt(m)) = m");
    n_mugi_roundtrip++;
  endtask

  task automatic snow_run(logic [127:0] k, logic [127:0] v, logic [31:0] exp [], int n);
    int got = 0, lat = 0;
    @(negedge clk);
    snow_key = k; snow_iv = v; snow_start = 1;
    @(negedge clk);
    snow_start = 0;
    while (snow_busy) begin @(negedge clk); lat++; end
    check(lat == 33, $sformatf("SNOW busy %0d cycles, expected 33", lat));
    while (got < n) begin
      snow_ks_en = ($urandom % 4 != 0);
      @(negedge clk);
      if (snow_ks_en) begin
        check(snow_ks_valid && snow_ks == exp[got], $sformatf("SNOW word %0d %08h expected %08h", got, snow_ks, exp[got]));
        got++;
      end else n_snow_stall++;
    end
    snow_ks_en = 0;
  endtask

  task automatic snow_session();
    logic [31:0] exp [];
    logic [127:0] k, v;
    exp = '{32'h8D590AE9, 32'hA74A7D05, 32'h6DC9CA74, 32'hB72D1A45, 32'h99B0A083};
    snow_run({32'h80000000, 96'd0}, '0, exp, 5);
    n_snow_restart++;           // next start interrupts the keystream phase
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    r_snow(k, v, 64, exp);
    snow_run(k, v, exp, 64);
  endtask

  task automatic mickey_run(logic [127:0] k, logic [127:0] v, int len, int n);
    bit exp [];
    int got = 0, lat = 0;
    r_mickey(k, v, len, n, MC, exp);
    @(negedge clk);
    mickey_key = k; mickey_iv = v; mickey_iv_len = 8'(len); mickey_start = 1;
    @(negedge clk);
    mickey_start = 0;
    while (mickey_busy) begin @(negedge clk); lat++; end
    check(lat == len + 256, $sformatf("MICKEY busy %0d cycles, expected %0d", lat, len + 256));
    if (len == 0) n_mk_iv0++; else n_mk_iv++;
    while (got < n) begin
      mickey_ks_en = ($urandom % 4 != 0);
      @(negedge clk);
      if (mickey_ks_en) begin
        check(mickey_ks_valid && mickey_ks == exp[got], $sformatf("MICKEY bit %0d", got));
        got++;
      end else n_mk_stall++;
    end
    mickey_ks_en = 0;
  endtask

  task automatic triv_run(logic [79:0] k, logic [79:0] v, int n);
    bit exp [];
    int got = 0, lat = 0;
    r_trivium(k, v, n, exp);
    @(negedge clk);
    triv_key = k; triv_iv = v; triv_start = 1;
    @(negedge clk);
    triv_start = 0;
    while (triv_busy) begin @(negedge clk); lat++; end
    check(lat == 1152, $sformatf("TRIVIUM busy %0d cycles, expected 1152", lat));
    while (got < n) begin
      triv_ks_en = ($urandom % 4 != 0);
      @(negedge clk);
      if (triv_ks_en) begin
        check(triv_ks_valid && triv_ks == exp[got], $sformatf("TRIVIUM bit %0d", got));
        got++;
      end else n_tr_stall++;
    end
    triv_ks_en = 0;
  endtask

  task automatic count(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      mugi_session();
      snow_session();
      begin
        mickey_run({$urandom, $urandom, $urandom, $urandom}, '0, 0, 128);
        mickey_run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 96, 256);
      end
      begin
        triv_run({$urandom, $urandom, 16'($urandom)}, {$urandom, $urandom, 16'($urandom)}, 64);
        n_tr_restart++;
        triv_run({$urandom, $urandom, 16'($urandom)}, {$urandom, $urandom, 16'($urandom)}, 256);
      end
    join
    count(n_mugi_ivwait, "MUGI IV wait");
    count(n_mugi_rekey, "MUGI re-key from GEN");
    count(n_mugi_stall, "MUGI keystream stall");
    count(n_mugi_roundtrip, "MUGI encrypt/decrypt");
    count(n_snow_stall, "SNOW keystream stall");
    count(n_snow_restart, "SNOW restart");
    count(n_mk_stall, "MICKEY keystream stall");
    count(n_mk_iv0, "MICKEY empty IV");
    count(n_mk_iv, "MICKEY non-empty IV");
    count(n_tr_stall, "TRIVIUM keystream stall");
    count(n_tr_restart, "TRIVIUM restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
