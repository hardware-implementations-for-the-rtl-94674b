// tb_throughput: sustained keystream rate of the four cores at default
// parameters. After setup, ks_en is held high for WORDS cycles; each core
// must deliver a correct word on every one of those cycles, i.e. 64 (MUGI),
// 32 (SNOW 2.0), 1 (MICKEY-128) and 1 (TRIVIUM) keystream bits per clock,
// the rates behind the reported 6080, 4512, 166 and 211 Mbit/s at 95, 141,
// 166 and 211 MHz. Words are compared with the reference models.
module tb_throughput;
  import tb_ref_pkg::*;
  localparam int WORDS = 256;
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

  stream_ciphers_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] me [];
    logic [31:0] se [];
    bit          ke [];
    bit          te [];
    int          mugi_bits = 0, snow_bits = 0, mk_bits = 0, tr_bits = 0;
    mugi_ki       = {$urandom, $urandom, $urandom, $urandom};
    snow_key      = {$urandom, $urandom, $urandom, $urandom};
    snow_iv       = {$urandom, $urandom, $urandom, $urandom};
    mickey_key    = {$urandom, $urandom, $urandom, $urandom};
    mickey_iv     = {$urandom, $urandom, $urandom, $urandom};
    mickey_iv_len = 8'd80;
    triv_key      = {$urandom, $urandom, 16'($urandom)};
    triv_iv       = {$urandom, $urandom, 16'($urandom)};
    r_snow(snow_key, snow_iv, WORDS, se);
    r_mickey(mickey_key, mickey_iv, 80, WORDS, MC, ke);
    r_trivium(triv_key, triv_iv, WORDS, te);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // all setups start together; MUGI's IV follows on iv_req
    mugi_ki_valid = 1; snow_start = 1; mickey_start = 1; triv_start = 1;
    @(negedge clk);
    mugi_ki_valid = 0; snow_start = 0; mickey_start = 0; triv_start = 0;
    while (!mugi_iv_req) @(negedge clk);
    r_mugi(mugi_ki, 128'h0123456789ABCDEF_FEDCBA9876543210, WORDS, me);
    mugi_ki = 128'h0123456789ABCDEF_FEDCBA9876543210;
    mugi_ki_valid = 1;
    @(negedge clk);
    mugi_ki_valid = 0;
    while (mugi_busy || snow_busy || mickey_busy || triv_busy) @(negedge clk);
    mugi_ks_en = 1; snow_ks_en = 1; mickey_ks_en = 1; triv_ks_en = 1;
    for (int c = 0; c < WORDS; c++) begin
      @(negedge clk);
      check(mugi_ks_valid && mugi_ks == me[c], $sformatf("MUGI word %0d on cycle %0d", c, c));
      check(snow_ks_valid && snow_ks == se[c], $sformatf("SNOW word %0d on cycle %0d", c, c));
      check(mickey_ks_valid && mickey_ks == ke[c], $sformatf("MICKEY bit %0d on cycle %0d", c, c));
      check(triv_ks_valid && triv_ks == te[c], $sformatf("TRIVIUM bit %0d on cycle %0d", c, c));
      if (mugi_ks_valid)   mugi_bits += 64;
      if (snow_ks_valid)   snow_bits += 32;
      if (mickey_ks_valid) mk_bits   += 1;
      if (triv_ks_valid)   tr_bits   += 1;
    end
    check(mugi_bits == 64 * WORDS, "MUGI 64 bits per clock");
    check(snow_bits == 32 * WORDS, "SNOW 2.0 32 bits per clock");
    check(mk_bits == WORDS, "MICKEY-128 1 bit per clock");
    check(tr_bits == WORDS, "TRIVIUM 1 bit per clock");
    $display("bits in %0d cycles: MUGI %0d, SNOW %0d, MICKEY %0d, TRIVIUM %0d", WORDS,
             mugi_bits, snow_bits, mk_bits, tr_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
