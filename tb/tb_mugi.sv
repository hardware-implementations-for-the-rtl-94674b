// tb_mugi: end-to-end test of the MUGI generator.
// Key/IV setups: the all-zero key and IV, whose first keystream words are
// published with the MUGI specification, and random keys compared with the
// reference model. Checks the setup latency (iv_req 18 cycles after the key
// strobe, busy low 34 cycles after the IV strobe), one word per clock with
// ks_en high, holding with ks_en low, the dout XOR, and re-keying from GEN.
module tb_mugi;
  import tb_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  logic [127:0] ki = '0;
  logic         ki_valid = 0, iv_req, busy, ks_en = 0, ks_valid;
  logic [63:0]  ks, din = '0, dout;
  int checks = 0, failures = 0;

  mugi dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // full setup then n words; gaps inserts ks_en-low cycles
  task automatic run(logic [127:0] k, logic [127:0] v, int n, bit gaps, bit from_gen);
    logic [63:0] exp [];
    int lat, got;
    r_mugi(k, v, n, exp);
    @(negedge clk);
    ki = k; ki_valid = 1;
    @(negedge clk);
    ki_valid = 0;
    lat = 1;
    while (!iv_req && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 18, $sformatf("iv_req after %0d cycles, expected 18", lat));
    repeat (3) @(negedge clk);
    ki = v; ki_valid = 1;
    @(negedge clk);
    ki_valid = 0;
    lat = 1;
    while (busy && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 34, $sformatf("busy for %0d cycles after IV, expected 34", lat));
    got = 0;
    while (got < n) begin
      ks_en = !(gaps && ($urandom % 3 == 0));
      din = {$urandom, $urandom};
      @(negedge clk);
      if (ks_en) begin
        check(ks_valid, "ks_valid one cycle after ks_en");
        check(ks == exp[got], $sformatf("word %0d: got %016h expected %016h", got, ks, exp[got]));
        got++;
      end else begin
        check(!ks_valid, "no ks_valid without ks_en");
      end
      check(dout == (din ^ ks), "dout = din ^ ks");
    end
    ks_en = 0;
    if (from_gen) check(!busy, "GEN reached");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp [];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // published vector: key = 0, IV = 0
    r_mugi('0, '0, 4, exp);
    check(exp[0] == 64'hC76E14E70836E6B6, "reference model: published word 0");
    check(exp[1] == 64'hCB0E9C5A0BF03E1E, "reference model: published word 1");
    run('0, '0, 4, 0, 1);
    run(128'h000102030405060708090A0B0C0D0E0F, 128'hF0E0D0C0B0A090807060504030201000, 40, 1, 1);
    for (int i = 0; i < 3; i++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 20, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
