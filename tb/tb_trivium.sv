// tb_trivium: TRIVIUM against the bit-level reference model for several
// random keys/IVs: busy for exactly 1152 cycles after start, one bit per
// clock with ks_en high, holding when it is low, restart during output.
module tb_trivium;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start = 0, ks_en = 0;
  logic [79:0] key = '0, iv = '0;
  logic        busy, ks, ks_valid;
  int checks = 0, failures = 0;

  trivium dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [79:0] k, logic [79:0] v, int n);
    bit exp [];
    int lat, got;
    r_trivium(k, v, n, exp);
    @(negedge clk);
    key = k; iv = v; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (busy && lat < 5000) begin @(negedge clk); lat++; end
    check(lat == 1152, $sformatf("busy for %0d cycles, expected 1152", lat));
    got = 0;
    while (got < n) begin
      ks_en = ($urandom % 5 != 0);
      @(negedge clk);
      if (ks_en) begin
        check(ks_valid && ks == exp[got], $sformatf("bit %0d: %0b expected %0b", got, ks, exp[got]));
        got++;
      end else check(!ks_valid, "no ks_valid without ks_en");
    end
    ks_en = 0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0, '0, 300);
    for (int i = 0; i < 4; i++)
      run({$urandom, $urandom, 16'($urandom)}, {$urandom, $urandom, 16'($urandom)}, (i == 0) ? 50 : 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
