// tb_mickey128: the MICKEY-128 generator against the reference model (same
// register constants as the core's defaults) for IV lengths 0, 1, 64 and
// 128: busy for iv_len + 256 cycles after the start strobe, one bit per
// clock with ks_en high, holding when it is low, restart during output.
module tb_mickey128;
  import tb_ref_pkg::*;
  localparam mickey_const_t C = '{rtaps: mickey_pkg::MICKEY_RTAPS, comp0: mickey_pkg::MICKEY_COMP0,
                                  comp1: mickey_pkg::MICKEY_COMP1, fb0: mickey_pkg::MICKEY_FB0,
                                  fb1: mickey_pkg::MICKEY_FB1};
  logic         clk = 0, rst_n = 0, start = 0, ks_en = 0;
  logic [127:0] key = '0, iv = '0;
  logic [7:0]   iv_len = '0;
  logic         busy, ks, ks_valid;
  int checks = 0, failures = 0;

  mickey128 dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [127:0] k, logic [127:0] v, int len, int n);
    bit exp [];
    int lat, got;
    r_mickey(k, v, len, n, C, exp);
    @(negedge clk);
    key = k; iv = v; iv_len = 8'(len); start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (busy && lat < 5000) begin @(negedge clk); lat++; end
    check(lat == len + 256, $sformatf("busy for %0d cycles, expected %0d", lat, len + 256));
    got = 0;
    while (got < n) begin
      ks_en = ($urandom % 5 != 0);
      @(negedge clk);
      if (ks_en) begin
        check(ks_valid && ks == exp[got], $sformatf("iv_len %0d bit %0d: %0b expected %0b", len, got, ks, exp[got]));
        got++;
      end else check(!ks_valid, "no ks_valid without ks_en");
    end
    ks_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run({$urandom, $urandom, $urandom, $urandom}, '0, 0, 200);
    run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 1, 20);
    run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 64, 300);
    run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 128, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
