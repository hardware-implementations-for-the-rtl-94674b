// tb_snow2: end-to-end test of the SNOW 2.0 generator in both table
// variants (synchronous ROM and asynchronous LUT), side by side.
// Checks the published 128-bit-key vectors (key 8000...0 and AAAA...A, IV 0),
// random keys/IVs against the reference model, busy for exactly 33 cycles
// after start, one word per clock, holding when ks_en is low, and restart
// in the middle of keystream generation.
module tb_snow2;
  import tb_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  logic [127:0] key = '0, iv = '0;
  logic         start = 0, ks_en = 0;
  logic         busy_r, busy_l, val_r, val_l;
  logic [31:0]  ks_r, ks_l;
  int checks = 0, failures = 0;

  snow2 #(.ROM_BASED(1'b1)) dut_rom (.clk, .rst_n, .key, .iv, .start, .busy(busy_r), .ks_en,
                                     .ks(ks_r), .ks_valid(val_r));
  snow2 #(.ROM_BASED(1'b0)) dut_lut (.clk, .rst_n, .key, .iv, .start, .busy(busy_l), .ks_en,
                                     .ks(ks_l), .ks_valid(val_l));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic [127:0] k, logic [127:0] v, int n, bit gaps, logic [31:0] exp []);
    int lat, got;
    @(negedge clk);
    key = k; iv = v; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (busy_r && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 33, $sformatf("busy for %0d cycles, expected 33", lat));
    check(!busy_l, "both variants finish together");
    got = 0;
    while (got < n) begin
      ks_en = !(gaps && ($urandom % 4 == 0));
      @(negedge clk);
      if (ks_en) begin
        check(val_r && val_l, "ks_valid after ks_en");
        check(ks_r == exp[got], $sformatf("ROM word %0d: %08h expected %08h", got, ks_r, exp[got]));
        check(ks_l == exp[got], $sformatf("LUT word %0d: %08h expected %08h", got, ks_l, exp[got]));
        got++;
      end else check(!val_r && !val_l, "no ks_valid without ks_en");
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
    logic [31:0] exp [];
    logic [127:0] k, v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp = new[5];
    exp = '{32'h8D590AE9, 32'hA74A7D05, 32'h6DC9CA74, 32'hB72D1A45, 32'h99B0A083};
    run({32'h80000000, 96'd0}, '0, 5, 0, exp);
    exp = '{32'hE00982F5, 32'h25F02054, 32'h214992D8, 32'h706F2B20, 32'hDA585E5B};
    run({16{8'hAA}}, '0, 5, 1, exp);
    for (int i = 0; i < 4; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      r_snow(k, v, 50, exp);
      run(k, v, (i == 0) ? 7 : 50, 1, exp);   // first one restarted early
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
