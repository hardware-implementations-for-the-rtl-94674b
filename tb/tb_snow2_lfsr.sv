// tb_snow2_lfsr: the SNOW 2.0 LFSR (ROM and LUT alpha units) against a
// reference word array: random parallel loads, shifts with and without the
// F feedback term, and holds.
module tb_snow2_lfsr;
  import tb_ref_pkg::*;
  logic             clk = 0, rst_n = 0, load = 0, shift = 0, init_mode = 0;
  logic [15:0][31:0] init_val = '0, s_r, s_l;
  logic [31:0]      f = '0, fb;
  lfsr_t            m;
  int checks = 0, failures = 0;

  snow2_lfsr #(.ROM_BASED(1)) u_r (.clk, .rst_n, .load, .init_val, .shift, .init_mode, .f, .s(s_r));
  snow2_lfsr #(.ROM_BASED(0)) u_l (.clk, .rst_n, .load, .init_val, .shift, .init_mode, .f, .s(s_l));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      load  = (i % 150 == 0);
      shift = ($urandom % 6 != 0);
      init_mode = $urandom % 2;
      f = $urandom;
      for (int j = 0; j < 16; j++) init_val[j] = $urandom;
      @(negedge clk);
      if (load) for (int j = 0; j < 16; j++) m[j] = init_val[j];
      else if (shift) begin
        fb = r_mul_alpha(m[0]) ^ m[2] ^ r_div_alpha(m[11]) ^ (init_mode ? f : 32'd0);
        for (int j = 0; j < 15; j++) m[j] = m[j+1];
        m[15] = fb;
      end
      for (int j = 0; j < 16; j++) begin
        checks += 2;
        if (s_r[j] !== m[j]) begin failures++; $display("FAIL ROM s%0d=%08h expected %08h (cycle %0d)", j, s_r[j], m[j], i); end
        if (s_l[j] !== m[j]) begin failures++; $display("FAIL LUT s%0d=%08h expected %08h (cycle %0d)", j, s_l[j], m[j], i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
