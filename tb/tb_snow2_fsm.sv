// tb_snow2_fsm: the SNOW 2.0 FSM in ROM and LUT form against a reference
// R1/R2 model, with random s15/s5 inputs, random stalls and loads.
module tb_snow2_fsm;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] s15 = '0, s5 = '0, f_r, f_l;
  logic [31:0] r1 = '0, r2 = '0, e;
  int checks = 0, failures = 0;

  snow2_fsm #(.ROM_BASED(1)) u_r (.clk, .rst_n, .load, .step, .s15, .s5, .f(f_r));
  snow2_fsm #(.ROM_BASED(0)) u_l (.clk, .rst_n, .load, .step, .s15, .s5, .f(f_l));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] nr1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      s15  = $urandom;
      s5   = $urandom;
      load = (i % 200 == 0);
      step = ($urandom % 5 != 0);
      #1;
      e = (s15 + r1) ^ r2;
      checks += 2;
      if (f_r !== e) begin failures++; $display("FAIL ROM F=%08h expected %08h", f_r, e); end
      if (f_l !== e) begin failures++; $display("FAIL LUT F=%08h expected %08h", f_l, e); end
      @(negedge clk);
      if (load) begin r1 = 0; r2 = 0; end
      else if (step) begin nr1 = s5 + r2; r2 = r_snow_s(r1); r1 = nr1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
