// tb_snow2_alpha: multiplication by alpha and alpha^-1, LUT and ROM forms.
// A register in the testbench holds w and is updated with random values
// (sometimes held), w_next is its next value; all four instances are
// compared every cycle with the reference multiplication built from
// powers of beta. MUL_a[1] = E19FCF13 and MUL_ainverse[1] = 180F40CD
// (published table entries) are checked directly.
module tb_snow2_alpha;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [31:0] w = '0, w_next;
  logic [31:0] y_ml, y_mr, y_dl, y_dr;
  int checks = 0, failures = 0;

  snow2_alpha #(.INVERSE(0), .ROM_BASED(0)) u_ml (.clk, .rst_n, .w, .w_next, .y(y_ml));
  snow2_alpha #(.INVERSE(0), .ROM_BASED(1)) u_mr (.clk, .rst_n, .w, .w_next, .y(y_mr));
  snow2_alpha #(.INVERSE(1), .ROM_BASED(0)) u_dl (.clk, .rst_n, .w, .w_next, .y(y_dl));
  snow2_alpha #(.INVERSE(1), .ROM_BASED(1)) u_dr (.clk, .rst_n, .w, .w_next, .y(y_dr));

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) w <= '0;
    else        w <= w_next;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_next = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      if (i == 1) w_next = 32'h0100_0001;
      else if (i > 1 && ($urandom % 4 != 0)) w_next = $urandom;
      @(negedge clk);
      if (w == 32'h0100_0001) begin
        check(y_ml == (32'hE19FCF13 ^ 32'h0000_0100), "MUL_a[1] published");
        check(y_dl == (32'h180F40CD ^ 32'h0001_0000), "MUL_ainverse[1] published");
      end
      check(y_ml == r_mul_alpha(w), $sformatf("alpha LUT  w=%08h", w));
      check(y_mr == r_mul_alpha(w), $sformatf("alpha ROM  w=%08h", w));
      check(y_dl == r_div_alpha(w), $sformatf("alpha^-1 LUT w=%08h", w));
      check(y_dr == r_div_alpha(w), $sformatf("alpha^-1 ROM w=%08h", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
