// tb_aes_sbox: exhaustive check of the AES S-box table against the
// reference x^254-plus-affine computation and three published entries.
module tb_aes_sbox;
  import tb_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.x, .y);

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      check(y, r_sbox(x), $sformatf("S(%02h)", x));
    end
    x = 8'h00; #1; check(y, 8'h63, "S(00) published");
    x = 8'h01; #1; check(y, 8'h7C, "S(01) published");
    x = 8'h53; #1; check(y, 8'hED, "S(53) published");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
