// tb_mugi_f: random vectors through the F-function, compared with the
// byte-level reference model.
module tb_mugi_f;
  import tb_ref_pkg::*;
  logic [63:0] x, k, y, e;
  int checks = 0, failures = 0;

  mugi_f dut (.x, .k, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom};
      k = (i < 10) ? 64'd0 : {$urandom, $urandom};
      #1;
      e = r_mugi_f(x, k);
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL F(%016h,%016h) = %016h expected %016h", x, k, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
