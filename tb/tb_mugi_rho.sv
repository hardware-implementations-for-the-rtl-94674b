// tb_mugi_rho: random State a and buffer words through rho, compared with
// the reference update (rho only, buffer unchanged).
module tb_mugi_rho;
  import tb_ref_pkg::*;
  logic [191:0] a, a_next;
  logic [63:0]  b4, b10;
  a_t ra;
  b_t rb;
  int checks = 0, failures = 0;

  mugi_rho dut (.a, .b4, .b10, .a_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a   = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      b4  = {$urandom, $urandom};
      b10 = {$urandom, $urandom};
      #1;
      ra[0] = a[191:128]; ra[1] = a[127:64]; ra[2] = a[63:0];
      foreach (rb[j]) rb[j] = '0;
      rb[4] = b4; rb[10] = b10;
      r_mugi_update(ra, rb, 1, 0);
      checks++;
      if (a_next !== {ra[0], ra[1], ra[2]}) begin
        failures++;
        $display("FAIL rho: got %h expected %h", a_next, {ra[0], ra[1], ra[2]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
