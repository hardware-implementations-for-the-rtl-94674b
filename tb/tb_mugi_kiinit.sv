// tb_mugi_kiinit: random keys through the K/I expansion, compared with
// (X0, X1, (X0 <<< 7) ^ (X1 >>> 7) ^ C0) computed with rotate helpers.
module tb_mugi_kiinit;
  import tb_ref_pkg::*;
  logic [127:0] ki;
  logic [191:0] a_init, e;
  int checks = 0, failures = 0;

  mugi_kiinit dut (.ki, .a_init);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ki = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e = {ki[127:64], ki[63:0], rotl64(ki[127:64], 7) ^ rotl64(ki[63:0], 57) ^ RC0};
      checks++;
      if (a_init !== e) begin
        failures++;
        $display("FAIL kiinit(%h): got %h expected %h", ki, a_init, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
