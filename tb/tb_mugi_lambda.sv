// tb_mugi_lambda: random buffers through lambda, compared word by word with
// the reference update.
module tb_mugi_lambda;
  import tb_ref_pkg::*;
  logic [15:0][63:0] b, b_next;
  logic [63:0]       a0;
  a_t ra;
  b_t rb;
  int checks = 0, failures = 0;

  mugi_lambda dut (.b, .a0, .b_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 16; j++) begin
        b[j]  = {$urandom, $urandom};
        rb[j] = b[j];
      end
      a0 = {$urandom, $urandom};
      ra[0] = a0; ra[1] = '0; ra[2] = '0;
      #1;
      r_mugi_update(ra, rb, 1, 1);
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (b_next[j] !== rb[j]) begin
          failures++;
          $display("FAIL lambda word %0d: got %h expected %h", j, b_next[j], rb[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
