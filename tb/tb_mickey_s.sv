// tb_mickey_s: register S against the reference CLOCK_S model with random
// input and control bits, holds and clears, for the default constants and
// for an independent random constant set.
module tb_mickey_s;
  import tb_ref_pkg::*;
  localparam mickey_const_t CD = '{rtaps: '0, comp0: mickey_pkg::MICKEY_COMP0,
                                   comp1: mickey_pkg::MICKEY_COMP1,
                                   fb0: mickey_pkg::MICKEY_FB0, fb1: mickey_pkg::MICKEY_FB1};
  localparam mickey_const_t C2 = '{rtaps: '0, comp0: 128'h5555_AAAA_0F0F_F0F0_3333_CCCC_1234_5678,
                                   comp1: 128'h8765_4321_DEAD_BEEF_0BAD_F00D_CAFE_BABE,
                                   fb0: 128'hFFFF_0000_FFFF_0000_1357_9BDF_2468_ACE1,
                                   fb1: 128'h0F1E_2D3C_4B5A_6978_8796_A5B4_C3D2_E1F0};
  logic         clk = 0, rst_n = 0, clr = 0, en = 0, input_bit = 0, control_bit = 0;
  logic [127:0] s1, s2;
  bit m1 [128];
  bit m2 [128];
  int checks = 0, failures = 0;

  mickey_s u1 (.clk, .rst_n, .clr, .en, .input_bit, .control_bit, .s(s1));
  mickey_s #(.COMP0(C2.comp0), .COMP1(C2.comp1), .FB0(C2.fb0), .FB1(C2.fb1))
    u2 (.clk, .rst_n, .clr, .en, .input_bit, .control_bit, .s(s2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m1[i]) begin m1[i] = 0; m2[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      clr = (c == 500);
      en  = ($urandom % 8 != 0);
      input_bit   = (c < 5) ? 1'b1 : 1'($urandom);
      control_bit = 1'($urandom);
      @(negedge clk);
      if (clr) foreach (m1[i]) begin m1[i] = 0; m2[i] = 0; end
      else if (en) begin
        r_clock_s(m1, input_bit, control_bit, CD);
        r_clock_s(m2, input_bit, control_bit, C2);
      end
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (s1[i] !== m1[i] || s2[i] !== m2[i]) begin
          failures++;
          $display("FAIL cycle %0d stage %0d", c, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
