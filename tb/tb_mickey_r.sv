// tb_mickey_r: register R against the reference CLOCK_R model with random
// input and control bits, holds and clears. Runs once with the default tap
// set and once with an independent random tap set.
module tb_mickey_r;
  import tb_ref_pkg::*;
  localparam logic [127:0] TAPS2 = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3211;
  logic         clk = 0, rst_n = 0, clr = 0, en = 0, input_bit = 0, control_bit = 0;
  logic [127:0] r1, r2;
  bit m1 [128];
  bit m2 [128];
  int checks = 0, failures = 0;

  mickey_r                 u1 (.clk, .rst_n, .clr, .en, .input_bit, .control_bit, .r(r1));
  mickey_r #(.RTAPS(TAPS2)) u2 (.clk, .rst_n, .clr, .en, .input_bit, .control_bit, .r(r2));

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
        r_clock_r(m1, input_bit, control_bit, mickey_pkg::MICKEY_RTAPS);
        r_clock_r(m2, input_bit, control_bit, TAPS2);
      end
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (r1[i] !== m1[i] || r2[i] !== m2[i]) begin
          failures++;
          $display("FAIL cycle %0d stage %0d", c, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
