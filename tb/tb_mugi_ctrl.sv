// tb_mugi_ctrl: walks the control unit through key setup, IV wait and
// generation and checks the length of every phase in clock cycles, the
// iv_req output and the K/I register load strobes.
module tb_mugi_ctrl;
  import mugi_pkg::*;
  logic clk = 0, rst_n = 0, ki_valid = 0;
  mugi_phase_t phase;
  logic ki_load, iv_req;
  int checks = 0, failures = 0;

  mugi_ctrl #(.ROUNDS_PER_STEP(16)) dut (.clk, .rst_n, .ki_valid, .phase, .ki_load, .iv_req);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (phase %s)", what, phase.name());
    end
  endtask

  // count cycles spent in phase p (sampled on negedges)
  task automatic expect_len(mugi_phase_t p, int len);
    int n = 0;
    while (phase == p && n < 1000) begin
      @(negedge clk);
      n++;
    end
    check(n == len, $sformatf("%s lasted %0d cycles, expected %0d", p.name(), n, len));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(phase == MUGI_IDLE && !iv_req && !ki_load, "idle after reset");
    for (int rep = 0; rep < 2; rep++) begin
      ki_valid = 1;
      #1 check(ki_load, "ki_load on key strobe");
      @(negedge clk);
      ki_valid = 0;
      expect_len(MUGI_KEY_LOAD, 1);
      expect_len(MUGI_STEP1, 16);
      check(phase == MUGI_IV_WAIT && iv_req, "iv_req in IV_WAIT");
      repeat (5) @(negedge clk);
      check(phase == MUGI_IV_WAIT && !ki_load, "waits for IV");
      ki_valid = 1;
      #1 check(ki_load, "ki_load on IV strobe");
      @(negedge clk);
      ki_valid = 0;
      expect_len(MUGI_IV_ADD, 1);
      expect_len(MUGI_STEP2, 16);
      expect_len(MUGI_STEP3, 16);
      check(phase == MUGI_GEN, "generation after STEP3");
      repeat (3) @(negedge clk);
      check(phase == MUGI_GEN, "stays in GEN");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
