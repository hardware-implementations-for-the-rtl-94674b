// mugi_ctrl: control unit of the MUGI generator.
// Sequences the three initialization steps and the keystream phase (see
// mugi_pkg for the phases). A ki_valid strobe in IDLE starts a new key
// setup; the unit then runs KEY_LOAD (1 cycle) and STEP1 (ROUNDS_PER_STEP
// cycles), raises iv_req in IV_WAIT until the next ki_valid, and runs IV_ADD
// (1 cycle), STEP2 and STEP3 (ROUNDS_PER_STEP cycles each) before entering
// GEN. A ki_valid in GEN starts a new key setup. Each phase lasts exactly
// its number of clock cycles; the round counter is cleared at every phase
// change.
module mugi_ctrl
  import mugi_pkg::*;
#(
  parameter int unsigned ROUNDS_PER_STEP = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ki_valid,
  output mugi_phase_t phase,
  output logic        ki_load,   // latch the K/I register this cycle
  output logic        iv_req
);
  localparam int unsigned CW = $clog2(ROUNDS_PER_STEP + 1);
  logic [CW-1:0] cnt;
  logic          last;

  assign last    = (cnt == CW'(ROUNDS_PER_STEP - 1));
  assign iv_req  = (phase == MUGI_IV_WAIT);
  assign ki_load = ki_valid && (phase == MUGI_IDLE || phase == MUGI_IV_WAIT || phase == MUGI_GEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= MUGI_IDLE;
      cnt   <= '0;
    end else begin
      cnt <= '0;
      unique case (phase)
        MUGI_IDLE:     if (ki_valid) phase <= MUGI_KEY_LOAD;
        MUGI_KEY_LOAD: phase <= MUGI_STEP1;
        MUGI_STEP1:    if (last) phase <= MUGI_IV_WAIT; else cnt <= cnt + 1'b1;
        MUGI_IV_WAIT:  if (ki_valid) phase <= MUGI_IV_ADD;
        MUGI_IV_ADD:   phase <= MUGI_STEP2;
        MUGI_STEP2:    if (last) phase <= MUGI_STEP3; else cnt <= cnt + 1'b1;
        MUGI_STEP3:    if (last) phase <= MUGI_GEN;   else cnt <= cnt + 1'b1;
        MUGI_GEN:      if (ki_valid) phase <= MUGI_KEY_LOAD;
        default:       phase <= MUGI_IDLE;
      endcase
    end
  end
endmodule
