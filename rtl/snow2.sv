// snow2: SNOW 2.0 keystream generator (128-bit key), one 32-bit word per
// clock. LFSR (snow2_lfsr) and FSM (snow2_fsm) are clocked together; the
// keystream word is z = F ^ s_t, held in a 32-bit output register that is
// loaded only in the keystream phase.
//
// Key setup: start loads the LFSR from key = k3..k0 and iv = IV3..IV0
// (k3, IV3 most significant) in one cycle,
//   s15 = k3^IV0, s14 = k2, s13 = k1, s12 = k0^IV1, s11 = ~k3, s10 = ~k2^IV2,
//   s9 = ~k1^IV3, s8 = ~k0, s7..s4 = k3..k0, s3..s0 = ~k3..~k0,
// and clears R1/R2. Then 32 clocks with F fed back into the LFSR and one
// further clock without output; busy is high for these 33 cycles. In the
// keystream phase each cycle with ks_en = 1 latches z into ks (ks_valid
// pulses one cycle later) and clocks the cipher. ROM_BASED selects the
// synchronous-ROM tables (1) or asynchronous look-up tables (0); both give
// the same keystream with the same timing.
module snow2
  import snow2_pkg::*;
#(
  parameter bit          ROM_BASED   = 1'b1,
  parameter int unsigned INIT_CLOCKS = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic         start,
  output logic         busy,
  input  logic         ks_en,
  output logic [31:0]  ks,
  output logic         ks_valid
);
  snow2_phase_t      phase;
  logic [5:0]        cnt;
  logic [15:0][31:0] s, init_val;
  logic [31:0]       f, k0, k1, k2, k3, v0, v1, v2, v3;
  logic              adv, gen_step;

  assign {k3, k2, k1, k0} = key;
  assign {v3, v2, v1, v0} = iv;
  assign init_val = {k3 ^ v0, k2, k1, k0 ^ v1,
                     ~k3, ~k2 ^ v2, ~k1 ^ v3, ~k0,
                     k3, k2, k1, k0,
                     ~k3, ~k2, ~k1, ~k0};

  assign gen_step = (phase == SN_GEN) && ks_en && !start;
  assign adv      = !start && ((phase == SN_INIT) || (phase == SN_POST) || gen_step);

  snow2_lfsr #(.ROM_BASED(ROM_BASED)) u_lfsr (
    .clk, .rst_n, .load(start), .init_val, .shift(adv),
    .init_mode(phase == SN_INIT), .f, .s
  );

  snow2_fsm #(.ROM_BASED(ROM_BASED)) u_fsm (
    .clk, .rst_n, .load(start), .step(adv), .s15(s[15]), .s5(s[5]), .f
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= SN_IDLE;
      cnt   <= '0;
    end else if (start) begin
      phase <= SN_INIT;
      cnt   <= '0;
    end else begin
      unique case (phase)
        SN_INIT: if (cnt == 6'(INIT_CLOCKS - 1)) phase <= SN_POST; else cnt <= cnt + 1'b1;
        SN_POST: phase <= SN_GEN;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks       <= '0;
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= gen_step;
      if (gen_step) ks <= f ^ s[0];
    end
  end

  assign busy = (phase == SN_INIT) || (phase == SN_POST);

  // The output register never shows a word during key setup.
  a_no_output_in_setup: assert property (@(posedge clk) disable iff (!rst_n) ks_valid |-> !busy);
endmodule
