// mickey128: MICKEY-128 keystream generator, one bit per clock.
// Registers R (mickey_r) and S (mickey_s) are clocked together. Control
// bits: Control_bit_R = s43 ^ r85 and Control_bit_S = s85 ^ r42. The input
// multiplexer feeds R with input_bit ^ s64 while mixing and with input_bit
// otherwise; S always gets input_bit. The keystream bit is r0 ^ s0, held in
// an output flip-flop that loads only in the keystream phase.
//
// Sequence after start (key and IV sampled on start): both registers are
// cleared, then clocked with mixing on for iv_len IV bits (iv[0] first),
// 128 key bits (key[0] first) and 128 pre-clocks with input 0. busy rises
// at the start edge and stays high for iv_len + 256 cycles. In the keystream phase each
// cycle with ks_en = 1 latches r0 ^ s0 into ks (ks_valid pulses) and clocks
// the registers with mixing off. The initialization order and the IV length
// port are taken from the MICKEY family. Key and IV are captured in
// registers on start so the ports may change during setup (a choice of
// this design). The register constants are placeholders (see mickey_pkg).
module mickey128
  import mickey_pkg::*;
#(
  parameter int unsigned IV_MAX = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  logic [IV_MAX-1:0] iv,
  input  logic [7:0]   iv_len,
  input  logic         start,
  output logic         busy,
  input  logic         ks_en,
  output logic         ks,
  output logic         ks_valid
);
  mickey_phase_t phase;
  logic [127:0]  key_q;
  logic [IV_MAX-1:0] iv_q;
  logic [7:0]    len_q, cnt;
  logic [127:0]  r, s;
  logic          in_bit, mixing, ctl_r, ctl_s, in_r, clk_en, clr;

  always_comb begin
    unique case (phase)
      MK_IV:   in_bit = iv_q[cnt[$clog2(IV_MAX)-1:0]];
      MK_KEY:  in_bit = key_q[cnt[6:0]];
      default: in_bit = 1'b0;
    endcase
  end

  assign mixing = (phase != MK_GEN);
  assign ctl_r  = s[43] ^ r[85];
  assign ctl_s  = s[85] ^ r[42];
  assign in_r   = mixing ? (in_bit ^ s[64]) : in_bit;
  assign clr    = start;
  assign clk_en = (phase == MK_IV) || (phase == MK_KEY) || (phase == MK_PRECLOCK) ||
                  (phase == MK_GEN && ks_en && !start);

  mickey_r u_r (.clk, .rst_n, .clr, .en(clk_en), .input_bit(in_r),   .control_bit(ctl_r), .r);
  mickey_s u_s (.clk, .rst_n, .clr, .en(clk_en), .input_bit(in_bit), .control_bit(ctl_s), .s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= MK_IDLE;
      cnt   <= '0;
      key_q <= '0;
      iv_q  <= '0;
      len_q <= '0;
    end else if (start) begin
      key_q <= key;
      iv_q  <= iv;
      len_q <= (iv_len > 8'(IV_MAX)) ? 8'(IV_MAX) : iv_len;
      cnt   <= '0;
      phase <= (iv_len == 0) ? MK_KEY : MK_IV;
    end else begin
      unique case (phase)
        MK_IV:       if (cnt == len_q - 1'b1) begin cnt <= '0; phase <= MK_KEY; end
                     else cnt <= cnt + 1'b1;
        MK_KEY:      if (cnt == 8'd127) begin cnt <= '0; phase <= MK_PRECLOCK; end
                     else cnt <= cnt + 1'b1;
        MK_PRECLOCK: if (cnt == 8'd127) begin cnt <= '0; phase <= MK_GEN; end
                     else cnt <= cnt + 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks       <= 1'b0;
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= 1'b0;
      if (phase == MK_GEN && ks_en && !start) begin
        ks       <= r[0] ^ s[0];
        ks_valid <= 1'b1;
      end
    end
  end

  assign busy = (phase == MK_IV) || (phase == MK_KEY) || (phase == MK_PRECLOCK);

  // The output flip-flop never shows a bit during key setup.
  a_no_output_in_setup: assert property (@(posedge clk) disable iff (!rst_n) ks_valid |-> !busy);
endmodule
