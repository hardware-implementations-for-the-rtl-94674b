// mugi: MUGI keystream generator, one 64-bit word per clock.
//
// Datapath: a 128-bit K/I register feeding the K/I init expansion; a
// three-input 192-bit multiplexer in front of State a selecting
//   IN1 = State a ^ K/I init(I)   (adding the IV),
//   IN2 = K/I init(K)             (loading the key),
//   IN3 = rho(a, b)               (round);
// the 1024-bit Buffer b, updated by lambda in STEP3 and GEN or by shifting
// rho_0 into word 0 during STEP1 (so that b_{15-i} = rho^{i+1}(a,0)_0);
// two auxiliary gates ("auxiliary buffers") that give rho zero instead of
// b4/b10 while the buffer is being built (STEP1, STEP2) and keep a0 away
// from lambda in STEP1; a 64-bit output register that latches a2 (the lower
// 64 bits of State a before the round) only in the keystream phase; and a
// 64-bit XOR that turns din into dout.
//
// Interface: present the key on ki with ki_valid for one cycle (that clock
// edge latches the K/I register); iv_req rises 2 + ROUNDS_PER_STEP cycles
// later (KEY_LOAD, STEP1). Present the IV on ki with ki_valid; busy falls
// 2 + 2*ROUNDS_PER_STEP cycles after that strobe (IV_ADD, STEP2, STEP3). Each cycle
// with ks_en high then performs one Update, loads ks with the word Out(t)
// and pulses ks_valid the next cycle. dout = din ^ ks.
// The IV addition XORs all 192 bits of State a: the third word receives
// (I0 <<< 7) ^ (I1 >>> 7) ^ C0 as well as the first two receiving I0 and I1;
// this is what the MUGI definition requires, although the architecture
// description counts a 128-bit XOR there.
// Structure and sequence follow the architecture of the MUGI hardware
// described for this design; the handshake, the shift-based buffer fill and
// the gating form of the auxiliary buffers are this design's choices.
module mugi
  import mugi_pkg::*;
#(
  parameter int unsigned ROUNDS_PER_STEP = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] ki,
  input  logic         ki_valid,
  output logic         iv_req,
  output logic         busy,
  input  logic         ks_en,
  output logic [63:0]  ks,
  output logic         ks_valid,
  input  logic [63:0]  din,
  output logic [63:0]  dout
);
  mugi_phase_t       phase;
  logic              ki_load;
  logic [127:0]      ki_reg;
  logic [191:0]      a, a_ki, a_rho, a_next;
  logic [15:0][63:0] b, b_lam, b_next;
  logic [63:0]       rho_b4, rho_b10, lam_a0;
  logic              buf_zero, step1, upd;

  mugi_ctrl #(.ROUNDS_PER_STEP(ROUNDS_PER_STEP)) u_ctrl (
    .clk, .rst_n, .ki_valid, .phase, .ki_load, .iv_req
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ki_reg <= '0;
    else if (ki_load) ki_reg <= ki;
  end

  mugi_kiinit u_kiinit (.ki(ki_reg), .a_init(a_ki));

  // Auxiliary Buffer1: rho sees zero from Buffer b while b is being built.
  assign buf_zero = (phase == MUGI_STEP1) || (phase == MUGI_STEP2);
  assign rho_b4   = buf_zero ? '0 : b[4];
  assign rho_b10  = buf_zero ? '0 : b[10];
  // Auxiliary Buffer2: a0 does not reach lambda during step 1.
  assign step1    = (phase == MUGI_STEP1);
  assign lam_a0   = step1 ? '0 : a[191:128];

  mugi_rho    u_rho (.a(a), .b4(rho_b4), .b10(rho_b10), .a_next(a_rho));
  mugi_lambda u_lam (.b(b), .a0(lam_a0), .b_next(b_lam));

  // Full Update in STEP3, and in GEN when a word is requested.
  assign upd = (phase == MUGI_STEP3) || (phase == MUGI_GEN && ks_en && !ki_valid);

  always_comb begin
    a_next = a;
    b_next = b;
    unique case (phase)
      MUGI_KEY_LOAD: a_next = a_ki;                      // IN2
      MUGI_IV_ADD:   a_next = a ^ a_ki;                  // IN1
      MUGI_STEP1: begin
        a_next = a_rho;                                  // IN3
        b_next = {b[14:0], a_rho[191:128]};              // rho_0 into b0
      end
      MUGI_STEP2:    a_next = a_rho;
      default: ;
    endcase
    if (upd) begin
      a_next = a_rho;
      b_next = b_lam;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
    end else begin
      a <= a_next;
      b <= b_next;
    end
  end

  // Output register: latches a2 only in the keystream phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks       <= '0;
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= 1'b0;
      if (phase == MUGI_GEN && ks_en && !ki_valid) begin
        ks       <= a[63:0];
        ks_valid <= 1'b1;
      end
    end
  end

  assign busy = (phase != MUGI_IDLE) && (phase != MUGI_GEN);

  // The output register never shows a word during key setup.
  a_no_output_in_setup: assert property (@(posedge clk) disable iff (!rst_n) ks_valid |-> !busy);
  assign dout = din ^ ks;
endmodule
