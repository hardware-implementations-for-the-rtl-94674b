// snow2_fsm: the finite state machine of SNOW 2.0.
// Two 32-bit registers R1 and R2, two modulo-2^32 adders and the S
// transform (AES SubBytes followed by one MixColumn, byte 0 least
// significant), realized as four 256x32 T-tables whose outputs are XORed.
//   F     = (s15 + R1) ^ R2                   (combinational output)
//   R1   <= s5 + R2,  R2 <= S(R1)             (when step = 1)
// load clears R1 and R2 (key setup); it takes precedence over step.
//
// ROM_BASED = 0: the T-tables are asynchronous look-up tables on R1.
// ROM_BASED = 1: the T-tables are synchronous ROMs addressed by the input of
// R1 (its next value), so the registered ROM outputs always hold T_i[R1];
// R2 still latches their XOR on the next step.
module snow2_fsm #(
  parameter bit ROM_BASED = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic [31:0] s15,
  input  logic [31:0] s5,
  output logic [31:0] f
);
  import cipher_pkg::*;
  localparam word_table_t T0 = gen_snow_t(0);
  localparam word_table_t T1 = gen_snow_t(1);
  localparam word_table_t T2 = gen_snow_t(2);
  localparam word_table_t T3 = gen_snow_t(3);

  logic [31:0] r1, r2, r1_next, r2_next, sr1;

  assign f = (s15 + r1) ^ r2;

  always_comb begin
    r1_next = r1;
    r2_next = r2;
    if (load) begin
      r1_next = '0;
      r2_next = '0;
    end else if (step) begin
      r1_next = s5 + r2;
      r2_next = sr1;
    end
  end

  if (ROM_BASED) begin : g_rom
    logic [31:0] q0, q1, q2, q3;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q0 <= T0[0]; q1 <= T1[0]; q2 <= T2[0]; q3 <= T3[0];
      end else begin
        q0 <= T0[r1_next[7:0]];
        q1 <= T1[r1_next[15:8]];
        q2 <= T2[r1_next[23:16]];
        q3 <= T3[r1_next[31:24]];
      end
    end
    assign sr1 = q0 ^ q1 ^ q2 ^ q3;
  end else begin : g_lut
    assign sr1 = T0[r1[7:0]] ^ T1[r1[15:8]] ^ T2[r1[23:16]] ^ T3[r1[31:24]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
    end else begin
      r1 <= r1_next;
      r2 <= r2_next;
    end
  end
endmodule
