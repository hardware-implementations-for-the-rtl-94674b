// snow2_alpha: multiplication of a 32-bit LFSR word by alpha (INVERSE = 0)
// or by alpha^-1 (INVERSE = 1) in GF(2^32) as used by SNOW 2.0:
//   alpha * w    = (w << 8) ^ MUL_a[w >> 24]
//   alpha^-1 * w = (w >> 8) ^ MUL_ainverse[w & 0xff]
// The 256-entry tables are built at elaboration (cipher_pkg::gen_snow_mul).
//
// ROM_BASED = 0: the table is an asynchronous look-up table read with w.
// ROM_BASED = 1: the table is a synchronous ROM. Its address is w_next, the
// value the register holding w takes at the next clock edge, so that the
// registered ROM output belongs to w when w is used (the tap is taken one
// stage earlier). w_next is ignored when ROM_BASED = 0. After reset the
// register and the ROM output are both consistent with w = 0.
module snow2_alpha #(
  parameter bit INVERSE   = 1'b0,
  parameter bit ROM_BASED = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] w,
  input  logic [31:0] w_next,
  output logic [31:0] y
);
  import cipher_pkg::*;
  localparam word_table_t TAB = gen_snow_mul(INVERSE);

  logic [31:0] shifted, tab_out;
  logic [7:0]  addr_now, addr_next;

  assign shifted   = INVERSE ? (w >> 8) : (w << 8);
  assign addr_now  = INVERSE ? w[7:0] : w[31:24];
  assign addr_next = INVERSE ? w_next[7:0] : w_next[31:24];

  if (ROM_BASED) begin : g_rom
    logic [31:0] rom_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rom_q <= TAB[0];
      else        rom_q <= TAB[addr_next];
    end
    assign tab_out = rom_q;
  end else begin : g_lut
    assign tab_out = TAB[addr_now];
  end

  assign y = shifted ^ tab_out;
endmodule
