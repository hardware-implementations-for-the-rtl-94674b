// snow2_lfsr: the 16-word LFSR of SNOW 2.0 over GF(2^32).
// s[0] is s_t (oldest), s[15] is s_{t+15}. Each shift computes
//   s_{t+16} = alpha * s_t ^ s_{t+2} ^ alpha^-1 * s_{t+11} ^ (init_mode ? F : 0)
// where the last term is the feedback multiplexer: the FSM output during
// key initialization, zeros while producing keystream.
// Loading: every stage input is the OR of the shift path and the load value;
// on load the shift path is forced to zero, so the stages take init_val
// (parallel load in one cycle). Without load or shift the register holds.
// The alpha units are combinational (ROM_BASED = 0) or synchronous ROMs
// addressed by the next value of s_t and s_{t+11} (ROM_BASED = 1).
module snow2_lfsr #(
  parameter bit ROM_BASED = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [15:0][31:0] init_val,
  input  logic             shift,
  input  logic             init_mode,
  input  logic [31:0]      f,
  output logic [15:0][31:0] s
);
  logic [15:0][31:0] d, s_next;
  logic [31:0]       mul_a, div_a, fb;

  snow2_alpha #(.INVERSE(1'b0), .ROM_BASED(ROM_BASED)) u_mul (
    .clk, .rst_n, .w(s[0]),  .w_next(s_next[0]),  .y(mul_a)
  );
  snow2_alpha #(.INVERSE(1'b1), .ROM_BASED(ROM_BASED)) u_div (
    .clk, .rst_n, .w(s[11]), .w_next(s_next[11]), .y(div_a)
  );

  assign fb = mul_a ^ s[2] ^ div_a ^ (init_mode ? f : 32'd0);

  always_comb begin
    if (load)       d = '0;
    else if (shift) d = {fb, s[15:1]};
    else            d = s;
    s_next = d | (load ? init_val : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= s_next;
  end
endmodule
