// mickey_s: register S of MICKEY-128, a 128-bit non-linear feedback shift
// register. On each enabled clock the transformation tr computes
//   t_i = s_{i-1} ^ ((s_i ^ COMP0_i) & (s_{i+1} ^ COMP1_i))   (1 <= i <= 126),
//   t_0 = 0, t_127 = s_126,
// and then the feedback bit s127 ^ input_bit is XORed into the stages selected
// by FB0 (control_bit = 0) or FB1 (control_bit = 1). clr clears all stages.
// The constant defaults are placeholders (see mickey_pkg).
module mickey_s #(
  parameter logic [127:0] COMP0 = mickey_pkg::MICKEY_COMP0,
  parameter logic [127:0] COMP1 = mickey_pkg::MICKEY_COMP1,
  parameter logic [127:0] FB0   = mickey_pkg::MICKEY_FB0,
  parameter logic [127:0] FB1   = mickey_pkg::MICKEY_FB1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         input_bit,
  input  logic         control_bit,
  output logic [127:0] s
);
  logic         fb;
  logic [127:0] t, s_next;

  assign fb = s[127] ^ input_bit;

  always_comb begin
    t[0]   = 1'b0;
    t[127] = s[126];
    for (int i = 1; i < 127; i++)
      t[i] = s[i-1] ^ ((s[i] ^ COMP0[i]) & (s[i+1] ^ COMP1[i]));
  end

  assign s_next = t ^ ((control_bit ? FB1 : FB0) & {128{fb}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s <= '0;
    else if (clr) s <= '0;
    else if (en)  s <= s_next;
  end
endmodule
