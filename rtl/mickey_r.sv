// mickey_r: register R of MICKEY-128, a 128-bit irregularly clocked LFSR.
// On each enabled clock every stage takes its left neighbour (r0 takes 0),
// the feedback bit r127 ^ input_bit is XORed into the stages selected by
// RTAPS, and when control_bit is 1 an AND gate per stage also XORs each
// stage's present value into its next value, so the register is multiplied
// by x+1 instead of x. clr clears all stages. One step per clock with en=1.
// The RTAPS default is a placeholder (see mickey_pkg).
module mickey_r #(
  parameter logic [127:0] RTAPS = mickey_pkg::MICKEY_RTAPS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         input_bit,
  input  logic         control_bit,
  output logic [127:0] r
);
  logic         fb;
  logic [127:0] r_next;

  assign fb     = r[127] ^ input_bit;
  assign r_next = {r[126:0], 1'b0} ^ (RTAPS & {128{fb}}) ^ (r & {128{control_bit}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   r <= '0;
    else if (clr) r <= '0;
    else if (en)  r <= r_next;
  end
endmodule
