// trivium: TRIVIUM keystream generator, one bit per clock.
// The 288-bit state s1..s288 is held in st[1..288]. Every stage has an OR
// gate at its input through which the key, IV and constant are forced in on
// start (the shift path is gated off during that cycle): s1..s80 = key,
// s94..s173 = iv, s286..s288 = 1, all other stages 0. Each clock computes,
// with 11 two-input XORs and 3 two-input ANDs,
//   t1 = s66 ^ s93,  t2 = s162 ^ s177,  t3 = s243 ^ s288,  z = t1 ^ t2 ^ t3
//   t1' = t1 ^ s91&s92 ^ s171, t2' = t2 ^ s175&s176 ^ s264,
//   t3' = t3 ^ s286&s287 ^ s69
// and rotates the three registers, with t3' entering s1, t1' s94 and t2'
// s178. INIT_CLOCKS (4 x 288) clocks follow start without output; busy is
// high for them. Afterwards each cycle with ks_en = 1 latches z into the
// output flip-flop ks (ks_valid pulses) and clocks the state.
// key[i] is key bit K_{i+1} and iv[i] is IV bit IV_{i+1}.
module trivium #(
  parameter int unsigned INIT_CLOCKS = 1152
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [79:0] key,
  input  logic [79:0] iv,
  input  logic        start,
  output logic        busy,
  input  logic        ks_en,
  output logic        ks,
  output logic        ks_valid
);
  localparam int unsigned CW = $clog2(INIT_CLOCKS + 1);
  logic [288:1] st, shifted, load_val, st_next;
  logic         t1, t2, t3, z, n1, n2, n3, step;
  logic [CW-1:0] cnt;

  assign t1 = st[66]  ^ st[93];
  assign t2 = st[162] ^ st[177];
  assign t3 = st[243] ^ st[288];
  assign z  = t1 ^ t2 ^ t3;
  assign n1 = t1 ^ (st[91]  & st[92])  ^ st[171];
  assign n2 = t2 ^ (st[175] & st[176]) ^ st[264];
  assign n3 = t3 ^ (st[286] & st[287]) ^ st[69];

  always_comb begin
    shifted         = {st[287:1], 1'b0};
    shifted[1]      = n3;
    shifted[94]     = n1;
    shifted[178]    = n2;
    load_val        = '0;
    load_val[80:1]  = key;
    load_val[173:94] = iv;
    load_val[288:286] = 3'b111;
  end

  assign step    = busy || (ks_en && !start);
  // OR-gate loading: during start the shift path is forced to zero.
  assign st_next = (shifted & {288{!start}}) | (load_val & {288{start}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (start) begin
      st   <= st_next;
      cnt  <= '0;
      busy <= 1'b1;
    end else begin
      if (step) st <= st_next;
      if (busy) begin
        if (cnt == CW'(INIT_CLOCKS - 1)) busy <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks       <= 1'b0;
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= 1'b0;
      if (!busy && ks_en && !start) begin
        ks       <= z;
        ks_valid <= 1'b1;
      end
    end
  end

  // The output flip-flop never shows a bit during key setup.
  a_no_output_in_setup: assert property (@(posedge clk) disable iff (!rst_n) ks_valid |-> !busy);
endmodule
