// snow2_pkg: controller phases of the SNOW 2.0 core.
//   IDLE  no key loaded
//   INIT  32 clocks with the FSM output F fed into the LFSR feedback
//   POST  one clock without output (the first keystream word is z_1)
//   GEN   one clock and one keystream word per ks_en
package snow2_pkg;
  typedef enum logic [1:0] {SN_IDLE, SN_INIT, SN_POST, SN_GEN} snow2_phase_t;
endpackage
