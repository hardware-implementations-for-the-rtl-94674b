// mickey_pkg: register constants for the MICKEY-128 registers R and S, and
// the controller phases.
//
// The architecture (irregular clocking of R, the NFSR S with selectable
// feedback vectors FB0/FB1) is the MICKEY-128 one, but the bit vectors below
// are PLACEHOLDERS chosen for this design, not the constants of the
// MICKEY-128 specification: RTAPS (which R stages receive the feedback bit),
// COMP0/COMP1 (the inversion masks of the S transformation tr) and FB0/FB1
// (which S stages receive the feedback bit). Substitute the published
// constants before using the core as MICKEY-128. Bit i is stage i; RTAPS[0]
// and FB0[0] are set so that the feedback reaches stage 0.
package mickey_pkg;
  localparam logic [127:0] MICKEY_RTAPS = 128'h9A7D31C5E8B20F64D3A15C974B2E68F1;
  localparam logic [127:0] MICKEY_COMP0 = 128'h4F1B9D27C6A358E0B1742D9F8E36A5C2;
  localparam logic [127:0] MICKEY_COMP1 = 128'hE3A90C5F7B16D24E893AF16C52D80B97;
  localparam logic [127:0] MICKEY_FB0   = 128'h7C2EA45B19F36D80C2B75E14A93DF605;
  localparam logic [127:0] MICKEY_FB1   = 128'hB5D06E3AF28C417B0DA693E52C7F18B5;

  typedef enum logic [2:0] {
    MK_IDLE, MK_IV, MK_KEY, MK_PRECLOCK, MK_GEN
  } mickey_phase_t;
endpackage
