// mugi_pkg: phase encoding of the MUGI control unit.
//   IDLE      waiting for the key on the K/I port
//   KEY_LOAD  State a <= K/I init(K)                       (MUX input IN2)
//   STEP1     16 rounds of rho(a,0); rho_0 is shifted into Buffer b
//   IV_WAIT   waiting for the initial vector on the K/I port
//   IV_ADD    State a <= State a ^ K/I init(I)             (MUX input IN1)
//   STEP2     16 rounds of rho(a,0); Buffer b holds
//   STEP3     16 rounds of the full Update (rho and lambda)
//   GEN       one Update per ks_en, output register latches a2
package mugi_pkg;
  typedef enum logic [2:0] {
    MUGI_IDLE, MUGI_KEY_LOAD, MUGI_STEP1, MUGI_IV_WAIT,
    MUGI_IV_ADD, MUGI_STEP2, MUGI_STEP3, MUGI_GEN
  } mugi_phase_t;
endpackage
