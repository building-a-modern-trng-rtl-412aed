// es_pkg: types and constants shared by the entropy-source modules.
//
// The PollEntropy result word carries a two-bit operational status (OPST) in
// bits 31:30 and a 16-bit seed in bits 15:0. Bits 29:24 are reserved for the
// RISC-V specification and bits 23:16 for custom use; this design drives both
// fields to zero so that they leak no extra status. On RV64 bit 31 is
// sign-extended into bits 63:32. The OPST encoding below is the one the
// interface defines: 00 BIST, 01 ES16, 10 WAIT, 11 DEAD.
package es_pkg;

  typedef enum logic [1:0] {
    OPST_BIST = 2'b00,  // start-up or on-demand self test, or a latched non-fatal alarm
    OPST_ES16 = 2'b01,  // rd[15:0] holds 16 bits of seed
    OPST_WAIT = 2'b10,  // no complete seed word yet
    OPST_DEAD = 2'b11   // unrecoverable self-test failure
  } opst_e;

  localparam int unsigned SEED_W    = 16;  // seed field width
  localparam int unsigned OPST_LSB  = 30;  // OPST occupies bits 31:30

  // Build the 32-bit PollEntropy word; the seed is only passed in ES16.
  function automatic logic [31:0] poll_word(opst_e opst, logic [SEED_W-1:0] seed);
    logic [31:0] w;
    w = '0;
    w[OPST_LSB +: 2] = opst;
    if (opst == OPST_ES16) w[SEED_W-1:0] = seed;
    return w;
  endfunction

endpackage
