// Shared types for the PLL clock-and-reset design.
//
// pfd_state_t  : the three states of the phase/frequency detector. STATE 0
//                drives neither output, STATE I drives Qa, STATE II drives Qb.
// seq_state_t  : the power-up sequence of the clock/reset controller. The
//                state names and order are this design's own; the document
//                only names the signals the sequencer drives.
package pll_pkg;

  typedef enum logic [1:0] {
    PFD_S0  = 2'd0,   // Qa = 0, Qb = 0
    PFD_SI  = 2'd1,   // Qa = 1, Qb = 0
    PFD_SII = 2'd2    // Qa = 0, Qb = 1
  } pfd_state_t;

  typedef enum logic [2:0] {
    SEQ_RESET     = 3'd0,  // external reset active
    SEQ_SAMPLE    = 3'd1,  // capture the PLL configuration pins
    SEQ_PLL_START = 3'd2,  // release the PLL reset (or take the bypass path)
    SEQ_WAIT_LOCK = 3'd3,  // wait for the lock detector
    SEQ_DIV_ON    = 3'd4,  // start the clock divider and let it settle
    SEQ_SWITCH    = 3'd5,  // switch the core clock mux to the PLL clock
    SEQ_RUN       = 3'd6,  // core reset released, normal operation
    SEQ_BYPASS    = 3'd7   // PLL bypassed, core runs on the reference clock
  } seq_state_t;

endpackage
