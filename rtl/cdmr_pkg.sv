// Shared types for the CDMR / two-stage TMR datapath and the transparent
// FIFO memory test.
//
// tmr_state_t  : states of the two-stage TMR sequencer (primary capture,
//                primary compare, supplementary capture, supplementary merge,
//                result).
// mats_phase_t : the iteration j of the transparent SOA-MATS++ test applied
//                to one memory location (invert, check-and-restore, verify).
// maj3         : bitwise two-out-of-three majority, used by the testbenches
//                as the reference for the output multiplexer.
package cdmr_pkg;

  typedef enum logic [2:0] {
    TMR_IDLE     = 3'd0,
    TMR_PRI_CAP  = 3'd1,
    TMR_PRI_CMP  = 3'd2,
    TMR_SUPP_CAP = 3'd3,
    TMR_SUPP_MRG = 3'd4,
    TMR_RESULT   = 3'd5
  } tmr_state_t;

  typedef enum logic [1:0] {
    MATS_J0 = 2'd0,   // read into temp, back up in original, write ~temp
    MATS_J1 = 2'd1,   // read, compare with original (all ones), restore
    MATS_J2 = 2'd2    // read, compare with original (all zeros)
  } mats_phase_t;

endpackage
