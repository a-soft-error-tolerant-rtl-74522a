// Sequencer of two-stage triple modular redundancy (TMR).
//
// Conventional TMR always runs three copies of a task and votes. Two-stage
// TMR splits this: the primary stage runs two copies and compares them; when
// they agree (the common, fault-free case) their result is final and the
// third copy is never run, saving its energy. Only when they disagree does
// the supplementary stage run the third copy, and a majority vote over the
// three copies gives the result. This sequencer applies that to one
// operation of the protected module at a time.
//
// Cycle plan after start (taken in TMR_IDLE only):
//   +0 opnd_load   operands latched
//   +1 pri_cap     primary copies captured (stage-1 A, B)
//   +2 pri_merge   primary voter E1 updated; pri_mismatch examined;
//                  sel latched from it
//   agreement:     +3 done (supp_used = 0)
//   disagreement:  +3 supp_active, supp_cap (third copy computed, C, D)
//                  +4 supp_merge (E2 updated)
//                  +5 done (supp_used = 1)
// The stages and the skip of the third copy follow the document; the cycle
// counts are this design's choice (the document runs the supplementary stage
// at maximum voltage and frequency, which has no RTL counterpart).
// supp_active is low outside the supplementary capture so that the
// supplementary modules can be held idle.
module two_stage_tmr_ctrl
  import cdmr_pkg::*;
#(
  parameter int unsigned WIDTH = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] pri_mismatch,
  output logic             busy,
  output logic             opnd_load,
  output logic             pri_cap,
  output logic             pri_merge,
  output logic             supp_active,
  output logic             supp_cap,
  output logic             supp_merge,
  output logic [WIDTH-1:0] sel,
  output logic             done,
  output logic             supp_used
);

  tmr_state_t state, state_nx;

  always_comb begin
    state_nx = state;
    unique case (state)
      TMR_IDLE:     if (start) state_nx = TMR_PRI_CAP;
      TMR_PRI_CAP:  state_nx = TMR_PRI_CMP;
      TMR_PRI_CMP:  state_nx = (|pri_mismatch) ? TMR_SUPP_CAP : TMR_RESULT;
      TMR_SUPP_CAP: state_nx = TMR_SUPP_MRG;
      TMR_SUPP_MRG: state_nx = TMR_RESULT;
      TMR_RESULT:   state_nx = TMR_IDLE;
      default:      state_nx = TMR_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TMR_IDLE;
      sel       <= '0;
      supp_used <= 1'b0;
    end else begin
      state <= state_nx;
      if (state == TMR_PRI_CMP) begin
        sel       <= pri_mismatch;
        supp_used <= |pri_mismatch;
      end
    end
  end

  always_comb begin
    busy        = (state != TMR_IDLE);
    opnd_load   = (state == TMR_IDLE) && start;
    pri_cap     = (state == TMR_PRI_CAP);
    pri_merge   = (state == TMR_PRI_CMP);
    supp_active = (state == TMR_SUPP_CAP);
    supp_cap    = (state == TMR_SUPP_CAP);
    supp_merge  = (state == TMR_SUPP_MRG);
    done        = (state == TMR_RESULT);
  end

  // A new task may only be requested while the sequencer is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("two_stage_tmr_ctrl: start while busy");

endmodule
