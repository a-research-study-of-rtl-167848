// lb_pkg: types shared by the instruction memory organisation (IMO) with a
// loop buffer.
//
// lb_state_e names the six states of the loop buffer controller. s0, s2 and
// s4 are the working states (program memory only, recording the first loop
// iteration, supplying from the loop buffer); s1, s3 and s5 are one-cycle
// hand-over states between them. The state list follows the loop buffer
// controller description; the binary encoding is this design's own choice.
//
// lb_arch_e selects the loop buffer architecture: a single central loop
// buffer memory (CELB) or a banked central loop buffer (BCLB).
package lb_pkg;

  typedef enum logic [2:0] {
    S0_IDLE      = 3'd0,  // instructions come from the program memory
    S1_PM_TO_REC = 3'd1,  // hand-over: loop buffer claimed, recording starts
    S2_RECORD    = 3'd2,  // program memory feeds processor and loop buffer
    S3_REC_TO_LB = 3'd3,  // hand-over: last recorded word is being written
    S4_LB_SUPPLY = 3'd4,  // loop buffer feeds the processor
    S5_LB_TO_PM  = 3'd5   // hand-over: supply returns to the program memory
  } lb_state_e;

  typedef enum logic {
    ARCH_CELB = 1'b0,
    ARCH_BCLB = 1'b1
  } lb_arch_e;

endpackage
