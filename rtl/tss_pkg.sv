// tss_pkg: types and constants shared by the Teacher-Student Swap (TSS) test
// logic. The step encoding follows the three-step test flow: an initial test
// with both cores as teachers at V_DDH, the test of core 0 as a student at
// V_DDL, and the swapped test of core 1. STEP_IDLE and STEP_DONE are this
// design's own states before and after the flow.
package tss_pkg;

  typedef enum logic [2:0] {
    STEP_IDLE  = 3'd0,  // no test has run since reset
    STEP_INIT  = 3'd1,  // Step1: core 0 and core 1 both teachers at V_DDH
    STEP_CORE0 = 3'd2,  // Step2: core 0 student at V_DDL, core 1 teacher
    STEP_CORE1 = 3'd3,  // Step3: core 0 teacher, core 1 student at V_DDL
    STEP_DONE  = 3'd4   // flow finished, rails follow the V_DD memories
  } step_e;

  // Width of the adder in each core; the pattern is twice as wide.
  localparam int unsigned CORE_WIDTH = 16;
  // Register stages between the LFSR and the comparator inside a core.
  localparam int unsigned CORE_PIPE_DEPTH = 2;

endpackage
