// tss_controller: sequencer of the Teacher-Student Swap test flow.
// After start it walks the three steps of the flow, the same for every pair:
//   Step1 (STEP_INIT)  both cores teachers on V_DDH, to find initial failures
//   Step2 (STEP_CORE0) core 0 student on V_DDL, core 1 teacher on V_DDH
//   Step3 (STEP_CORE1) core 0 teacher on V_DDH, core 1 student on V_DDL
// and then rests in STEP_DONE, where test_mode drops and each core's rail
// comes from its V_DD memory. Each step is a one-cycle clr pulse (the step's
// result store is emptied and the rails switch), PIPE_DEPTH settle cycles (the
// core registers refill with results computed on the new rails) and
// TEST_CYCLES cycles with cmp_en high, during which the pairs compare.
// test0_sel_h / test1_sel_h are the Test0 / Test1 rail requests (1 = V_DDH):
// low only for the student of the running step. Before the first test and
// while a test runs, test_mode is high, so every core sits on V_DDH except the
// current student. start is honoured in STEP_IDLE and STEP_DONE.
// A whole test takes 3 * (1 + PIPE_DEPTH + TEST_CYCLES) cycles from the cycle
// after start to done.
// The step order and the rail of each core per step follow the flow; running
// the flow on chip, one controller for all pairs, and the step timing are this
// design's choice.
module tss_controller
  import tss_pkg::*;
#(
  parameter int unsigned TEST_CYCLES = 1024,
  parameter int unsigned PIPE_DEPTH  = CORE_PIPE_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output step_e step,
  output logic  clr,
  output logic  cmp_en,
  output logic  test_mode,
  output logic  test0_sel_h,
  output logic  test1_sel_h,
  output logic  busy,
  output logic  done
);
  typedef enum logic [1:0] {PH_CLR, PH_SETTLE, PH_RUN} phase_e;

  localparam int unsigned CNT_W = $clog2(TEST_CYCLES + PIPE_DEPTH + 1) + 1;

  phase_e           phase;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step  <= STEP_IDLE;
      phase <= PH_CLR;
      cnt   <= '0;
    end else begin
      unique case (step)
        STEP_IDLE, STEP_DONE: begin
          if (start) begin
            step  <= STEP_INIT;
            phase <= PH_CLR;
            cnt   <= '0;
          end
        end
        default: begin
          unique case (phase)
            PH_CLR: begin
              cnt   <= '0;
              phase <= (PIPE_DEPTH == 0) ? PH_RUN : PH_SETTLE;
            end
            PH_SETTLE: begin
              if (cnt == CNT_W'(PIPE_DEPTH - 1)) begin
                cnt   <= '0;
                phase <= PH_RUN;
              end else begin
                cnt <= cnt + 1'b1;
              end
            end
            PH_RUN: begin
              if (cnt == CNT_W'(TEST_CYCLES - 1)) begin
                cnt   <= '0;
                phase <= PH_CLR;
                unique case (step)
                  STEP_INIT:  step <= STEP_CORE0;
                  STEP_CORE0: step <= STEP_CORE1;
                  default:    step <= STEP_DONE;
                endcase
              end else begin
                cnt <= cnt + 1'b1;
              end
            end
            default: phase <= PH_CLR;
          endcase
        end
      endcase
    end
  end

  always_comb begin
    busy        = (step == STEP_INIT) || (step == STEP_CORE0) || (step == STEP_CORE1);
    done        = (step == STEP_DONE);
    clr         = busy && (phase == PH_CLR);
    cmp_en      = busy && (phase == PH_RUN);
    test_mode   = (step != STEP_DONE);
    test0_sel_h = (step != STEP_CORE0);
    test1_sel_h = (step != STEP_CORE1);
  end

  initial assert (TEST_CYCLES > 0) else $error("tss_controller: TEST_CYCLES must be > 0");

  // The comparison window only opens inside a step.
  a_cmp_in_step: assert property (@(posedge clk) cmp_en |-> busy);
  // Exactly one student at a time, never both.
  a_one_student: assert property (@(posedge clk) test0_sel_h || test1_sel_h);
endmodule
