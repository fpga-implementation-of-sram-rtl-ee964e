// bisr_ctrl: sequencer of the test-and-repair flow.
//
// A start pulse (accepted when the flow is not running and ready is high)
// runs these steps:
//   1. clear the analyser and load its empty signature into the repair
//      registers, so the raw RAM is tested;
//   2. run the BIST with the analyser in test mode, and wait until the
//      analyser has handled the last fault report;
//   3. if the RAM is repairable, load the repair signature into the repair
//      registers and switch the analyser to normal mode, where its bitmap
//      serves as spare bits;
//   4. run the BIST again as the pre-fuse test of the repaired RAM;
//   5. if that passes, program the fuses.
// The flow stops with unrepairable after step 2 or retest_fail after step 4.
// Otherwise it ends with repaired_ok = the fuse read-back result. done, and
// these flags, hold until the next start. busy is high from the start pulse
// to the end; while it is high the BIST owns the RAM. bira_mode is 0 (test)
// in steps 1-2 and 1 (normal) otherwise.
// With POR_START = 1 the flow also starts by itself once ready goes high
// after a reset, so power-on reset both restores the fuses and runs a new
// self-repair; with the default 0 only start runs it.
// The order of steps and the power-on option follow the test and repair flow
// of the paper. The abort conditions and the flags
// are this design's choices.
module bisr_ctrl #(
  parameter bit POR_START = 1'b0   // also run the flow once after every reset
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic ready,          // fuse restore finished
  // BIST
  output logic bist_start,
  input  logic bist_done,
  input  logic bist_fail,
  // BIRA
  output logic bira_clear,
  output logic bira_mode,
  input  logic bira_idle,
  input  logic bira_rep,
  // fuse macro
  output logic fuse_sig_load,
  output logic fuse_prog_start,
  input  logic fuse_prog_done,
  input  logic fuse_prog_ok,
  // status
  output bisr_pkg::flow_state_t state,
  output logic busy,
  output logic done,
  output logic repaired_ok,
  output logic unrepairable,
  output logic retest_fail
);
  import bisr_pkg::*;

  logic por_pending;

  always_comb begin
    bist_start      = (state == FLOW_TEST_GO) || (state == FLOW_RETEST_GO);
    bira_clear      = (state == FLOW_CLEAR);
    fuse_sig_load   = (state == FLOW_UNREPAIR) || (state == FLOW_LOAD);
    fuse_prog_start = (state == FLOW_PROG_GO);
    bira_mode       = !(state inside {FLOW_CLEAR, FLOW_UNREPAIR, FLOW_TEST_GO,
                                      FLOW_TEST, FLOW_DRAIN});
    busy            = !(state inside {FLOW_IDLE, FLOW_DONE, FLOW_FAIL});
    done            = (state == FLOW_DONE) || (state == FLOW_FAIL);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= FLOW_IDLE;
      por_pending  <= POR_START;
      repaired_ok  <= 1'b0;
      unrepairable <= 1'b0;
      retest_fail  <= 1'b0;
    end else begin
      case (state)
        FLOW_CLEAR:     state <= FLOW_UNREPAIR;
        FLOW_UNREPAIR:  state <= FLOW_TEST_GO;
        FLOW_TEST_GO:   state <= FLOW_TEST;
        FLOW_TEST:      if (bist_done) state <= FLOW_DRAIN;
        FLOW_DRAIN:
          if (bira_idle) begin
            if (bira_rep) state <= FLOW_LOAD;
            else begin
              state        <= FLOW_FAIL;
              unrepairable <= 1'b1;
            end
          end
        FLOW_LOAD:      state <= FLOW_RETEST_GO;
        FLOW_RETEST_GO: state <= FLOW_RETEST;
        FLOW_RETEST:
          if (bist_done) begin
            if (bist_fail) begin
              state       <= FLOW_FAIL;
              retest_fail <= 1'b1;
            end else state <= FLOW_PROG_GO;
          end
        FLOW_PROG_GO:   state <= FLOW_PROG;
        FLOW_PROG:
          if (fuse_prog_done) begin
            state       <= FLOW_DONE;
            repaired_ok <= fuse_prog_ok;
          end
        default:  // FLOW_IDLE, FLOW_DONE, FLOW_FAIL
          if ((start || por_pending) && ready) begin
            state        <= FLOW_CLEAR;
            por_pending  <= 1'b0;
            repaired_ok  <= 1'b0;
            unrepairable <= 1'b0;
            retest_fail  <= 1'b0;
          end
      endcase
    end
  end
endmodule
