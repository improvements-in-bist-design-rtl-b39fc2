// test_controller: the test controller logic (TCL) of the BIST.
//
// A four-state machine. In IDLE the CUT is in normal mode. A high bist_start
// moves it to INIT for one cycle, in which it pulses `init` to restart the
// TPG and clear the ORA's signature. In RUN it holds test_mode, tpg_en and
// ora_en high for exactly NUM_PATTERNS clock cycles: one pattern is applied
// and its response compacted per cycle. It then enters DONE, raises
// bist_done and stays there, with the CUT back in normal mode, until
// bist_start is seen high again, which starts a new run.
//
// Timing: bist_start sampled at edge 0 -> INIT during cycle 1 -> RUN during
// cycles 2 .. NUM_PATTERNS+1 -> bist_done from cycle NUM_PATTERNS+2.
//
// From the design: the controller starts the BIST, steers the TPG, the
// input isolation and the ORA, and reports BIST done. This design's own
// choices: the states, the one-cycle INIT, the fixed pattern count (default
// one full pass of the 4-bit TPG, 240 patterns) and the restart rule.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 240
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bist_start,
  output logic init,
  output logic test_mode,
  output logic tpg_en,
  output logic ora_en,
  output logic bist_done
);

  localparam int unsigned CW = $clog2(NUM_PATTERNS + 1);

  ctrl_state_t     state, state_n;
  logic [CW-1:0]   cnt;

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE: if (bist_start) state_n = ST_INIT;
      ST_INIT: state_n = ST_RUN;
      ST_RUN:  if (cnt == CW'(NUM_PATTERNS - 1)) state_n = ST_DONE;
      ST_DONE: if (bist_start) state_n = ST_INIT;
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      if (state == ST_RUN) cnt <= cnt + CW'(1);
      else                 cnt <= '0;
    end
  end

  assign init      = (state == ST_INIT);
  assign test_mode = (state == ST_INIT) || (state == ST_RUN);
  assign tpg_en    = (state == ST_RUN);
  assign ora_en    = (state == ST_RUN);
  assign bist_done = (state == ST_DONE);

  initial begin
    assert (NUM_PATTERNS > 0) else $error("test_controller: NUM_PATTERNS must be positive");
  end

endmodule
