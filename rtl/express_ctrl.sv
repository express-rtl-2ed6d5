// express_ctrl: control unit that starts, pauses, resumes and finishes an
// expansion.
//
// A start-bit write of 1 while idle or finished begins a new matrix: the
// unit spends one cycle in INIT, where `init` clears the back-end read
// pointers, the front-end position and the buffers, and then enters RUN.
// A start-bit write of 0 during RUN pauses the engine (PAUSE) with all state
// kept; writing 1 again resumes it. This matches the start/stop bit and the
// save/restore procedure of the design (stop, save buffers and bookkeeping,
// later set start to resume). RUN ends in DONE once the front-end reports
// that every element of the matrix has been placed in the buffers; the CPU
// may keep draining the buffers afterwards.
//
// `run` enables the back-end and the front-end pipeline. Throttling on
// buffer space is done by ready/valid back-pressure between the stages, so
// this unit needs no buffer counters of its own.
// Timing: `init` is a single cycle; every output is a registered state decode.
module express_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start_set,
  input  logic start_clr,
  input  logic fe_done,
  output logic init,
  output logic run,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_INIT,
    ST_RUN,
    ST_PAUSE,
    ST_DONE
  } ctrl_state_e;

  ctrl_state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE, ST_DONE: if (start_set) state_n = ST_INIT;
      ST_INIT:          state_n = ST_RUN;
      ST_RUN: begin
        if (fe_done)        state_n = ST_DONE;
        else if (start_clr) state_n = ST_PAUSE;
      end
      ST_PAUSE:         if (start_set) state_n = ST_RUN;
      default:          state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_n;
  end

  assign init = (state == ST_INIT);
  assign run  = (state == ST_RUN);
  assign busy = (state == ST_INIT) || (state == ST_RUN) || (state == ST_PAUSE);
  assign done = (state == ST_DONE);

endmodule
