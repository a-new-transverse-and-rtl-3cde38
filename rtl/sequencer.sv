// Sequencer for excitation and detection experiments.
//
// A programmed list of states, run once per trigger.  Each state sweeps the
// excitation oscillator (NCO1): it starts at `start_freq`, holds each
// frequency for a dwell of `dwell_turns` whole turns, then steps by
// `step_freq`, for `dwells` dwells.  At the end of each dwell `dwell_end`
// pulses so the detectors store their result.  Each state also selects the
// bunch-select bank and the excitation gain.  States 1..last_state are run in
// order; state 0 gives the bank used while idle.  A trigger arms the start;
// the first dwell begins at the next bunch-0 cycle so dwells cover whole turns.
// `done` pulses when the last dwell ends.
//
// State table: 4 words per state, written with wr_addr = {state, word}:
//   word 0 start_freq[31:0], word 1 step_freq[31:0],
//   word 2 {dwells[15:0], dwell_turns[15:0]}, word 3 {gain[15:0], 14'b0, bank[1:0]}.
// A programmable sequence of NCO frequencies controlling the detectors
// follows the processor's description; the state format is this design's.
module sequencer
  import lmbf_pkg::*;
#(
  parameter int STATES = 8,
  localparam int SW = $clog2(STATES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          turn_start,
  input  logic          trigger,
  input  logic [SW-1:0] last_state,
  input  logic          wr_en,
  input  logic [SW+1:0] wr_addr,
  input  logic [31:0]   wr_data,
  output seq_ctrl_t     ctrl,
  output logic [SW-1:0] state,
  output logic          done
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RUN} phase_e;

  logic [31:0] tbl [STATES*4];
  phase_e      ph;
  logic [15:0] turn_cnt, dwell_cnt;
  logic [31:0] freq;

  always_ff @(posedge clk) if (wr_en) tbl[wr_addr] <= wr_data;

  logic [31:0] w1, w2, w3, n0;
  logic [SW-1:0] next_state;
  always_comb begin
    w1 = tbl[{state, 2'd1}];
    w2 = tbl[{state, 2'd2}];
    w3 = tbl[{state, 2'd3}];
    next_state = state + SW'(1);
    n0 = tbl[{next_state, 2'd0}];
  end

  logic dwell_last, state_last;
  always_comb begin
    dwell_last = (ph == S_RUN) && turn_start && (turn_cnt == w2[15:0] - 16'd1);
    state_last = dwell_last && (dwell_cnt == w2[31:16] - 16'd1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph        <= S_IDLE;
      state     <= '0;
      turn_cnt  <= '0;
      dwell_cnt <= '0;
      freq      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ph)
        S_IDLE: if (trigger) ph <= S_WAIT;
        S_WAIT: if (turn_start) begin
          // the cycle before the first dwell: load state 1
          ph        <= S_RUN;
          state     <= SW'(1);
          freq      <= tbl[{SW'(1), 2'd0}];
          turn_cnt  <= '0;
          dwell_cnt <= '0;
        end
        S_RUN: if (turn_start) begin
          if (state_last) begin
            if (state == last_state) begin
              ph    <= S_IDLE;
              state <= '0;
              freq  <= '0;
              done  <= 1'b1;
            end else begin
              state     <= next_state;
              freq      <= n0;
              turn_cnt  <= '0;
              dwell_cnt <= '0;
            end
          end else if (dwell_last) begin
            turn_cnt  <= '0;
            dwell_cnt <= dwell_cnt + 16'd1;
            freq      <= freq + w1;
          end else begin
            turn_cnt <= turn_cnt + 16'd1;
          end
        end
        default: ph <= S_IDLE;
      endcase
    end
  end

  // A dwell runs from the cycle after one bunch-0 cycle up to and including
  // a later bunch-0 cycle, so the detectors sum every bunch once per turn.
  always_comb begin
    ctrl.freq      = freq;
    ctrl.gain      = (ph == S_RUN) ? $signed(w3[31:16]) : 16'sd0;
    ctrl.bank      = w3[1:0];
    ctrl.busy      = (ph == S_RUN);
    ctrl.start     = (ph == S_WAIT) && turn_start;
    ctrl.dwell_end = dwell_last;
  end
endmodule
