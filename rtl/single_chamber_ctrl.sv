// single_chamber_ctrl: three-state Mealy controller of a single chamber
// demand pacemaker (ventricle sensed and paced).
//
// States: Reset Timer, Wait and Pace. After reset the machine is in Reset
// Timer and moves to Wait. In Wait it stays while there is neither a sensed
// contraction (s) nor an expired timer (z); a sensed contraction sends it
// back to Reset Timer, an expired timer without a sensed contraction sends
// it to Pace, and Pace always returns to Reset Timer. Sensing has priority
// over expiry, so the heart is paced only when no intrinsic beat came in
// time (demand pacing). States, transitions and the s/z/p/t signals follow
// the document.
//
// Outputs are Mealy: p (pace) is high in the cycle in which the machine
// decides to enter Pace, and t (reset the timer) in the cycle in which it
// decides to enter Reset Timer, so each is a one-cycle pulse and the timer
// is reloaded at the same clock edge at which the state becomes Reset
// Timer. Reading the outputs as a decode of the next state is this
// design's reading of the document's state table and waveforms.
//
// Interface: clk, synchronous active-high rst; s and z in; p and t out;
// `state` shows the present state.
module single_chamber_ctrl
  import pm_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      s,
  input  logic      z,
  output logic      p,
  output logic      t,
  output sc_state_e state
);

  sc_state_e next;

  always_comb begin
    next = state;
    unique case (state)
      SC_RESET: next = SC_WAIT;
      SC_WAIT: begin
        if (s)      next = SC_RESET;
        else if (z) next = SC_PACE;
      end
      SC_PACE:  next = SC_RESET;
      default:  next = SC_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= SC_RESET;
    else     state <= next;
  end

  assign p = (state == SC_WAIT) && (next == SC_PACE);
  assign t = (state != SC_RESET) && (next == SC_RESET) && !rst;

  // Pacing and a timer reset never coincide; every pace is followed by
  // a timer reset in the next cycle.
  a_p_not_t: assert property (@(posedge clk) disable iff (rst) !(p && t));
  a_p_then_t: assert property (@(posedge clk) disable iff (rst) p |=> t);

endmodule
