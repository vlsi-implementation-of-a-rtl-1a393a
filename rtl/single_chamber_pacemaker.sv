// single_chamber_pacemaker: single chamber demand pacemaker, the controller
// together with its escape timer.
//
// The controller's t output reloads the timer with `interval` (the timer
// load value, tim_in) and the timer's expiry flag is the controller's z
// input, as in the document's controller-plus-timer picture. Only the
// pacing pulse p leaves the block, plus the timer count (tim_out) and the
// controller state for observation. Feeding `interval` from a rate computation gives the single
// chamber rate-responsive pacemaker; a constant gives the fixed-rate one.
//
// Timing with no sensed beats and TICK_DIV = 1: pace pulses repeat every
// interval + 2 clock cycles (the interval, plus one cycle each in Pace and
// Reset Timer). In general the pace-to-pace time is
// interval * TICK_DIV + 2 cycles, and a sensed beat restarts the full
// interval from the cycle after the sense.
module single_chamber_pacemaker
  import pm_pkg::*;
#(
  parameter int unsigned TICK_DIV = 50000
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      s,
  input  interval_t interval,
  output logic      p,
  output interval_t tim_out,
  output sc_state_e state
);

  logic      t, z;

  single_chamber_ctrl u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .s    (s),
    .z    (z),
    .p    (p),
    .t    (t),
    .state(state)
  );

  pm_timer #(.TICK_DIV(TICK_DIV)) u_timer (
    .clk       (clk),
    .rst       (rst),
    .en        (1'b1),
    .load      (t),
    .load_value(interval),
    .count     (tim_out),
    .zero      (z)
  );

endmodule
