// pm_pkg: types and constants shared by the pacemaker pulse generator.
//
// Holds the interval width (16 bits, the width of the timer load value
// seen on the rate-responsive pacemaker's timer port), the programmable
// pacing modes and the state encodings of the single and dual chamber
// controllers.
//
// The pacing modes follow the NBG letter code: VVI (ventricle paced,
// ventricle sensed, inhibited), DDI (both chambers, inhibited only),
// DDD (both chambers, inhibited and atrial-triggered) and DDT (both
// chambers, triggered). Rate modulation (the fourth letter, R) is a
// separate enable because it only changes the interval values, not the
// state machine. The two-bit mode encoding is this design's own choice.
package pm_pkg;

  localparam int unsigned INTERVAL_W = 16;

  typedef logic [INTERVAL_W-1:0] interval_t;

  typedef enum logic [1:0] {
    MODE_VVI = 2'd0,
    MODE_DDI = 2'd1,
    MODE_DDD = 2'd2,
    MODE_DDT = 2'd3
  } pace_mode_e;

  // Single chamber controller states (Reset Timer, Wait, Pace).
  typedef enum logic [1:0] {
    SC_WAIT  = 2'd0,
    SC_PACE  = 2'd1,
    SC_RESET = 2'd2
  } sc_state_e;

  // Dual chamber controller states, one triple per chamber.
  typedef enum logic [2:0] {
    DC_RESET_A = 3'd0,
    DC_WAIT_A  = 3'd1,
    DC_PACE_A  = 3'd2,
    DC_RESET_V = 3'd3,
    DC_WAIT_V  = 3'd4,
    DC_PACE_V  = 3'd5
  } dc_state_e;

endpackage
