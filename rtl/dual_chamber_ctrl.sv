// dual_chamber_ctrl: six-state Mealy controller of the dual chamber
// pacemaker, programmable to the VVI, DDI, DDD and DDT pacing modes.
//
// In DDD mode it is the document's dual chamber machine: one cycle runs
// Reset Timer A -> Wait A -> Pace A -> Reset Timer V -> Wait V -> Pace V
// and back to Reset Timer A. A sensed atrial beat (sa) in Wait A skips
// Pace A and goes straight to Reset Timer V, so the ventricular timer (the
// AV delay) starts from the intrinsic atrial beat; a sensed ventricular
// beat (sv) in Wait V skips Pace V and goes to Reset Timer A. Sensing has
// priority over timer expiry (za, zv). TimerA times the atrial escape
// interval, TimerV the AV delay.
//
// The other modes are this design's reading of the mode code (chambers
// paced / sensed / response):
//   DDT  a sensed beat triggers an immediate pace in the same chamber
//        (Wait A -> Pace A on sa, Wait V -> Pace V on sv);
//   DDI  an atrial sense only inhibits Pace A: the machine keeps waiting
//        for za and then enters Reset Timer V without pacing, so the AV
//        delay is not restarted by the atrial beat (no tracking);
//   VVI  the atrial states are left out: Reset Timer V -> Wait V ->
//        Pace V (or sv) -> Reset Timer V, with pa and ta never raised.
// Rate modulation (DDDR, DDTR) is outside this block: it only changes the
// interval values loaded into the timers.
//
// Outputs are Mealy, as in the single chamber controller: pa/pv are high
// in the cycle that decides to enter Pace A / Pace V, ta/tv in the cycle
// that decides to enter Reset Timer A / V, one cycle each. The mode may be
// changed at any time; the machine follows the new mode from its next
// decision. `sa_inhibited` shows a DDI atrial sense held until za.
module dual_chamber_ctrl
  import pm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  pace_mode_e mode,
  input  logic       sa,
  input  logic       za,
  input  logic       sv,
  input  logic       zv,
  output logic       pa,
  output logic       pv,
  output logic       ta,
  output logic       tv,
  output dc_state_e  state,
  output logic       sa_inhibited
);

  dc_state_e next;
  logic      inh_next;
  logic      vvi;

  assign vvi = (mode == MODE_VVI);

  always_comb begin
    next     = state;
    inh_next = sa_inhibited;
    unique case (state)
      DC_RESET_A: begin
        inh_next = 1'b0;
        next     = vvi ? DC_RESET_V : DC_WAIT_A;
      end
      DC_WAIT_A: begin
        if (vvi) begin
          next = DC_RESET_V;
        end else begin
          unique case (mode)
            MODE_DDT: begin
              if (sa || za) next = DC_PACE_A;
            end
            MODE_DDI: begin
              if (za) begin
                next     = (sa || sa_inhibited) ? DC_RESET_V : DC_PACE_A;
                inh_next = 1'b0;
              end else if (sa) begin
                inh_next = 1'b1;
              end
            end
            default: begin  // MODE_DDD
              if (sa)      next = DC_RESET_V;
              else if (za) next = DC_PACE_A;
            end
          endcase
        end
      end
      DC_PACE_A:  next = DC_RESET_V;
      DC_RESET_V: begin
        inh_next = 1'b0;
        next     = DC_WAIT_V;
      end
      DC_WAIT_V: begin
        if (mode == MODE_DDT) begin
          if (sv || zv) next = DC_PACE_V;
        end else begin
          if (sv)      next = vvi ? DC_RESET_V : DC_RESET_A;
          else if (zv) next = DC_PACE_V;
        end
      end
      DC_PACE_V:  next = vvi ? DC_RESET_V : DC_RESET_A;
      default:    next = DC_RESET_A;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= DC_RESET_A;
      sa_inhibited <= 1'b0;
    end else begin
      state        <= next;
      sa_inhibited <= inh_next;
    end
  end

  assign pa = !rst && (state == DC_WAIT_A) && (next == DC_PACE_A);
  assign pv = !rst && (state == DC_WAIT_V) && (next == DC_PACE_V);
  assign ta = !rst && (state != DC_RESET_A) && (next == DC_RESET_A);
  assign tv = !rst && (state != DC_RESET_V) && (next == DC_RESET_V);

  // At most one decision per cycle: a pace and a timer reset never coincide.
  a_one_decision: assert property (@(posedge clk) disable iff (rst)
    $onehot0({pa, pv, ta, tv}));
  // A pace is always followed by a reset of the other chamber's timer
  // (VVI: of the same timer).
  a_pace_then_reset: assert property (@(posedge clk) disable iff (rst)
    (pa || pv) |=> (ta || tv));

endmodule
