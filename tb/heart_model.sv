// heart_model: behavioural heart for closed-loop tests of the pacemaker
// (simulation only, not synthesizable logic).
//
// A timed model of the two right-heart chambers, in the spirit of a
// virtual heart model: each chamber beats either intrinsically or when
// paced, and every beat of a chamber appears on that chamber's sensing
// channel as a pulse of PULSE_CYC samples at HIGH_LEVEL on a LOW_LEVEL
// baseline, the form the 555-based sensing circuit gives after digitising.
// Samples are valid every cycle. A paced beat is not echoed on the sensing
// channel.
//
// Intrinsic behaviour is programmed with three delays in clock cycles
// (0 switches a behaviour off):
//   sinus_delay  atrial beat this long after each ventricular event
//                (intrinsic sinus rhythm timed from the last ventricular beat)
//   av_conduct   ventricular beat this long after each atrial event
//                (0 models complete AV block)
//   v_escape     ventricular beat this long after each ventricular event
//                (a ventricular rhythm independent of the atrium)
// `beat_a` / `beat_v` mark the first cycle of each intrinsic beat.
module heart_model #(
  parameter int PULSE_CYC  = 6,
  parameter int HIGH_LEVEL = 4000,
  parameter int LOW_LEVEL  = -2000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              pa,
  input  logic              pv,
  input  int                sinus_delay,
  input  int                av_conduct,
  input  int                v_escape,
  output logic              adc_valid,
  output logic signed [13:0] adc_a,
  output logic signed [13:0] adc_v,
  output logic              beat_a,
  output logic              beat_v
);

  int a_cnt, v_cnt, ve_cnt, a_hi, v_hi;

  assign adc_valid = 1'b1;
  assign adc_a = (a_hi > 0) ? 14'(HIGH_LEVEL) : 14'(LOW_LEVEL);
  assign adc_v = (v_hi > 0) ? 14'(HIGH_LEVEL) : 14'(LOW_LEVEL);
  assign beat_a = (a_cnt == 1);
  assign beat_v = (v_cnt == 1) || (ve_cnt == 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      a_cnt <= 0; v_cnt <= 0; ve_cnt <= 0; a_hi <= 0; v_hi <= 0;
    end else begin
      if (a_hi > 0) a_hi <= a_hi - 1;
      if (v_hi > 0) v_hi <= v_hi - 1;
      if (a_cnt > 0)  a_cnt  <= a_cnt - 1;
      if (v_cnt > 0)  v_cnt  <= v_cnt - 1;
      if (ve_cnt > 0) ve_cnt <= ve_cnt - 1;
      // atrial event: intrinsic beat or pace
      if (beat_a) a_hi <= PULSE_CYC;
      if ((beat_a || pa) && av_conduct > 0) v_cnt <= av_conduct;
      // ventricular event: intrinsic beat or pace
      if (beat_v) begin
        v_hi  <= PULSE_CYC;
        v_cnt <= 0;
      end
      if (beat_v || pv) begin
        if (sinus_delay > 0) a_cnt  <= sinus_delay;
        if (v_escape > 0)    ve_cnt <= v_escape;
        if (pv)              v_cnt  <= 0;
      end
    end
  end

endmodule
