// pacemaker_top: demand-mode, dual chamber, rate-responsive pacemaker pulse
// generator, with the single chamber demand pacemaker beside it.
//
// Dual chamber path. Each chamber's digitised sensing signal goes through
// a sense_detect, which gives one sense event per detected beat (sa for the
// atrium, sv for the ventricle). rate_adapt turns the activity-sensor level
// into a pacing rate and escape intervals: the ventricular-to-atrial
// interval va_ms for TimerA and the 200 ms AV delay for TimerV (in VVI mode
// TimerV gets the whole beat-to-beat interval instead). dual_chamber_ctrl
// reloads the timers (ta, tv), watches their expiry (za, zv) and the sense
// events, and paces the atrium (pa) and ventricle (pv) only where no
// intrinsic beat came in time. With no intrinsic activity in DDD mode,
// pacing repeats every 60000 / rate ms, pa to pv taking the AV delay.
// `mode` with `rate_mod_en` selects VVI, DDI, DDD(R) or DDT(R); the
// document's main configuration is DDDR.
//
// Single chamber path. An independent single_chamber_pacemaker (sense
// input sc_s, interval sc_interval, pace output sc_p) is brought out on
// its own ports; it is the document's first, single chamber design.
//
// Timing: every interval is N * TICK_DIV clock cycles for an interval of N
// ms, plus two cycles per chamber for the Pace and Reset Timer states, so
// one unsensed DDD beat takes (va_ms + av_ms) * TICK_DIV + 4 cycles. The
// 50 MHz clock behind TICK_DIV = 50000 is an assumption (a typical FPGA
// board clock). The ADC and DAC serial interfaces, the analog sensing
// circuit and the output driver are outside: samples enter as parallel
// words with a strobe and the pace pulses leave as one-cycle logic pulses.
module pacemaker_top
  import pm_pkg::*;
#(
  parameter int unsigned TICK_DIV  = 50000,
  parameter int unsigned BASE_RATE = 72,
  parameter int unsigned MAX_RATE  = 180,
  parameter int unsigned AV_MS     = 200,
  parameter int unsigned SAMPLE_W  = 14
) (
  input  logic                       clk,
  input  logic                       rst,
  // programming
  input  pace_mode_e                 mode,
  input  logic                       rate_mod_en,
  input  logic [7:0]                 rr_threshold,
  input  logic [3:0]                 rr_slope,
  input  logic signed [SAMPLE_W-1:0] sense_threshold,
  // activity sensor level
  input  logic [7:0]                 activity,
  // digitised sensing channels, sampled together
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_atrium,
  input  logic signed [SAMPLE_W-1:0] adc_ventricle,
  // pacing outputs
  output logic                       pa,
  output logic                       pv,
  // observation
  output logic                       sa,
  output logic                       sv,
  output dc_state_e                  state,
  output logic                       ddi_a_inhibit,
  output logic                       rate_update,
  output logic [7:0]                 rate_ppm,
  output interval_t                  lri_ms,
  output interval_t                  tim_out_a,
  output interval_t                  tim_out_v,
  // single chamber pacemaker
  input  logic                       sc_s,
  input  interval_t                  sc_interval,
  output logic                       sc_p,
  output interval_t                  sc_tim_out,
  output sc_state_e                  sc_state
);

  logic      ta, tv, za, zv;
  interval_t va_ms, av_ms, load_v;

  sense_detect #(.SAMPLE_W(SAMPLE_W)) u_sense_a (
    .clk         (clk),
    .rst         (rst),
    .sample_valid(adc_valid),
    .sample      (adc_atrium),
    .threshold   (sense_threshold),
    .sense       (sa)
  );

  sense_detect #(.SAMPLE_W(SAMPLE_W)) u_sense_v (
    .clk         (clk),
    .rst         (rst),
    .sample_valid(adc_valid),
    .sample      (adc_ventricle),
    .threshold   (sense_threshold),
    .sense       (sv)
  );

  rate_adapt #(
    .BASE_RATE(BASE_RATE),
    .MAX_RATE (MAX_RATE),
    .AV_MS    (AV_MS)
  ) u_rate (
    .clk        (clk),
    .rst        (rst),
    .rate_mod_en(rate_mod_en),
    .sensor     (activity),
    .threshold  (rr_threshold),
    .slope      (rr_slope),
    .rate_ppm   (rate_ppm),
    .lri_ms     (lri_ms),
    .va_ms      (va_ms),
    .av_ms      (av_ms),
    .update     (rate_update)
  );

  dual_chamber_ctrl u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .mode        (mode),
    .sa          (sa),
    .za          (za),
    .sv          (sv),
    .zv          (zv),
    .pa          (pa),
    .pv          (pv),
    .ta          (ta),
    .tv          (tv),
    .state       (state),
    .sa_inhibited(ddi_a_inhibit)
  );

  assign load_v = (mode == MODE_VVI) ? lri_ms : av_ms;

  pm_timer #(.TICK_DIV(TICK_DIV)) u_timer_a (
    .clk       (clk),
    .rst       (rst),
    .en        (1'b1),
    .load      (ta),
    .load_value(va_ms),
    .count     (tim_out_a),
    .zero      (za)
  );

  pm_timer #(.TICK_DIV(TICK_DIV)) u_timer_v (
    .clk       (clk),
    .rst       (rst),
    .en        (1'b1),
    .load      (tv),
    .load_value(load_v),
    .count     (tim_out_v),
    .zero      (zv)
  );

  single_chamber_pacemaker #(.TICK_DIV(TICK_DIV)) u_single (
    .clk     (clk),
    .rst     (rst),
    .s       (sc_s),
    .interval(sc_interval),
    .p       (sc_p),
    .tim_out (sc_tim_out),
    .state   (sc_state)
  );

endmodule
