// tb_workload_555: the bench test of the pulse generator, in which a 555
// astable circuit stands in for the heart's R wave: 1 s high, 10 s low,
// repeated. The time base is scaled to 50 clock cycles per millisecond so
// that three 11 s periods fit in a short simulation; all intervals are
// otherwise the defaults (833 ms escape interval).
//
// The astable output drives two inputs at once:
//  - the ventricular ADC channel of the dual chamber path in VVI mode
//    (high level 4000, low level -2000): each rising edge is one sensed
//    beat, the pace after it comes one escape interval later and pacing
//    continues every 833 ms until the next rising edge;
//  - the level-sensitive sense input of the single chamber pacemaker: it
//    never paces while the input is high and paces every 833 ms while it
//    is low.
module tb_workload_555;
  import pm_pkg::*;

  localparam int DIV     = 50;
  localparam int LRI     = 833 * DIV;
  localparam int T_HIGH  = 1000 * DIV;
  localparam int T_LOW   = 10000 * DIV;
  localparam int PERIODS = 3;

  logic       clk = 1'b0;
  logic       rst;
  logic       src;                    // 555 output
  logic signed [13:0] adc_v;
  logic       pa, pv, sa, sv, ddi_inh, rate_update, sc_p;
  dc_state_e  state;
  sc_state_e  sc_state;
  logic [7:0] rate_ppm;
  interval_t  lri_ms, tim_a, tim_v, sc_tim;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_pv = 0, n_sv = 0, n_sc = 0, n_sc_high = 0, n_bad_pv = 0, n_bad_sc = 0;
  int last_v = -1, last_sc = -1, last_src_fall = -1;
  bit src_d;

  always #5 clk = ~clk;

  assign adc_v = src ? 14'sd4000 : -14'sd2000;

  pacemaker_top #(.TICK_DIV(DIV)) dut (
    .clk(clk), .rst(rst), .mode(MODE_VVI), .rate_mod_en(1'b0),
    .rr_threshold(8'd40), .rr_slope(4'd8), .sense_threshold(14'sd0),
    .activity(8'd0), .adc_valid(1'b1), .adc_atrium(-14'sd2000),
    .adc_ventricle(adc_v), .pa(pa), .pv(pv), .sa(sa), .sv(sv), .state(state),
    .ddi_a_inhibit(ddi_inh), .rate_update(rate_update), .rate_ppm(rate_ppm),
    .lri_ms(lri_ms), .tim_out_a(tim_a), .tim_out_v(tim_v),
    .sc_s(src), .sc_interval(16'd833), .sc_p(sc_p), .sc_tim_out(sc_tim),
    .sc_state(sc_state)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // event checks, sampled at the negative edge
  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      if (sv) begin
        n_sv++;
        last_v = cycle;
      end
      if (pv) begin
        n_pv++;
        // either one escape interval after a sensed beat or one pacing
        // period after the previous pace
        if (!(last_v >= 0 && (cycle - last_v == LRI + 1 || cycle - last_v == LRI + 2)))
          n_bad_pv++;
        last_v = cycle;
      end
      if (pa) n_bad_pv++;
      if (sc_p) begin
        n_sc++;
        if (src) n_sc_high++;
        // first pace one interval after the input fell, within a few cycles:
        // the last timer reset lands in one of the last two cycles of the
        // high phase, and this monitor samples the input at the same edge
        // at which the stimulus changes it. Later paces are one period apart.
        if (!((last_src_fall >= 0 && cycle - last_src_fall >= LRI - 2 &&
               cycle - last_src_fall <= LRI + 3) ||
              (last_sc >= 0 && cycle - last_sc == LRI + 2)))
          n_bad_sc++;
        last_sc = cycle;
      end
      if (src_d && !src) begin
        last_src_fall = cycle;
        last_sc = -1;
      end
      src_d = src;
    end
  end

  initial begin
    repeat (PERIODS * (T_HIGH + T_LOW) + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; src = 1'b0; src_d = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (LRI / 2) @(negedge clk);
    for (int i = 0; i < PERIODS; i++) begin
      src = 1'b1;
      repeat (T_HIGH) @(negedge clk);
      src = 1'b0;
      repeat (T_LOW) @(negedge clk);
    end
    #1;
    $display("555 workload: %0d sensed pulses, %0d ventricular paces, %0d single chamber paces",
             n_sv, n_pv, n_sc);
    check(n_sv == PERIODS, $sformatf("one sense per input pulse (%0d)", n_sv));
    check(n_bad_pv == 0, $sformatf("VVI paces at the escape interval only (%0d off)", n_bad_pv));
    // per 11 s period: 10000/833 -> 12 paces in the low phase, 1 in the high phase
    check(n_pv >= PERIODS * 12, $sformatf("VVI pacing between input pulses (%0d)", n_pv));
    check(n_sc_high == 0, "single chamber never paces while its input is high");
    check(n_bad_sc == 0, $sformatf("single chamber paces at the escape interval only (%0d off)", n_bad_sc));
    check(n_sc >= PERIODS * 11, $sformatf("single chamber pacing in the low phases (%0d)", n_sc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
