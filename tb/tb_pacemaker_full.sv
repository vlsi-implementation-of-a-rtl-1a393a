// tb_pacemaker_full: the pulse generator at its default parameters
// (50,000 clock cycles per millisecond, i.e. a 50 MHz clock; 72 per
// minute; 200 ms AV delay) taken through complete DDDR pacing cycles.
//
//  1 silent heart, rate modulation on but activity below threshold:
//    pa->pv = 200 ms and pv->pa = 633 ms, exact to the clock cycle;
//  2 high activity: the rate climbs to the 180 per minute limit and the
//    ventricular-to-atrial interval shrinks to 133 ms;
//  3 activity removed, sinus rhythm with AV block: the atrial beat is
//    sensed, atrial pacing is inhibited and the ventricle is paced one AV
//    delay after the sensed atrial beat.
module tb_pacemaker_full;
  import pm_pkg::*;

  localparam int CPM = 50000;  // clock cycles per millisecond

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] activity;
  logic       adc_valid;
  logic signed [13:0] adc_a, adc_v;
  logic       pa, pv, sa, sv, ddi_inh, rate_update;
  dc_state_e  state;
  logic [7:0] rate_ppm;
  interval_t  lri_ms, tim_a, tim_v, sc_tim;
  logic       sc_p;
  sc_state_e  sc_state;
  logic       beat_a, beat_v;
  int         sinus_delay;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  pacemaker_top dut (
    .clk(clk), .rst(rst), .mode(MODE_DDD), .rate_mod_en(1'b1),
    .rr_threshold(8'd40), .rr_slope(4'd8), .sense_threshold(14'sd0),
    .activity(activity), .adc_valid(adc_valid), .adc_atrium(adc_a),
    .adc_ventricle(adc_v), .pa(pa), .pv(pv), .sa(sa), .sv(sv), .state(state),
    .ddi_a_inhibit(ddi_inh), .rate_update(rate_update), .rate_ppm(rate_ppm),
    .lri_ms(lri_ms), .tim_out_a(tim_a), .tim_out_v(tim_v),
    .sc_s(1'b0), .sc_interval(16'd833), .sc_p(sc_p), .sc_tim_out(sc_tim),
    .sc_state(sc_state)
  );

  heart_model heart (
    .clk(clk), .rst(rst), .pa(pa), .pv(pv), .sinus_delay(sinus_delay),
    .av_conduct(0), .v_escape(0), .adc_valid(adc_valid),
    .adc_a(adc_a), .adc_v(adc_v), .beat_a(beat_a), .beat_v(beat_v)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wait_for(input int which, output longint at);
    // which: 0 = pa, 1 = pv, 2 = sa
    do @(negedge clk);
    while (!((which == 0 && pa) || (which == 1 && pv) || (which == 2 && sa)));
    at = cycle;
  endtask

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b, c;
    rst = 1'b1; activity = 8'd10; sinus_delay = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // 1: base rate
    wait_for(0, a);
    wait_for(1, b);
    check(b - a == 200 * CPM + 2, $sformatf("pa->pv %0d cycles", b - a));
    wait_for(0, c);
    check(c - b == 633 * CPM + 2, $sformatf("pv->pa %0d cycles", c - b));
    check(rate_ppm == 8'd72 && lri_ms == 16'd833, "72 per minute below threshold");
    $display("beat at 72 per minute: %0d cycles", (c - b) + (b - a));

    // 2: high activity
    activity = 8'd220;
    wait_for(1, b);
    check(rate_ppm == 8'd180 && lri_ms == 16'd333, $sformatf("rate %0d ppm, %0d ms", rate_ppm, lri_ms));
    wait_for(0, a);
    check(a - b == 133 * CPM + 2, $sformatf("pv->pa at 180 per minute %0d cycles", a - b));
    wait_for(1, b);
    check(b - a == 200 * CPM + 2, "pa->pv at 180 per minute");

    // 3: sinus rhythm at 400 ms after each ventricular event, AV block
    activity = 8'd0;
    sinus_delay = 400 * CPM;
    wait_for(1, b);
    wait_for(2, a);
    wait_for(1, b);
    check(b - a == 200 * CPM + 1, $sformatf("sa->pv %0d cycles", b - a));
    check(rate_ppm == 8'd72, "rate back to base");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
