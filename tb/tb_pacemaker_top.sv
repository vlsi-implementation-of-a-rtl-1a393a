// tb_pacemaker_top: end-to-end closed-loop test of the pulse generator.
//
// The pacemaker runs against heart_model with a prescaler of 2 clock
// cycles per millisecond and otherwise default parameters (72 per minute,
// 200 ms AV delay, 180 per minute limit). Phases:
//   1 DDD, silent heart: pa->pv = 200 ms, pv->pa = 633 ms (plus 2 cycles)
//   2 DDD, sinus rhythm, AV block: atrial beats sensed, pa inhibited,
//     pv exactly one AV delay after each atrial sense (tracking)
//   3 DDD, sinus rhythm with conduction: no pacing at all
//   4 DDDR, silent heart, high activity: rate limited to 180 per minute;
//     moderate activity: 112 per minute; intervals checked in cycles
//   5 DDT, sinus rhythm: every sensed beat triggers a pace in its chamber
//   6 DDI, sinus rhythm, AV block: pa inhibited, ventricle paced at the
//     base rate, not tracking the atrium
//   7 VVI: pacing at 833 ms with no atrial activity; a faster ventricular
//     rhythm inhibits it
// The single chamber pacemaker beside it is checked for its pace period
// and for inhibition by sensed beats. Each mechanism is counted and one
// that never happened counts as a failure.
module tb_pacemaker_top;
  import pm_pkg::*;

  localparam int DIV = 2;
  localparam int AV  = 200 * DIV;
  localparam int VA  = 633 * DIV;

  logic       clk = 1'b0;
  logic       rst;
  pace_mode_e mode;
  logic       rate_mod_en;
  logic [7:0] rr_threshold, activity;
  logic [3:0] rr_slope;
  logic       adc_valid;
  logic signed [13:0] adc_a, adc_v;
  logic       pa, pv, sa, sv, ddi_inh, rate_update;
  dc_state_e  state;
  logic [7:0] rate_ppm;
  interval_t  lri_ms, tim_a, tim_v, sc_interval, sc_tim;
  logic       sc_s, sc_p;
  sc_state_e  sc_state;
  logic       beat_a, beat_v;
  int         sinus_delay, av_conduct, v_escape;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_pa, n_pv, n_sa, n_sv, n_track, n_vinh, n_rate_clamp, n_rate_linear;
  int n_trig_a, n_trig_v, n_ddi, n_vvi_pace, n_vvi_inh, n_sc_pace, n_sc_inh;
  int last_pa, last_pv, last_sa, last_sv, last_sc_p;

  always #5 clk = ~clk;

  pacemaker_top #(.TICK_DIV(DIV)) dut (
    .clk(clk), .rst(rst), .mode(mode), .rate_mod_en(rate_mod_en),
    .rr_threshold(rr_threshold), .rr_slope(rr_slope), .sense_threshold(14'sd0),
    .activity(activity), .adc_valid(adc_valid), .adc_atrium(adc_a),
    .adc_ventricle(adc_v), .pa(pa), .pv(pv), .sa(sa), .sv(sv), .state(state),
    .ddi_a_inhibit(ddi_inh), .rate_update(rate_update), .rate_ppm(rate_ppm),
    .lri_ms(lri_ms), .tim_out_a(tim_a), .tim_out_v(tim_v),
    .sc_s(sc_s), .sc_interval(sc_interval), .sc_p(sc_p), .sc_tim_out(sc_tim),
    .sc_state(sc_state)
  );

  heart_model heart (
    .clk(clk), .rst(rst), .pa(pa), .pv(pv), .sinus_delay(sinus_delay),
    .av_conduct(av_conduct), .v_escape(v_escape), .adc_valid(adc_valid),
    .adc_a(adc_a), .adc_v(adc_v), .beat_a(beat_a), .beat_v(beat_v)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // event log, sampled at the negative edge
  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      if (pa)   begin n_pa++; last_pa = cycle; end
      if (pv)   begin n_pv++; last_pv = cycle; end
      if (sa)   begin n_sa++; last_sa = cycle; end
      if (sv)   begin n_sv++; last_sv = cycle; end
      if (sc_p) begin n_sc_pace++; last_sc_p = cycle; end
    end
  end

  task automatic wait_pa(output int at);
    do begin @(negedge clk); #1; end while (!pa);
    at = cycle;
  endtask
  task automatic wait_pv(output int at);
    do begin @(negedge clk); #1; end while (!pv);
    at = cycle;
  endtask
  task automatic wait_sa(output int at);
    do begin @(negedge clk); #1; end while (!sa);
    at = cycle;
  endtask
  task automatic run(input int n);
    repeat (n) @(negedge clk);
    #1;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single chamber pacemaker, run in parallel
  initial begin
    int a, b, n0;
    sc_s = 1'b0; sc_interval = 16'd50;
    @(negedge clk);
    while (rst) @(negedge clk);
    do begin @(negedge clk); #1; end while (!sc_p);
    a = cycle;
    do begin @(negedge clk); #1; end while (!sc_p);
    b = cycle;
    check(b - a == 50 * DIV + 2, $sformatf("single chamber period %0d", b - a));
    n0 = n_sc_pace;
    for (int i = 0; i < 30; i++) begin
      run(60);
      sc_s = 1'b1; run(1); sc_s = 1'b0;
    end
    check(n_sc_pace == n0, "single chamber inhibited by faster sensed beats");
    if (n_sc_pace == n0) n_sc_inh++;
  end

  initial begin
    int a, b, c, d, n0, m0;
    rst = 1'b1; mode = MODE_DDD; rate_mod_en = 1'b0;
    rr_threshold = 8'd40; rr_slope = 4'd8; activity = 8'd0;
    sinus_delay = 0; av_conduct = 0; v_escape = 0;
    n_pa = 0; n_pv = 0; n_sa = 0; n_sv = 0; n_track = 0; n_vinh = 0;
    n_rate_clamp = 0; n_rate_linear = 0; n_trig_a = 0; n_trig_v = 0; n_ddi = 0;
    n_vvi_pace = 0; n_vvi_inh = 0; n_sc_pace = 0; n_sc_inh = 0;
    run(4);
    rst = 1'b0;

    // ---- 1: DDD, silent heart
    $display("phase 1 at cycle %0d", cycle);
    wait_pa(a);
    for (int i = 0; i < 3; i++) begin
      wait_pv(b);
      check(b - a == AV + 2, $sformatf("DDD pa->pv %0d, expected %0d", b - a, AV + 2));
      wait_pa(a);
      check(a - b == VA + 2, $sformatf("DDD pv->pa %0d, expected %0d", a - b, VA + 2));
    end

    // ---- 2: DDD, sinus 300 ms after each ventricular event, AV block
    $display("phase 2 at cycle %0d", cycle);
    sinus_delay = 300 * DIV;
    wait_pv(b);
    n0 = n_pa;
    for (int i = 0; i < 4; i++) begin
      wait_sa(a);
      wait_pv(b);
      check(b - a == AV + 1, $sformatf("tracking: sa->pv %0d, expected %0d", b - a, AV + 1));
      if (b - a == AV + 1) n_track++;
    end
    check(n_pa == n0, "atrial pacing inhibited by sinus rhythm");

    // ---- 3: DDD, sinus rhythm with 120 ms conduction: no pacing
    $display("phase 3 at cycle %0d", cycle);
    av_conduct = 120 * DIV;
    run(4 * (300 + 200) * DIV);
    n0 = n_pa; m0 = n_pv;
    c = n_sv;
    run(6 * (300 + 120) * DIV);
    check(n_pa == n0 && n_pv == m0, "no pacing with intact intrinsic rhythm");
    check(n_sv - c >= 5, $sformatf("ventricular beats sensed (%0d)", n_sv - c));
    if (n_pv == m0 && n_sv > c) n_vinh++;

    // ---- 4: DDDR, silent heart
    $display("phase 4 at cycle %0d", cycle);
    sinus_delay = 0; av_conduct = 0;
    rate_mod_en = 1'b1; activity = 8'd200;
    run(100);
    check(rate_ppm == 8'd180 && lri_ms == 16'd333, $sformatf("rate limited: %0d ppm, %0d ms", rate_ppm, lri_ms));
    wait_pv(b);
    wait_pa(a);
    check(a - b == (333 - 200) * DIV + 2, $sformatf("DDDR 180 ppm pv->pa %0d", a - b));
    if (a - b == (333 - 200) * DIV + 2 && rate_ppm == 8'd180) n_rate_clamp++;
    wait_pv(b);
    check(b - a == AV + 2, "DDDR pa->pv");
    activity = 8'd60;  // 72 + 8 * 20 / 4 = 112 per minute, 535 ms
    run(100);
    check(rate_ppm == 8'd112 && lri_ms == 16'd535, $sformatf("rate 112: %0d ppm, %0d ms", rate_ppm, lri_ms));
    wait_pv(b);
    wait_pa(a);
    check(a - b == (535 - 200) * DIV + 2, $sformatf("DDDR 112 ppm pv->pa %0d", a - b));
    if (a - b == (535 - 200) * DIV + 2) n_rate_linear++;
    rate_mod_en = 1'b0;
    run(100);
    check(lri_ms == 16'd833, "modulation off returns to 833 ms");

    // ---- 5: DDT, sinus rhythm with conduction: sensed beats trigger paces
    $display("phase 5 at cycle %0d", cycle);
    mode = MODE_DDT;
    sinus_delay = 300 * DIV; av_conduct = 120 * DIV;
    run(3 * 1000 * DIV);
    for (int i = 0; i < 3; i++) begin
      wait_sa(a);
      check(last_pa == a, "DDT: atrial sense triggers pa in the same cycle");
      if (last_pa == a) n_trig_a++;
      do begin @(negedge clk); #1; end while (!sv);
      check(last_pv == cycle, "DDT: ventricular sense triggers pv in the same cycle");
      if (last_pv == cycle) n_trig_v++;
    end

    // ---- 6: DDI, sinus rhythm, AV block
    $display("phase 6 at cycle %0d", cycle);
    mode = MODE_DDI;
    av_conduct = 0;
    wait_pv(b);
    wait_pv(b);
    n0 = n_pa;
    for (int i = 0; i < 3; i++) begin
      wait_pv(d);
      check(d - b == VA + AV + 3, $sformatf("DDI pv->pv %0d, expected %0d", d - b, VA + AV + 3));
      check(last_sa > b, "DDI: atrial beat sensed in the cycle");
      if (d - b == VA + AV + 3 && last_sa > b) n_ddi++;
      b = d;
    end
    check(n_pa == n0, "DDI: atrial pacing inhibited");

    // ---- 7: VVI
    $display("phase 7 at cycle %0d", cycle);
    mode = MODE_VVI;
    sinus_delay = 0;
    wait_pv(b);
    n0 = n_pa;
    for (int i = 0; i < 3; i++) begin
      wait_pv(d);
      check(d - b == 833 * DIV + 2, $sformatf("VVI pv->pv %0d", d - b));
      if (d - b == 833 * DIV + 2) n_vvi_pace++;
      b = d;
    end
    v_escape = 700 * DIV;
    run(900 * DIV);
    m0 = n_pv; c = n_sv;
    run(5 * 833 * DIV);
    check(n_pv == m0 && n_sv - c >= 5, "VVI inhibited by faster ventricular rhythm");
    if (n_pv == m0 && n_sv > c) n_vvi_inh++;
    check(n_pa == n0, "VVI never paces the atrium");

    // ---- mechanisms
    $display("mechanisms: pa=%0d pv=%0d sa=%0d sv=%0d track=%0d vinh=%0d clamp=%0d linear=%0d trigA=%0d trigV=%0d ddi=%0d vvi=%0d vvi_inh=%0d sc_pace=%0d sc_inh=%0d",
             n_pa, n_pv, n_sa, n_sv, n_track, n_vinh, n_rate_clamp, n_rate_linear,
             n_trig_a, n_trig_v, n_ddi, n_vvi_pace, n_vvi_inh, n_sc_pace, n_sc_inh);
    check(n_pa > 0, "atrial pacing happened");
    check(n_pv > 0, "ventricular pacing happened");
    check(n_track > 0, "AV tracking happened");
    check(n_vinh > 0, "ventricular inhibition happened");
    check(n_rate_clamp > 0, "rate limit happened");
    check(n_rate_linear > 0, "linear rate response happened");
    check(n_trig_a > 0 && n_trig_v > 0, "triggered pacing happened");
    check(n_ddi > 0, "DDI inhibition happened");
    check(n_vvi_pace > 0 && n_vvi_inh > 0, "VVI pacing and inhibition happened");
    check(n_sc_pace > 0 && n_sc_inh > 0, "single chamber pacing and inhibition happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
