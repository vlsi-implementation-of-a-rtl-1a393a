// tb_workload_timer_load: the short pacing simulations in which the timers
// count clock cycles instead of milliseconds (TICK_DIV = 1) and are loaded
// with a small fixed value:
//  - the single chamber pacemaker with a load value of 8;
//  - the dual chamber controller with both escape timers loaded with 10.
// No rate adaptation is involved: the load value is the interval itself.
//
// With TICK_DIV = 1 a load value of N gives these spacings (the Pace and
// Reset Timer states take one cycle each):
//   single chamber p -> p, no beats          N + 2 = 10 cycles
//   single chamber sensed beat -> p          N + 1 =  9 cycles
//   dual pa -> pv and pv -> pa, no beats     N + 2 = 12 cycles
//   dual sa -> pv (tracking, DDD)            N + 1 = 11 cycles
//   dual sv -> pa (ventricular beat)         N + 1 = 11 cycles
// Three phases run one after another: free pacing, then a sensed beat a
// few cycles into every escape interval of the atrium (dual) and of the
// single chamber, then a sensed ventricular beat a few cycles into every
// AV interval. Every spacing is checked, and every sensed beat must
// cancel the pace it precedes. Every pace must leave from a Wait state, and
// no timer may hold more than its load value.
module tb_workload_timer_load;
  import pm_pkg::*;

  localparam int SC_LOAD = 8;
  localparam int DC_LOAD = 10;
  localparam int BEATS   = 8;

  logic       clk = 1'b0;
  logic       rst;
  logic       sc_s, sc_p;
  interval_t  sc_tim;
  sc_state_e  sc_state;
  logic       sa, sv, pa, pv, ta, tv, za, zv, sa_inh;
  interval_t  cnt_a, cnt_v;
  dc_state_e  dc_state;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int phase = 0;
  int last_pa = -1, last_pv = -1, last_sa = -1, last_sv = -1;
  int last_p = -1, last_s = -1;
  int n_free_dc = 0, n_free_sc = 0, n_track = 0, n_vinh = 0, n_sc_inh = 0;

  always #5 clk = ~clk;

  single_chamber_pacemaker #(.TICK_DIV(1)) u_sc (
    .clk(clk), .rst(rst), .s(sc_s), .interval(interval_t'(SC_LOAD)),
    .p(sc_p), .tim_out(sc_tim), .state(sc_state)
  );

  dual_chamber_ctrl u_dc (
    .clk(clk), .rst(rst), .mode(MODE_DDD),
    .sa(sa), .za(za), .sv(sv), .zv(zv),
    .pa(pa), .pv(pv), .ta(ta), .tv(tv),
    .state(dc_state), .sa_inhibited(sa_inh)
  );

  pm_timer #(.TICK_DIV(1)) u_tim_a (
    .clk(clk), .rst(rst), .en(1'b1), .load(ta),
    .load_value(interval_t'(DC_LOAD)), .count(cnt_a), .zero(za)
  );

  pm_timer #(.TICK_DIV(1)) u_tim_v (
    .clk(clk), .rst(rst), .en(1'b1), .load(tv),
    .load_value(interval_t'(DC_LOAD)), .count(cnt_v), .zero(zv)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d phase %0d: %s", cycle, phase, what);
    end
  endtask

  // Event monitor. Inputs change just after a falling edge; outputs are
  // sampled just before the next rising edge, where they are settled.
  always @(posedge clk) cycle <= cycle + 1;

  initial forever begin
    @(negedge clk);
    #2;
    if (!rst) begin
      // The timers never hold more than their load value, and DDD never
      // uses the DDI atrial-inhibit register.
      if (int'(cnt_a) > DC_LOAD || int'(cnt_v) > DC_LOAD || int'(sc_tim) > SC_LOAD || sa_inh)
        check(1'b0, "timer count above its load value, or DDI flag set");
      if (sa) last_sa = cycle;
      if (sv) last_sv = cycle;
      if (sc_s) last_s = cycle;
      if (pa) begin
        if (phase == 2 && last_sa >= 0) check(1'b0, "pa although the atrium was sensed");
        if (phase == 1 && last_pv >= 0) begin
          check(cycle - last_pv == DC_LOAD + 2, $sformatf("pv->pa %0d", cycle - last_pv));
          n_free_dc++;
        end
        if (phase == 3 && last_sv >= 0) begin
          check(cycle - last_sv == DC_LOAD + 1, $sformatf("sv->pa %0d", cycle - last_sv));
          n_vinh++;
        end
        check(dc_state == DC_WAIT_A, "pa outside Wait A");
        last_pa = cycle;
        last_sv = -1;
      end
      if (pv) begin
        if (phase == 3 && last_sv >= 0) check(1'b0, "pv although the ventricle was sensed");
        if (phase == 1 && last_pa >= 0)
          check(cycle - last_pa == DC_LOAD + 2, $sformatf("pa->pv %0d", cycle - last_pa));
        if (phase == 2 && last_sa >= 0) begin
          check(cycle - last_sa == DC_LOAD + 1, $sformatf("sa->pv %0d", cycle - last_sa));
          n_track++;
        end
        check(dc_state == DC_WAIT_V, "pv outside Wait V");
        last_pv = cycle;
        last_sa = -1;
      end
      if (sc_p) begin
        if (phase == 1 && last_p >= 0) begin
          check(cycle - last_p == SC_LOAD + 2, $sformatf("p->p %0d", cycle - last_p));
          n_free_sc++;
        end
        if (phase == 2 && last_s >= 0) begin
          check(cycle - last_s == SC_LOAD + 1, $sformatf("s->p %0d", cycle - last_s));
          n_sc_inh++;
        end
        check(sc_state == SC_WAIT, "p outside Wait");
        last_p = cycle;
        last_s = -1;
      end
    end
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  // One-cycle sense pulse, driven on the falling edge.
  task automatic pulse_sa();  @(negedge clk); sa = 1'b1;   @(negedge clk); sa = 1'b0;   endtask
  task automatic pulse_sv();  @(negedge clk); sv = 1'b1;   @(negedge clk); sv = 1'b0;   endtask
  task automatic pulse_s();   @(negedge clk); sc_s = 1'b1; @(negedge clk); sc_s = 1'b0; endtask

  task automatic wait_for_pa(); do @(negedge clk); while (!pa); endtask
  task automatic wait_for_pv(); do @(negedge clk); while (!pv); endtask
  task automatic wait_for_p();  do @(negedge clk); while (!sc_p); endtask

  task automatic clear_marks();
    last_pa = -1; last_pv = -1; last_sa = -1; last_sv = -1;
    last_p = -1; last_s = -1;
  endtask

  initial begin
    rst = 1'b1; sa = 1'b0; sv = 1'b0; sc_s = 1'b0;
    wait_cycles(3);
    rst = 1'b0;

    // Phase 1: nothing sensed, both pacemakers pace at their escape rate.
    phase = 1;
    fork
      repeat (BEATS) wait_for_pv();
      repeat (BEATS) wait_for_p();
    join
    wait_cycles(1);

    // Phase 2: an atrial beat 4 cycles after each pv (the controller is then
    // in Wait A) and a single chamber beat 3 cycles after each p.
    clear_marks();
    phase = 2;
    fork
      repeat (BEATS) begin
        wait_for_pv();
        wait_cycles(3);
        pulse_sa();
      end
      repeat (BEATS) begin
        wait_for_p();
        wait_cycles(2);
        pulse_s();
      end
    join
    wait_for_pv();
    wait_cycles(1);

    // Phase 3: a ventricular beat 4 cycles after each pa (Wait V).
    clear_marks();
    phase = 3;
    repeat (BEATS) begin
      wait_for_pa();
      wait_cycles(3);
      pulse_sv();
    end
    wait_for_pa();
    wait_cycles(1);
    phase = 4;

    check(n_free_dc >= BEATS - 1, $sformatf("free dual beats %0d", n_free_dc));
    check(n_free_sc >= BEATS - 1, $sformatf("free single beats %0d", n_free_sc));
    check(n_track == BEATS, $sformatf("tracked atrial beats %0d", n_track));
    check(n_sc_inh == BEATS, $sformatf("inhibited single paces %0d", n_sc_inh));
    check(n_vinh == BEATS, $sformatf("inhibited ventricular paces %0d", n_vinh));
    $display("free dual %0d, free single %0d, tracked %0d, single inhibited %0d, ventricle inhibited %0d",
             n_free_dc, n_free_sc, n_track, n_sc_inh, n_vinh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
