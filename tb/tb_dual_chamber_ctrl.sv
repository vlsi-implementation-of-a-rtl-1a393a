// tb_dual_chamber_ctrl: self-checking test of the dual chamber controller
// in its four pacing modes.
//
// Directed part, DDD: the unsensed cycle Reset Timer A -> Wait A -> Pace A
// -> Reset Timer V -> Wait V -> Pace V -> Reset Timer A with the matching
// pa/ta/pv/tv pulses; an atrial sense skipping Pace A and starting the AV
// delay; a ventricular sense skipping Pace V. Then DDT (sense triggers a
// pace), DDI (atrial sense inhibits pa but waits for za) and VVI (atrial
// states left out). Random part: random mode changes and random sa/za/sv/zv
// compared cycle by cycle with a reference model of the mode rules.
module tb_dual_chamber_ctrl;
  import pm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, sa, za, sv, zv;
  logic       pa, pv, ta, tv, inh;
  pace_mode_e mode;
  dc_state_e  state;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  dual_chamber_ctrl dut (
    .clk(clk), .rst(rst), .mode(mode), .sa(sa), .za(za), .sv(sv), .zv(zv),
    .pa(pa), .pv(pv), .ta(ta), .tv(tv), .state(state), .sa_inhibited(inh)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic expect_out(input bit epa, etab, epv, etv, input string what);
    #1;
    check(pa == epa && ta == etab && pv == epv && tv == etv,
          $sformatf("%s: pa=%0b ta=%0b pv=%0b tv=%0b", what, pa, ta, pv, tv));
  endtask

  task automatic step(input bit a_s, a_z, v_s, v_z);
    @(negedge clk);
    sa = a_s; za = a_z; sv = v_s; zv = v_z;
  endtask

  // Reference model. States numbered as in the package.
  int r_st;
  bit r_inh;

  function automatic void ref_next(input pace_mode_e m, input bit a_s, a_z, v_s, v_z,
                                   output int n, output bit ninh);
    bit vvi;
    vvi  = (m == MODE_VVI);
    n    = r_st;
    ninh = r_inh;
    case (r_st)
      0: begin ninh = 0; n = vvi ? 3 : 1; end
      1: begin
        if (vvi) n = 3;
        else if (m == MODE_DDT) begin if (a_s || a_z) n = 2; end
        else if (m == MODE_DDI) begin
          if (a_z) begin n = (a_s || r_inh) ? 3 : 2; ninh = 0; end
          else if (a_s) ninh = 1;
        end else begin
          if (a_s) n = 3; else if (a_z) n = 2;
        end
      end
      2: n = 3;
      3: begin ninh = 0; n = 4; end
      4: begin
        if (m == MODE_DDT) begin if (v_s || v_z) n = 5; end
        else if (v_s) n = vvi ? 3 : 0;
        else if (v_z) n = 5;
      end
      default: n = vvi ? 3 : 0;
    endcase
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n; bit ninh; bit epa, epv, eta, etv;
    rst = 1'b1; mode = MODE_DDD; sa = 0; za = 0; sv = 0; zv = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(state == DC_RESET_A, "reset state is Reset Timer A");

    // DDD, no intrinsic activity
    expect_out(0, 0, 0, 0, "Reset Timer A");
    step(0, 0, 0, 0); check(state == DC_WAIT_A, "-> Wait A"); expect_out(0, 0, 0, 0, "Wait A idle");
    step(0, 1, 0, 0); expect_out(1, 0, 0, 0, "za paces atrium");
    step(0, 0, 0, 0); check(state == DC_PACE_A, "-> Pace A"); expect_out(0, 0, 0, 1, "Pace A resets TimerV");
    step(0, 0, 0, 0); check(state == DC_RESET_V, "-> Reset Timer V");
    step(0, 0, 0, 0); check(state == DC_WAIT_V, "-> Wait V");
    step(1, 1, 0, 0); expect_out(0, 0, 0, 0, "atrial inputs ignored in Wait V");
    step(0, 0, 0, 1); expect_out(0, 0, 1, 0, "zv paces ventricle");
    step(0, 0, 0, 0); check(state == DC_PACE_V, "-> Pace V"); expect_out(0, 1, 0, 0, "Pace V resets TimerA");
    step(0, 0, 0, 0); check(state == DC_RESET_A, "-> Reset Timer A");
    step(0, 0, 0, 0);
    // DDD, atrial sense tracked, ventricular sense inhibits
    step(1, 1, 0, 0); expect_out(0, 0, 0, 1, "sa skips Pace A and starts AV delay");
    step(0, 0, 0, 0); check(state == DC_RESET_V, "sa -> Reset Timer V");
    step(0, 0, 0, 0);
    step(0, 0, 1, 1); expect_out(0, 1, 0, 0, "sv skips Pace V");
    step(0, 0, 0, 0); check(state == DC_RESET_A, "sv -> Reset Timer A");

    // DDT: sense triggers a pace
    mode = MODE_DDT;
    step(0, 0, 0, 0); check(state == DC_WAIT_A, "DDT Wait A");
    step(1, 0, 0, 0); expect_out(1, 0, 0, 0, "DDT sa triggers pa");
    step(0, 0, 0, 0); step(0, 0, 0, 0); step(0, 0, 0, 0);
    check(state == DC_WAIT_V, "DDT Wait V");
    step(0, 0, 1, 0); expect_out(0, 0, 1, 0, "DDT sv triggers pv");
    step(0, 0, 0, 0); step(0, 0, 0, 0);
    check(state == DC_RESET_A, "DDT back to Reset Timer A");

    // DDI: atrial sense inhibits pa, V timing waits for za
    mode = MODE_DDI;
    step(0, 0, 0, 0);
    step(1, 0, 0, 0); expect_out(0, 0, 0, 0, "DDI sa does not reset TimerV");
    step(0, 0, 0, 0); check(state == DC_WAIT_A && inh, "DDI holds the inhibit");
    step(0, 1, 0, 0); expect_out(0, 0, 0, 1, "DDI za after sense: no pa, start AV");
    step(0, 0, 0, 0); check(state == DC_RESET_V && !inh, "DDI -> Reset Timer V, inhibit cleared");
    step(0, 0, 0, 0); step(0, 0, 0, 1); expect_out(0, 0, 1, 0, "DDI paces ventricle");
    step(0, 0, 0, 0); step(0, 0, 0, 0);
    step(0, 1, 0, 0); expect_out(1, 0, 0, 0, "DDI paces atrium without sense");

    // VVI: atrial states left out
    step(0, 0, 0, 0); check(state == DC_PACE_A, "in Pace A when switching");
    mode = MODE_VVI;
    step(0, 0, 0, 0); check(state == DC_RESET_V, "VVI -> Reset Timer V");
    step(0, 0, 0, 0); check(state == DC_WAIT_V, "VVI Wait V");
    step(0, 0, 0, 1); expect_out(0, 0, 1, 0, "VVI pace");
    step(0, 0, 0, 0); expect_out(0, 0, 0, 1, "VVI Pace V resets TimerV");
    step(0, 0, 0, 0); check(state == DC_RESET_V, "VVI Pace V -> Reset Timer V");
    step(0, 0, 0, 0);
    step(1, 1, 1, 0); expect_out(0, 0, 0, 1, "VVI sv restarts TimerV, no pa/ta");

    // random comparison with the reference model
    step(0, 0, 0, 0);
    r_st  = int'(state);
    r_inh = inh;
    for (int i = 0; i < 6000; i++) begin
      if ($urandom_range(0, 99) == 0) mode = pace_mode_e'($urandom_range(0, 3));
      sa = ($urandom_range(0, 3) == 0);
      za = ($urandom_range(0, 2) == 0);
      sv = ($urandom_range(0, 3) == 0);
      zv = ($urandom_range(0, 2) == 0);
      #1;
      ref_next(mode, sa, za, sv, zv, n, ninh);
      epa = (r_st == 1 && n == 2);
      epv = (r_st == 4 && n == 5);
      eta = (r_st != 0 && n == 0);
      etv = (r_st != 3 && n == 3);
      check(int'(state) == r_st, $sformatf("random: state %0d vs %0d", state, r_st));
      check(pa == epa && pv == epv && ta == eta && tv == etv, "random: outputs");
      check(inh == r_inh, "random: DDI inhibit flag");
      @(negedge clk);
      r_st  = n;
      r_inh = ninh;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
