// tb_single_chamber_ctrl: self-checking test of the single chamber
// demand pacing controller.
//
// Directed part: reset enters Reset Timer, which moves to Wait; Wait holds
// while s and z are low; expiry without a sense gives one pace pulse and
// the next cycle asks for a timer reset; a sense (also together with z)
// asks for a timer reset without pacing. Random part: thousands of cycles
// of random s and z compared with a reference written from the transition
// list (Reset Timer -> Wait; Wait --s--> Reset Timer; Wait --!s.z--> Pace;
// Pace -> Reset Timer; p and t mark the decisions to enter Pace and Reset
// Timer).
module tb_single_chamber_ctrl;
  import pm_pkg::*;

  logic      clk = 1'b0;
  logic      rst, s, z, p, t;
  sc_state_e state;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  single_chamber_ctrl dut (
    .clk(clk), .rst(rst), .s(s), .z(z), .p(p), .t(t), .state(state)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // reference: 0 = reset timer, 1 = wait, 2 = pace
  int ref_st;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_p, exp_t;
    int nxt;
    rst = 1'b1; s = 1'b0; z = 1'b0;
    @(negedge clk); @(negedge clk);
    check(state == SC_RESET, "reset state is Reset Timer");
    rst = 1'b0;
    check(!p && !t, "no outputs in Reset Timer");
    @(negedge clk);
    check(state == SC_WAIT, "Reset Timer -> Wait");
    repeat (3) begin
      check(!p && !t, "Wait holds quietly with s=0 z=0");
      @(negedge clk);
      check(state == SC_WAIT, "still waiting");
    end
    z = 1'b1;
    #1 check(p && !t, "expiry without sense paces");
    @(negedge clk);
    check(state == SC_PACE, "Wait -> Pace");
    check(!p && t, "Pace asks for timer reset");
    z = 1'b0;
    @(negedge clk);
    check(state == SC_RESET, "Pace -> Reset Timer");
    @(negedge clk);
    s = 1'b1; z = 1'b1;
    #1 check(!p && t, "sense has priority over expiry");
    @(negedge clk);
    check(state == SC_RESET, "Wait -> Reset Timer on sense");
    s = 1'b0; z = 1'b0;
    @(negedge clk);

    // random comparison with the reference
    ref_st = 1;
    for (int i = 0; i < 4000; i++) begin
      s = ($urandom_range(0, 3) == 0);
      z = ($urandom_range(0, 2) == 0);
      #1;
      case (ref_st)
        0: nxt = 1;
        1: nxt = s ? 0 : (z ? 2 : 1);
        default: nxt = 0;
      endcase
      exp_p = (ref_st == 1 && nxt == 2);
      exp_t = (ref_st != 0 && nxt == 0);
      check(p == exp_p, "random: p");
      check(t == exp_t, "random: t");
      check(int'(state) == (ref_st == 0 ? int'(SC_RESET) : ref_st == 1 ? int'(SC_WAIT) : int'(SC_PACE)),
            "random: state");
      @(negedge clk);
      ref_st = nxt;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
