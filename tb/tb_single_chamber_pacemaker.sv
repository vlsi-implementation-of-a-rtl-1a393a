// tb_single_chamber_pacemaker: self-checking test of the single chamber
// demand pacemaker (controller plus timer).
//
// Checks the pacing rate and the demand behaviour with a prescaler of 4:
//  - with no sensed beats the pace-to-pace time is interval * 4 + 2 cycles;
//  - sensed beats arriving faster than the interval suppress all pacing;
//  - after the last sensed beat the next pace comes exactly
//    interval * 4 + 1 cycles later (the escape interval);
//  - a new interval value is used from the next timer reset on.
module tb_single_chamber_pacemaker;
  import pm_pkg::*;

  localparam int DIV = 4;

  logic      clk = 1'b0;
  logic      rst, s, p;
  interval_t interval, tim_out;
  sc_state_e state;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int last_pace = -1;
  int paces = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  single_chamber_pacemaker #(.TICK_DIV(DIV)) dut (
    .clk(clk), .rst(rst), .s(s), .interval(interval), .p(p),
    .tim_out(tim_out), .state(state)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // wait for the next pace pulse, sampled at the negative edge
  task automatic wait_pace(output int at);
    do @(negedge clk); while (!p);
    at = cycle;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, n, sense_at;
    rst = 1'b1; s = 1'b0; interval = 16'd25;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // free-running pacing rate
    wait_pace(a);
    for (int i = 0; i < 5; i++) begin
      wait_pace(b);
      check(b - a == 25 * DIV + 2, $sformatf("pace period %0d, expected %0d", b - a, 25 * DIV + 2));
      a = b;
    end

    // intrinsic beats faster than the escape interval inhibit pacing
    n = 0;
    for (int i = 0; i < 20; i++) begin
      repeat ($urandom_range(20, 25 * DIV - 10)) begin
        @(negedge clk);
        if (p) n++;
      end
      s = 1'b1;
      @(negedge clk);
      if (p) n++;
      s = 1'b0;
    end
    sense_at = cycle - 1;
    check(n == 0, $sformatf("no pacing while intrinsic rate is faster (%0d paces)", n));

    // escape interval after the last sensed beat
    wait_pace(a);
    check(a - sense_at == 25 * DIV + 1, $sformatf("escape after sense %0d, expected %0d", a - sense_at, 25 * DIV + 1));

    // rate change through the interval input
    interval = 16'd10;
    wait_pace(a);
    wait_pace(b);
    check(b - a == 10 * DIV + 2, $sformatf("new pace period %0d, expected %0d", b - a, 10 * DIV + 2));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
