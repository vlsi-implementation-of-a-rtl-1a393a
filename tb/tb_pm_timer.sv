// tb_pm_timer: self-checking test of the escape timer.
//
// Two timers, one counting clock cycles (TICK_DIV = 1) and one with a
// prescaler of 3, are loaded with random intervals. The test checks that
// reset loads the interval, that `zero` rises exactly interval * TICK_DIV
// cycles after a load and stays high, that a reload in mid-count restarts
// the full interval, and that `en` low freezes the count.
module tb_pm_timer;
  import pm_pkg::*;

  logic      clk = 1'b0;
  logic      rst;
  logic      en;
  logic      load;
  interval_t load_value;
  interval_t count1, count3;
  logic      zero1, zero3;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  pm_timer #(.TICK_DIV(1)) dut1 (
    .clk(clk), .rst(rst), .en(en), .load(load), .load_value(load_value),
    .count(count1), .zero(zero1)
  );

  pm_timer #(.TICK_DIV(3)) dut3 (
    .clk(clk), .rst(rst), .en(en), .load(load), .load_value(load_value),
    .count(count3), .zero(zero3)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Load both timers, then count cycles until each reports zero.
  task automatic measure(input interval_t n);
    int c1, c3, cyc;
    @(negedge clk);
    load_value = n;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    c1 = -1; c3 = -1;
    // cycle 0 is the one right after the loading edge
    for (cyc = 0; cyc <= 3 * int'(n) + 2; cyc++) begin
      if (zero1 && c1 < 0) c1 = cyc;
      if (zero3 && c3 < 0) c3 = cyc;
      if (cyc == 0) begin
        check(count1 == n, "count equals load value after load (div 1)");
        check(count3 == n, "count equals load value after load (div 3)");
      end
      @(negedge clk);
    end
    check(c1 == int'(n), $sformatf("div 1 expiry after %0d cycles, got %0d", n, c1));
    check(c3 == 3 * int'(n), $sformatf("div 3 expiry after %0d cycles, got %0d", 3 * n, c3));
    check(zero1 && zero3, "zero stays high after expiry");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    interval_t n;
    rst = 1'b1; en = 1'b1; load = 1'b0; load_value = 16'd7;
    repeat (3) @(negedge clk);
    check(count1 == 16'd7 && count3 == 16'd7, "reset loads the interval");
    rst = 1'b0;

    measure(16'd1);
    measure(16'd2);
    for (int i = 0; i < 20; i++) begin
      n = interval_t'($urandom_range(1, 60));
      measure(n);
    end

    // reload in mid-count restarts the interval
    @(negedge clk);
    load_value = 16'd20; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    repeat (10) @(negedge clk);
    check(count1 == 16'd10, "div 1 count after 10 cycles");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(count1 == 16'd20 && count3 == 16'd20, "reload restores full interval");

    // enable low freezes the count
    repeat (4) @(negedge clk);
    check(count1 == 16'd16, "div 1 count before freeze");
    en = 1'b0;
    repeat (10) @(negedge clk);
    check(count1 == 16'd16, "count frozen while en is low");
    en = 1'b1;
    repeat (16) @(negedge clk);
    check(zero1 && count1 == 16'd0, "expiry after freeze");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
