// tb_rate_adapt: self-checking test of the rate-responsive interval
// computation.
//
// Checks the reset values (72 per minute: 833 ms beat to beat, 633 ms
// ventricular to atrial, 200 ms AV delay), that rate modulation off keeps
// the base rate whatever the sensor says, that the rate stays at base up
// to the threshold and rises with the programmed slope above it, that it
// is limited to MAX_RATE, that lri = 60000 / rate (truncated) and
// va = lri - 200, and that results are written every 18 cycles.
module tb_rate_adapt;
  import pm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, en;
  logic [7:0] sensor, thr;
  logic [3:0] slope;
  logic [7:0] rate;
  interval_t  lri, va, av;
  logic       update;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_base = 0, n_linear = 0, n_clamped = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  rate_adapt dut (
    .clk(clk), .rst(rst), .rate_mod_en(en), .sensor(sensor), .threshold(thr),
    .slope(slope), .rate_ppm(rate), .lri_ms(lri), .va_ms(va), .av_ms(av),
    .update(update)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wait_update(output int at);
    do @(negedge clk); while (!update);
    at = cycle;
  endtask

  // expected rate from the sensor curve
  function automatic int exp_rate(input bit e, input int s, input int t, input int k);
    int r;
    if (!e) return 72;
    r = (s > t) ? 72 + (k * (s - t)) / 4 : 72;
    return (r > 180) ? 180 : r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, r;
    rst = 1'b1; en = 1'b0; sensor = 8'd200; thr = 8'd40; slope = 4'd8;
    repeat (2) @(negedge clk);
    check(rate == 8'd72 && lri == 16'd833 && va == 16'd633 && av == 16'd200,
          "reset values give 72 per minute");
    rst = 1'b0;

    // update rate
    wait_update(a);
    wait_update(b);
    check(b - a == 18, $sformatf("update every %0d cycles, expected 18", b - a));
    check(rate == 8'd72 && lri == 16'd833, "modulation off keeps the base rate");

    en = 1'b1;
    for (int i = 0; i < 300; i++) begin
      if (i < 10) begin
        sensor = 8'($urandom_range(0, 40)); // at or below threshold
      end else begin
        sensor = 8'($urandom_range(0, 255));
        thr    = 8'($urandom_range(0, 128));
        slope  = 4'($urandom_range(0, 15));
      end
      wait_update(a);   // may have sampled the old inputs
      wait_update(a);
      r = exp_rate(1'b1, int'(sensor), int'(thr), int'(slope));
      if (r == 180 && 72 + (slope * (sensor - thr)) / 4 > 180) n_clamped++;
      else if (r == 72) n_base++;
      else n_linear++;
      check(int'(rate) == r, $sformatf("rate %0d, expected %0d (S=%0d thr=%0d k=%0d)",
                                       rate, r, sensor, thr, slope));
      check(int'(lri) == 60000 / r, $sformatf("lri %0d, expected %0d", lri, 60000 / r));
      check(int'(va) == 60000 / r - 200, "va = lri - av");
      check(av == 16'd200, "av delay");
    end
    check(n_base > 0 && n_linear > 0 && n_clamped > 0,
          $sformatf("curve regions covered: base %0d linear %0d clamped %0d", n_base, n_linear, n_clamped));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
