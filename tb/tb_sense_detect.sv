// tb_sense_detect: self-checking test of the sense-event detector.
//
// Feeds a random stream of 14-bit two's complement samples with an
// irregular valid strobe, including negative values and values equal to
// the threshold, and checks every cycle that `sense` pulses exactly once
// per rising threshold crossing, one cycle after the crossing sample.
module tb_sense_detect;

  logic              clk = 1'b0;
  logic              rst, valid, sense;
  logic signed [13:0] sample, thr;

  int checks = 0;
  int failures = 0;
  int n_sense = 0;

  always #5 clk = ~clk;

  sense_detect dut (
    .clk(clk), .rst(rst), .sample_valid(valid), .sample(sample),
    .threshold(thr), .sense(sense)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_above, exp_sense, hi;
    int level;
    rst = 1'b1; valid = 1'b0; sample = '0; thr = -14'sd100;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    prev_above = 0; exp_sense = 0; hi = 0;
    for (int i = 0; i < 8000; i++) begin
      // the pulse alternates between a low and a high level
      if ($urandom_range(0, 15) == 0) hi = !hi;
      valid = ($urandom_range(0, 2) == 0);
      if ($urandom_range(0, 20) == 0) level = int'(thr);
      else if (hi) level = $urandom_range(0, 8191);
      else level = -int'($urandom_range(101, 8192));
      sample = 14'(level);
      #1;
      check(sense == exp_sense, $sformatf("sense %0b, expected %0b", sense, exp_sense));
      if (sense) n_sense++;
      exp_sense = valid && (sample > thr) && !prev_above;
      if (valid) prev_above = (sample > thr);
      @(negedge clk);
    end
    check(n_sense > 50, $sformatf("enough crossings seen (%0d)", n_sense));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
