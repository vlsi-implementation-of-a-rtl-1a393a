// pm_timer: loadable down-counting escape timer of the pulse generator.
//
// This is the "Timer (counts down from 0.8 s)" of the single chamber
// pacemaker and the TimerA / TimerV pair of the dual chamber one. The
// controller's reset-timer output (t) loads the interval; the timer then
// counts down once per tick and raises its expiry output (z) while the
// count is zero. The count is visible on `count` (the tim_out port of the
// rate-responsive version) and the load value comes in on `load_value`
// (tim_in). The 16-bit width follows those ports.
//
// Ticks come from an internal prescaler of TICK_DIV clock cycles, which
// restarts on every load so that an interval of N is exactly
// N * TICK_DIV clock cycles long. With the default TICK_DIV of 50,000 and
// a 50 MHz clock one tick is one millisecond, so intervals are given in
// ms. The clock frequency, the prescaler and its restart are this design's
// choices; TICK_DIV = 1 makes the timer count clock cycles.
//
// Timing: a load (or reset, which also loads) takes effect at the clock
// edge; `zero` rises load_value * TICK_DIV cycles later and stays high
// until the next load. `en` low freezes the count and the prescaler.
module pm_timer
  import pm_pkg::*;
#(
  parameter int unsigned TICK_DIV = 50000
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      load,
  input  interval_t load_value,
  output interval_t count,
  output logic      zero
);

  localparam int unsigned PW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [PW-1:0] presc;
  logic          tick;

  assign tick = (presc == PW'(TICK_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst || load) begin
      count <= load_value;
      presc <= '0;
    end else if (en && count != '0) begin
      if (tick) begin
        presc <= '0;
        count <= count - 1'b1;
      end else begin
        presc <= presc + 1'b1;
      end
    end
  end

  assign zero = (count == '0);

endmodule
