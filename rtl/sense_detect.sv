// sense_detect: turns the digitised sensing-circuit output of one chamber
// into single-cycle sense events for the pacing controller.
//
// The sensing circuit delivers a pulse for every detected R wave; on the
// FPGA board it arrives through the on-board ADC as 14-bit two's
// complement samples (-8192 to 8191), the two channels sampled together.
// This block compares each valid sample with a programmable threshold and
// raises `sense` for one clock cycle on the first sample above the
// threshold that follows a sample at or below it, i.e. once per rising
// crossing. A pulse that stays high therefore counts as one beat, and a
// new beat is only seen after the signal has fallen back.
//
// The threshold comparison and the edge detection are this design's own
// choices; the document gives the sample format only. The serial (SPI)
// protocol that delivers the samples is outside this block: it expects a
// parallel sample with a one-cycle `sample_valid` strobe.
//
// Timing: `sense` is registered and rises in the cycle after the strobe of
// the crossing sample.
module sense_detect #(
  parameter int unsigned SAMPLE_W = 14
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic signed [SAMPLE_W-1:0] threshold,
  output logic                       sense
);

  logic above;
  logic is_above;

  assign is_above = (sample > threshold);

  always_ff @(posedge clk) begin
    if (rst) begin
      above <= 1'b0;
      sense <= 1'b0;
    end else begin
      sense <= sample_valid && is_above && !above;
      if (sample_valid) above <= is_above;
    end
  end

endmodule
