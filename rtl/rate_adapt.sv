// rate_adapt: rate-responsive pacing rate and escape intervals.
//
// Implements the document's sensor-to-rate relation: below a threshold
// level of the activity sensor the pacemaker keeps its base rate; above
// it the rate rises linearly with the sensor signal, with a programmable
// slope dR/dS. The base rate is 72 pulses per minute (an interval of about
// 0.83 s) and the AV delay 200 ms, both from the document.
//
//   rate = BASE_RATE                                   if S <= threshold
//   rate = BASE_RATE + (slope * (S - threshold)) / 4   otherwise
//   rate is limited to MAX_RATE
//
// The rate is then turned into intervals in milliseconds:
//   lri_ms = 60000 / rate      (lower-rate interval, beat to beat)
//   av_ms  = AV_MS             (atrial to ventricular event)
//   va_ms  = lri_ms - AV_MS    (ventricular to next atrial event)
// With rate_mod_en low (modes without the R letter) the rate stays at
// BASE_RATE whatever the sensor says.
//
// The 8-bit sensor level, the 4-bit slope in quarter pulses per minute per
// sensor step, the MAX_RATE limit and the use of a serial divider are this
// design's choices. The divider is a restoring divider producing one
// quotient bit per cycle: the block samples the rate, divides for 16
// cycles and updates all outputs together in the 18th cycle, then starts
// again, so a sensor change reaches the outputs within 2 * 18 cycles.
// Until the first result after reset the outputs hold the base-rate
// values. `update` pulses for one cycle whenever the outputs are written.
module rate_adapt
  import pm_pkg::*;
#(
  parameter int unsigned BASE_RATE = 72,
  parameter int unsigned MAX_RATE  = 180,
  parameter int unsigned AV_MS     = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rate_mod_en,
  input  logic [7:0] sensor,
  input  logic [7:0] threshold,
  input  logic [3:0] slope,
  output logic [7:0] rate_ppm,
  output interval_t  lri_ms,
  output interval_t  va_ms,
  output interval_t  av_ms,
  output logic       update
);

  localparam int unsigned MS_PER_MIN = 60000;
  localparam interval_t BASE_LRI = interval_t'(MS_PER_MIN / BASE_RATE);
  localparam interval_t DIVIDEND = interval_t'(MS_PER_MIN);

  // Target rate from the sensor curve.
  logic [7:0]  excess;
  logic [11:0] boost;
  logic [12:0] raw_rate;
  logic [7:0]  target;

  always_comb begin
    excess   = (sensor > threshold) ? (sensor - threshold) : 8'd0;
    boost    = (12'(slope) * 12'(excess)) >> 2;
    raw_rate = 13'(BASE_RATE) + 13'(boost);
    if (!rate_mod_en)                  target = 8'(BASE_RATE);
    else if (raw_rate > 13'(MAX_RATE)) target = 8'(MAX_RATE);
    else                               target = raw_rate[7:0];
  end

  // Serial restoring divider: DIVIDEND / divisor.
  typedef enum logic [1:0] {RA_LOAD, RA_DIV, RA_WRITE} ra_state_e;

  ra_state_e  st;
  logic [7:0] divisor;
  logic [3:0] bitn;
  logic [7:0] rem;
  interval_t  dvd;
  interval_t  quo;
  logic [8:0] trial;
  logic       fits;

  always_comb begin
    trial = {rem, dvd[INTERVAL_W-1]};
    fits  = ({1'b0, trial} >= {2'b00, divisor});
  end

  always_ff @(posedge clk) begin
    update <= 1'b0;
    if (rst) begin
      st       <= RA_LOAD;
      divisor  <= 8'(BASE_RATE);
      bitn     <= 4'd15;
      rem      <= '0;
      quo      <= '0;
      dvd      <= '0;
      rate_ppm <= 8'(BASE_RATE);
      lri_ms   <= BASE_LRI;
      va_ms    <= BASE_LRI - interval_t'(AV_MS);
      av_ms    <= interval_t'(AV_MS);
    end else begin
      unique case (st)
        RA_LOAD: begin
          divisor <= target;
          bitn    <= 4'd15;
          rem     <= '0;
          quo     <= '0;
          dvd     <= DIVIDEND;
          st      <= RA_DIV;
        end
        RA_DIV: begin
          rem       <= fits ? 8'(trial - {1'b0, divisor}) : trial[7:0];
          quo       <= {quo[INTERVAL_W-2:0], fits};
          dvd       <= dvd << 1;
          bitn      <= bitn - 1'b1;
          if (bitn == 4'd0) st <= RA_WRITE;
        end
        RA_WRITE: begin
          rate_ppm <= divisor;
          lri_ms   <= quo;
          va_ms    <= quo - interval_t'(AV_MS);
          av_ms    <= interval_t'(AV_MS);
          update   <= 1'b1;
          st       <= RA_LOAD;
        end
        default: st <= RA_LOAD;
      endcase
    end
  end

endmodule
