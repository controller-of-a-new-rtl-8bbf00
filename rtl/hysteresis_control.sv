// Hysteresis current control with switching-frequency limitation.
//
// While `enable` is high the output state `up` (1: apply positive voltage,
// current rises) is flipped when the measured current leaves the band
// [ref + band_lo, ref + band_hi]: at or above the upper edge it goes to 0, at
// or below the lower edge to 1.  Each band edge has its own timer, loaded with
// MIN_PERIOD clocks (the minimum switching period) whenever that edge causes a
// commutation.  If the current reaches the same edge again while its timer is
// still running, the commutation is held back (`limited` is high) and takes
// place on the clock the timer expires.  Below the frequency limit the block
// is a plain hysteresis comparator.
//
// While `enable` is low both outputs are off, the timers are cleared and `up`
// follows the sign of the error, so that the first state after enabling
// drives the current toward the reference without any initial conditions.
// Outputs are registered: `pos` = enable & up, `neg` = enable & !up.  The I1
// generator uses `pos` as the S4 gate; the active filter bridge uses `pos`
// and `neg` for its two diagonals.
//
// The band rule and the per-edge timer follow the document; band edges as
// signed offsets from the reference, and the state on enabling, are this
// design's choices.
module hysteresis_control
  import megadiscap_pkg::*;
#(
  parameter int unsigned MIN_PERIOD = 400
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  sample_t ref_i,
  input  sample_t meas,
  input  sample_t band_hi,
  input  sample_t band_lo,
  output logic    pos,
  output logic    neg,
  output logic    limited,
  output logic    commutation
);

  localparam int TW = $clog2(MIN_PERIOD + 1);

  logic signed [16:0] upper, lower;
  logic           up, up_d;
  logic [TW-1:0]  t_hi, t_lo;
  logic           at_hi, at_lo;

  assign upper = 17'(ref_i) + 17'(band_hi);
  assign lower = 17'(ref_i) + 17'(band_lo);
  assign at_hi = up  && (17'(meas) >= upper);
  assign at_lo = !up && (17'(meas) <= lower);

  always_comb begin
    up_d = up;
    if (!enable)                     up_d = (meas < ref_i);
    else if (at_hi && t_hi == '0)    up_d = 1'b0;
    else if (at_lo && t_lo == '0)    up_d = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up          <= 1'b0;
      t_hi        <= '0;
      t_lo        <= '0;
      pos         <= 1'b0;
      neg         <= 1'b0;
      limited     <= 1'b0;
      commutation <= 1'b0;
    end else begin
      up          <= up_d;
      pos         <= enable && up_d;
      neg         <= enable && !up_d;
      limited     <= enable && ((at_hi && t_hi != '0) || (at_lo && t_lo != '0));
      commutation <= enable && (up_d != up);
      if (!enable) begin
        t_hi <= '0;
        t_lo <= '0;
      end else begin
        if (at_hi && t_hi == '0)  t_hi <= TW'(MIN_PERIOD - 1);
        else if (t_hi != '0)      t_hi <= t_hi - 1'b1;
        if (at_lo && t_lo == '0)  t_lo <= TW'(MIN_PERIOD - 1);
        else if (t_lo != '0)      t_lo <= t_lo - 1'b1;
      end
    end
  end

  // The two bridge diagonals are never driven together.
  always_ff @(posedge clk)
    if (rst_n) a_no_shoot_through: assert (!(pos && neg))
      else $error("both bridge diagonals driven");

endmodule
