// carrier_gen: carrier (time-base) counter for one three-level phase leg.
//
// A 15-bit counter moves by `step` on every prescaler tick. In triangle mode
// it counts up to `period`, then down to zero, then up again (a bidirectional
// counter); in sawtooth mode it counts up and wraps to zero once the next
// step would pass `period`. Both ends are clamped, so a period that is not a
// multiple of the step still gives a bounded ramp.
//
// The two carriers handed to the PWM stage are the same counter with a
// different most significant bit: carrier_lo = {0, cnt} spans the lower half
// of the 16-bit range and carrier_hi = {1, cnt} the upper half. One counter
// thus yields two level-shifted carriers with no adder. For the two carriers
// to tile the full reference range the period must be 0x7FFF; a smaller
// period lowers the carrier amplitude inside each half.
//
// From the published design: the bidirectional counter, the sawtooth option and the MSB split.
// Own choices: the step/prescale frequency control, clamping at the ends,
// the 15-bit counter and the field layout of the configuration word.
//
// Carrier frequency (triangle, step dividing period):
//   f = f_clk / (max(prescale,1) * 2 * period / step)
//
// Interface: clk, rst_n (async, active low), cfg; outputs cnt, carrier_lo,
// carrier_hi, dir_down (1 while counting down), at_zero / at_period (high for
// the clock in which cnt holds 0 / the period after a step).
// Timing: the counter moves one clock after each prescaler tick.
module carrier_gen
  import epwm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  carrier_cfg_t cfg,
  output logic [14:0]  cnt,
  output logic [15:0]  carrier_lo,
  output logic [15:0]  carrier_hi,
  output logic         dir_down,
  output logic         at_zero,
  output logic         at_period
);
  logic        tick;
  logic [15:0] up_sum;   // one bit wider than the counter: no wrap-around
  logic [14:0] nxt;
  logic        nxt_down;

  clk_prescaler #(.W(8)) u_pre (
    .clk     (clk),
    .rst_n   (rst_n),
    .prescale(cfg.prescale),
    .tick    (tick)
  );

  assign up_sum = {1'b0, cnt} + {8'd0, cfg.step};

  always_comb begin
    nxt      = cnt;
    nxt_down = dir_down;
    if (cfg.mode == MODE_SAWTOOTH) begin
      nxt_down = 1'b0;
      nxt      = (up_sum > {1'b0, cfg.period}) ? '0 : up_sum[14:0];
    end else if (!dir_down) begin
      if (up_sum >= {1'b0, cfg.period}) begin
        nxt      = cfg.period;
        nxt_down = 1'b1;
      end else begin
        nxt = up_sum[14:0];
      end
    end else begin
      if ({8'd0, cfg.step} >= {1'b0, cnt}) begin
        nxt      = '0;
        nxt_down = 1'b0;
      end else begin
        nxt = cnt - {7'd0, cfg.step};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      dir_down <= 1'b0;
    end else if (tick && cfg.step != '0) begin
      cnt      <= nxt;
      dir_down <= nxt_down;
    end
  end

  assign carrier_lo = {1'b0, cnt};
  assign carrier_hi = {1'b1, cnt};
  assign at_zero    = (cnt == '0);
  assign at_period  = (cnt == cfg.period);
endmodule
