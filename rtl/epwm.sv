// epwm: one ePWM block, two gate outputs from one carrier and one duty value.
//
// Channel A compares the duty value with the carrier: its raw output is high
// while duty > carrier. Channel B compares the duty value plus the dead band
// with the carrier: its raw output is high while duty + deadband > carrier
// (the sum is formed one bit wide so it cannot wrap). Each raw output then
// goes through a 2-bit action select (forced low, follow, inverted, forced
// high) and an enable gate. With A set to follow and B to inverted, the two
// outputs are complementary with a gap of `deadband` carrier counts between
// one switching off and the other switching on, on both carrier slopes.
//
// From the published design: the register fields and their widths (16-bit counter input,
// 16-bit duty, 8-bit dead band, 2+2-bit action, 1-bit enable), the adder,
// comparator, selector and enable switch on each channel, and the reset.
// Own choices: the dead band is added on channel B only, the meaning of the
// four action codes, and the output register.
//
// Interface: clk, rst_n (async, active low), counter, duty, cfg; pwm_a, pwm_b.
// Timing: outputs are registered, one clock after the inputs.
module epwm
  import epwm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] counter,
  input  logic [CNT_W-1:0] duty,
  input  pwm_cfg_t         cfg,
  output logic             pwm_a,
  output logic             pwm_b
);
  logic [CNT_W:0] thr_a, thr_b;
  logic           cmp_a, cmp_b;

  function automatic logic apply_action(pwm_action_e act, logic raw);
    unique case (act)
      ACT_LOW:      return 1'b0;
      ACT_ACTIVE_H: return raw;
      ACT_ACTIVE_L: return !raw;
      ACT_HIGH:     return 1'b1;
    endcase
  endfunction

  assign thr_a = {1'b0, duty};
  assign thr_b = {1'b0, duty} + {{(CNT_W+1-DB_W){1'b0}}, cfg.deadband};
  assign cmp_a = thr_a > {1'b0, counter};
  assign cmp_b = thr_b > {1'b0, counter};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_a <= 1'b0;
      pwm_b <= 1'b0;
    end else begin
      pwm_a <= cfg.enable && apply_action(cfg.act_a, cmp_a);
      pwm_b <= cfg.enable && apply_action(cfg.act_b, cmp_b);
    end
  end
endmodule
