// inverter_3l3p: controller for one three-phase, three-level T-type inverter.
//
// A sine reference generator, clocked by the reference clock, produces three
// references 120 degrees apart. Each reference is registered into the
// carrier clock domain and drives one phase_3l unit, which holds its own
// carrier generator, so the inverter has six carriers (two per phase) and
// six ePWM blocks giving twelve gate signals T1..T12.
//
// The two clocks are assumed to come from one PLL and to be related (the
// reference clock at half the carrier clock), so the reference crosses with
// a single register stage; it is a slowly moving value sampled every carrier
// clock. All three phases share the inverter's carrier and PWM configuration.
//
// From the published design: one sine generator with three phase outputs feeding three
// single-phase PWM units, four gate signals per phase, one register group
// per inverter. Own choices: the crossing register and the clock relation.
//
// Interface: clk_car / rst_n_car (carrier domain), clk_ref / rst_n_ref
// (reference domain), the three configuration words already in their
// domains; gates[12] = T1..T12 (bit i = T(i+1)).
// Timing: a new reference reaches the gates one crossing register plus one
// ePWM register after it leaves the generator.
module inverter_3l3p
  import epwm_pkg::*;
(
  input  logic         clk_car,
  input  logic         rst_n_car,
  input  logic         clk_ref,
  input  logic         rst_n_ref,
  input  pwm_cfg_t     pwm_cfg,
  input  carrier_cfg_t carrier_cfg,
  input  sine_cfg_t    sine_cfg,
  output logic [11:0]  gates
);
  logic [15:0] ref_r [3];   // reference domain
  logic [15:0] ref_c [3];   // carrier domain copy

  sine_ref_gen u_sine (
    .clk  (clk_ref),
    .rst_n(rst_n_ref),
    .cfg  (sine_cfg),
    .ref_o(ref_r),
    .phase()
  );

  for (genvar p = 0; p < 3; p++) begin : g_leg
    always_ff @(posedge clk_car or negedge rst_n_car) begin
      if (!rst_n_car) ref_c[p] <= 16'h8000;
      else            ref_c[p] <= ref_r[p];
    end

    phase_3l u_leg (
      .clk        (clk_car),
      .rst_n      (rst_n_car),
      .carrier_cfg(carrier_cfg),
      .pwm_cfg    (pwm_cfg),
      .duty       (ref_c[p]),
      .gates      (gates[4*p +: 4]),
      .carrier_lo (),
      .carrier_hi ()
    );
  end
endmodule
