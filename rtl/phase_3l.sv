// phase_3l: gate-signal unit for one leg of a three-level T-type inverter.
//
// One carrier generator feeds two ePWM blocks with the same duty value (the
// sine reference of this phase). The level-2 block compares against the
// upper carrier {1,cnt} and drives the outer switches of the upper half; the
// level-1 block compares against the lower carrier {0,cnt} and drives the
// switches of the lower half. With a reference above mid-scale, level 1 is
// saturated on and level 2 modulates; below mid-scale, level 2 is saturated
// off and level 1 modulates. The result is level-shifted (phase-disposition)
// PWM that gives +Vc, 0 and -Vc at the leg output.
//
// Switch mapping, with channels A = follow and B = inverted:
//   T1 = LV2 channel A (on for +Vc)   T3 = LV2 channel B (on for 0 and -Vc)
//   T2 = LV1 channel A (on for +Vc, 0) T4 = LV1 channel B (on for -Vc)
// T1/T3 and T2/T4 are complementary pairs separated by the dead band.
//
// From the published design: the carrier generator, the two ePWM blocks sharing one compare
// value and the MSB=0 / MSB=1 carrier split, and the T1..T4 level names.
// Own choice: both ePWM blocks use the one PWM configuration word the
// memory map provides for an inverter.
//
// Interface: clk, rst_n, carrier_cfg, pwm_cfg, duty (16-bit reference);
// gates = {T4, T3, T2, T1}; carrier_lo / carrier_hi for observation.
// Timing: gates are registered, one clock after the carrier or duty changes.
module phase_3l
  import epwm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  carrier_cfg_t carrier_cfg,
  input  pwm_cfg_t     pwm_cfg,
  input  logic [15:0]  duty,
  output phase_gates_t gates,
  output logic [15:0]  carrier_lo,
  output logic [15:0]  carrier_hi
);
  logic t1, t2, t3, t4;

  carrier_gen u_carrier (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (carrier_cfg),
    .cnt       (),
    .carrier_lo(carrier_lo),
    .carrier_hi(carrier_hi),
    .dir_down  (),
    .at_zero   (),
    .at_period ()
  );

  epwm u_lv2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .counter(carrier_hi),
    .duty   (duty),
    .cfg    (pwm_cfg),
    .pwm_a  (t1),
    .pwm_b  (t3)
  );

  epwm u_lv1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .counter(carrier_lo),
    .duty   (duty),
    .cfg    (pwm_cfg),
    .pwm_a  (t2),
    .pwm_b  (t4)
  );

  assign gates = {t4, t3, t2, t1};
endmodule
