// epwm_pkg: types and constants shared by the power-control peripheral.
//
// Each inverter is configured through three 32-bit registers placed at
// consecutive word addresses: PWM configuration, carrier ("sawtooth")
// configuration and sine reference configuration. The register order and
// the 32-bit size follow the published memory map; the placement of the
// fields inside each word is this design's own choice, listed below
// (bit 0 is the least significant bit).
//
//   PWM config      [7:0]   dead band, in carrier counts
//                   [9:8]   action select, channel A (see pwm_action_e)
//                   [11:10] action select, channel B
//                   [12]    output enable
//   Carrier config  [14:0]  period: top of the ramp, in counts
//                   [15]    mode: 0 = triangle (up/down), 1 = sawtooth (up)
//                   [23:16] prescale: one counter step every max(P,1) clocks
//                   [31:24] step: amount added/subtracted per step
//   Sine config     [7:0]   prescale
//                   [15:8]  phase step
//                   [31:16] modulation ratio, 0x0000 = 0 .. 0xFFFF = ~1
package epwm_pkg;

  localparam int unsigned REG_W   = 32;  // register width (memory map)
  localparam int unsigned CNT_W   = 16;  // carrier / duty width (Fig. 4)
  localparam int unsigned DB_W    = 8;   // dead band width (Fig. 4)
  localparam int unsigned REGS_PER_INV = 3;

  // Register index inside one inverter's group of three.
  typedef enum logic [1:0] {
    REG_PWM     = 2'd0,
    REG_CARRIER = 2'd1,
    REG_SINE    = 2'd2
  } reg_sel_e;

  // What an output does with its comparator result.
  typedef enum logic [1:0] {
    ACT_LOW      = 2'b00,  // forced low
    ACT_ACTIVE_H = 2'b01,  // follows the comparison
    ACT_ACTIVE_L = 2'b10,  // inverted comparison
    ACT_HIGH     = 2'b11   // forced high
  } pwm_action_e;

  typedef struct packed {
    logic [18:0]   rsvd;
    logic          enable;
    pwm_action_e   act_b;
    pwm_action_e   act_a;
    logic [DB_W-1:0] deadband;
  } pwm_cfg_t;

  typedef enum logic {
    MODE_TRIANGLE = 1'b0,
    MODE_SAWTOOTH = 1'b1
  } carrier_mode_e;

  typedef struct packed {
    logic [7:0]    step;
    logic [7:0]    prescale;
    carrier_mode_e mode;
    logic [14:0]   period;
  } carrier_cfg_t;

  typedef struct packed {
    logic [15:0] mod_ratio;
    logic [7:0]  step;
    logic [7:0]  prescale;
  } sine_cfg_t;

  // Three gate signals sets, one per phase, of four switches each.
  // Bit order inside a phase: {T4, T3, T2, T1} = {LV1-LO, LV2-LO, LV1-HI, LV2-HI}.
  typedef logic [3:0] phase_gates_t;

endpackage
