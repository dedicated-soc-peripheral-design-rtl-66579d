// epwm_soc_top: programmable-logic power-control peripheral for N_INV
// three-phase, three-level T-type inverters.
//
// The processor writes three 32-bit registers per inverter over AXI4-Lite:
// PWM configuration (dead band, channel actions, enable), carrier
// configuration (period, triangle/sawtooth mode, prescale, step) and sine
// configuration (prescale, step, modulation ratio). Each written word is
// carried by a request/acknowledge handshake into the clock domain that uses
// it: the carrier clock for the PWM and carrier words, the reference clock
// for the sine word. Every inverter then runs on its own: a sine reference
// generator with three 120-degree-spaced outputs, and three phase legs each
// holding a carrier generator and two ePWM blocks.
//
// With the default N_INV = 10 the peripheral drives 120 gate signals,
// ten inverters of twelve switches; the register map spans 30 words.
//
// From the published design: the split into register file, sine generators, carrier
// generators and PWM modulators, the 3-register-per-inverter memory map,
// ten inverters and 120 outputs, and separate carrier (300 MHz) and
// reference (150 MHz) clocks. Own choices: AXI4-Lite, the clock-domain
// handshake, reset synchronizers and field layout (see epwm_pkg).
//
// Interface: s_axi_* AXI4-Lite slave on s_axi_aclk, s_axi_aresetn also
// resets the whole peripheral; clk_carrier, clk_ref;
// pwm_out[12*i + k] = switch T(k+1) of inverter i (k = 0..11).
// Timing: a register write reaches the gates a few clocks of the
// destination domain after the AXI write response.
module epwm_soc_top
  import epwm_pkg::*;
#(
  parameter int unsigned N_INV      = 10,
  parameter int unsigned AXI_ADDR_W = 8
) (
  input  logic                  s_axi_aclk,
  input  logic                  s_axi_aresetn,
  input  logic [AXI_ADDR_W-1:0] s_axi_awaddr,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [31:0]           s_axi_wdata,
  input  logic [3:0]            s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [AXI_ADDR_W-1:0] s_axi_araddr,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [31:0]           s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  input  logic                  clk_carrier,
  input  logic                  clk_ref,
  output logic [12*N_INV-1:0]   pwm_out
);
  localparam int unsigned NREG = N_INV * REGS_PER_INV;

  logic [REG_W-1:0] regs [NREG];
  logic [NREG-1:0]  wr_strobe;
  logic             rst_n_car, rst_n_ref;

  rst_sync u_rst_car (.clk(clk_carrier), .rst_n_in(s_axi_aresetn), .rst_n_out(rst_n_car));
  rst_sync u_rst_ref (.clk(clk_ref),     .rst_n_in(s_axi_aresetn), .rst_n_out(rst_n_ref));

  axi_regs #(.N_INV(N_INV), .ADDR_W(AXI_ADDR_W)) u_regs (
    .aclk     (s_axi_aclk),
    .aresetn  (s_axi_aresetn),
    .awaddr   (s_axi_awaddr),
    .awvalid  (s_axi_awvalid),
    .awready  (s_axi_awready),
    .wdata    (s_axi_wdata),
    .wstrb    (s_axi_wstrb),
    .wvalid   (s_axi_wvalid),
    .wready   (s_axi_wready),
    .bresp    (s_axi_bresp),
    .bvalid   (s_axi_bvalid),
    .bready   (s_axi_bready),
    .araddr   (s_axi_araddr),
    .arvalid  (s_axi_arvalid),
    .arready  (s_axi_arready),
    .rdata    (s_axi_rdata),
    .rresp    (s_axi_rresp),
    .rvalid   (s_axi_rvalid),
    .rready   (s_axi_rready),
    .regs     (regs),
    .wr_strobe(wr_strobe)
  );

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    localparam int unsigned R_PWM  = REGS_PER_INV * i + int'(REG_PWM);
    localparam int unsigned R_CAR  = REGS_PER_INV * i + int'(REG_CARRIER);
    localparam int unsigned R_SINE = REGS_PER_INV * i + int'(REG_SINE);
    logic [REG_W-1:0] pwm_w, car_w, sine_w;

    cfg_sync #(.W(REG_W)) u_sync_pwm (
      .src_clk(s_axi_aclk), .src_rst_n(s_axi_aresetn),
      .src_data(regs[R_PWM]), .src_wr(wr_strobe[R_PWM]),
      .dst_clk(clk_carrier), .dst_rst_n(rst_n_car),
      .dst_data(pwm_w), .dst_load()
    );
    cfg_sync #(.W(REG_W)) u_sync_car (
      .src_clk(s_axi_aclk), .src_rst_n(s_axi_aresetn),
      .src_data(regs[R_CAR]), .src_wr(wr_strobe[R_CAR]),
      .dst_clk(clk_carrier), .dst_rst_n(rst_n_car),
      .dst_data(car_w), .dst_load()
    );
    cfg_sync #(.W(REG_W)) u_sync_sine (
      .src_clk(s_axi_aclk), .src_rst_n(s_axi_aresetn),
      .src_data(regs[R_SINE]), .src_wr(wr_strobe[R_SINE]),
      .dst_clk(clk_ref), .dst_rst_n(rst_n_ref),
      .dst_data(sine_w), .dst_load()
    );

    inverter_3l3p u_inv (
      .clk_car    (clk_carrier),
      .rst_n_car  (rst_n_car),
      .clk_ref    (clk_ref),
      .rst_n_ref  (rst_n_ref),
      .pwm_cfg    (pwm_cfg_t'(pwm_w)),
      .carrier_cfg(carrier_cfg_t'(car_w)),
      .sine_cfg   (sine_cfg_t'(sine_w)),
      .gates      (pwm_out[12*i +: 12])
    );
  end
endmodule
