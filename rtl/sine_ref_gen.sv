// sine_ref_gen: three-phase sine reference generator (numerically controlled
// oscillator).
//
// A prescaler divides the reference clock; on each of its ticks a 16-bit
// phase accumulator adds `step`. The phase is offset by 0, 1/3 and 2/3 of a
// turn (0, 120 and 240 degrees) and the top ADDR_W bits of each address one
// of three sine tables. Each table value, stored in offset binary around
// 2^15, is scaled about that midpoint by the 16-bit modulation ratio:
//   ref = 2^15 + floor((lut - 2^15) * mod_ratio / 2^16)
// so the output stays unsigned and centred whatever the ratio.
// Output frequency: f = f_clk * step / (max(prescale,1) * 2^16).
//
// From the published design: prescale, step and modulation ratio fields (8, 8, 16 bits), the
// accumulator, the 0/120/240 phase shift, the sine tables and the frequency
// equation. Own choices: the 16-bit accumulator, the 10-bit table address,
// and the midpoint-centred scaling by the modulation ratio.
//
// Interface: clk, rst_n (async, active low), cfg; ref_o[3] (phase A, B, C),
// phase (the accumulator, for observation).
// Timing: three clocks from an accumulator update to the new reference
// (accumulator register, table register, scaling register).
module sine_ref_gen
  import epwm_pkg::*;
#(
  parameter int unsigned ACC_W  = 16,
  parameter int unsigned ADDR_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sine_cfg_t        cfg,
  output logic [15:0]      ref_o [3],
  output logic [ACC_W-1:0] phase
);
  localparam logic [ACC_W-1:0] OFS120 = ACC_W'(((1 << ACC_W) + 1) / 3);
  localparam logic [ACC_W-1:0] OFS240 = ACC_W'((2 * (1 << ACC_W) + 1) / 3);
  localparam logic [ACC_W-1:0] PH_OFS [3] = '{'0, OFS120, OFS240};

  logic tick;

  clk_prescaler #(.W(8)) u_pre (
    .clk     (clk),
    .rst_n   (rst_n),
    .prescale(cfg.prescale),
    .tick    (tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (tick) phase <= phase + ACC_W'(cfg.step);
  end

  for (genvar p = 0; p < 3; p++) begin : g_phase
    logic [ACC_W-1:0]  ph;
    logic [15:0]       lut;
    logic signed [16:0] centred;
    logic signed [33:0] scaled;

    assign ph = phase + PH_OFS[p];

    sine_lut #(.ADDR_W(ADDR_W), .DATA_W(16)) u_lut (
      .clk (clk),
      .addr(ph[ACC_W-1 -: ADDR_W]),
      .data(lut)
    );

    assign centred = signed'({1'b0, lut}) - 17'sd32768;
    assign scaled  = centred * signed'({1'b0, cfg.mod_ratio});

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ref_o[p] <= 16'h8000;
      else        ref_o[p] <= 16'(scaled[33:16] + 18'sd32768);
    end
  end
endmodule
