// tb_inverter_3l3p: one three-phase three-level inverter, carrier clock at
// twice the reference clock. Over whole reference turns it checks, per phase:
// the share of time at +Vc and at -Vc against m/pi (m = modulation ratio),
// and the angle at which each phase's +Vc interval is centred: phase B must
// sit 120 degrees before phase A and phase C 120 degrees after it. Every
// clock it checks that no complementary pair (T1/T3, T2/T4 of each phase)
// conducts at once, and that the reference reaching each leg is one carrier
// clock behind the generator output.
module tb_inverter_3l3p;
  import epwm_pkg::*;
  logic         clk_car = 0, clk_ref = 0, rst_n = 0;
  pwm_cfg_t     pwm_cfg;
  carrier_cfg_t carrier_cfg;
  sine_cfg_t    sine_cfg;
  logic [11:0]  gates;
  int checks = 0, failures = 0;

  localparam int TURN = 32768;   // carrier clocks per reference turn
  localparam real PI = 3.141592653589793;

  inverter_3l3p dut (.clk_car, .rst_n_car(rst_n), .clk_ref, .rst_n_ref(rst_n),
                     .pwm_cfg, .carrier_cfg, .sine_cfg, .gates);

  always #5  clk_car = !clk_car;
  // Reference clock at half the carrier clock, edge-aligned as from one PLL.
  always @(posedge clk_car) clk_ref <= !clk_ref;

  initial begin : watchdog
    repeat (400000) @(posedge clk_car);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real m, input int turns);
    int  t, n_pos [3], n_neg [3];
    real sc [3], ss [3], ang [3], d, fr;
    logic [15:0] ref_prev [3];
    for (int p = 0; p < 3; p++) begin n_pos[p] = 0; n_neg[p] = 0; sc[p] = 0; ss[p] = 0; end
    // start at an accumulator wrap
    @(posedge clk_ref iff dut.u_sine.phase == 16'hFFFC);
    for (t = 0; t < turns * TURN; t++) begin
      for (int p = 0; p < 3; p++) ref_prev[p] = dut.u_sine.ref_o[p];
      @(posedge clk_car); #1;
      for (int p = 0; p < 3; p++) begin
        logic [3:0] g;
        g = gates[4*p +: 4];
        checks += 2;
        if ((g[0] && g[2]) || (g[1] && g[3])) begin
          failures++; $display("FAIL shoot-through phase %0d %b", p, g);
        end
        if (dut.ref_c[p] != ref_prev[p]) begin
          failures++; $display("FAIL leg %0d reference not from generator output %0d", p, p);
        end
        if (g == 4'b0011) begin
          n_pos[p]++;
          sc[p] += $cos(2.0 * PI * t / TURN); ss[p] += $sin(2.0 * PI * t / TURN);
        end
        if (g == 4'b1100) n_neg[p]++;
      end
    end
    for (int p = 0; p < 3; p++) begin
      ang[p] = $atan2(ss[p], sc[p]) * 180.0 / PI;
      fr = real'(n_pos[p]) / (turns * TURN);
      checks++;
      if (fr < m / PI - 0.02 || fr > m / PI + 0.02) begin
        failures++; $display("FAIL phase %0d +Vc share %f expected %f", p, fr, m / PI);
      end
      fr = real'(n_neg[p]) / (turns * TURN);
      checks++;
      if (fr < m / PI - 0.02 || fr > m / PI + 0.02) begin
        failures++; $display("FAIL phase %0d -Vc share %f expected %f", p, fr, m / PI);
      end
    end
    // Phase A follows the accumulator: its +Vc interval is centred where the
    // accumulator reads a quarter turn (90 degrees from the wrap).
    checks++;
    if (ang[0] < 87.0 || ang[0] > 93.0) begin
      failures++; $display("FAIL phase A +Vc centred at %f degrees, expected 90", ang[0]);
    end
    for (int p = 1; p < 3; p++) begin
      d = ang[p] - ang[0];
      while (d > 180.0) d -= 360.0;
      while (d < -180.0) d += 360.0;
      checks++;
      if ((p == 1 && (d > -117.0 || d < -123.0)) || (p == 2 && (d < 117.0 || d > 123.0))) begin
        failures++; $display("FAIL phase %0d at %f degrees from phase A", p, d);
      end
    end
    $display("m=%f angles A %f B %f C %f, +Vc A %0d", m, ang[0], ang[1], ang[2], n_pos[0]);
  endtask

  initial begin
    pwm_cfg = '0; pwm_cfg.enable = 1; pwm_cfg.deadband = 8'd128;
    pwm_cfg.act_a = ACT_ACTIVE_H; pwm_cfg.act_b = ACT_ACTIVE_L;
    carrier_cfg = '0; carrier_cfg.period = 15'd32640; carrier_cfg.step = 8'd128;
    carrier_cfg.prescale = 8'd1;                       // 510 clocks per carrier period
    sine_cfg.prescale = 8'd1; sine_cfg.step = 8'd4;    // 16384 ref clocks per turn
    sine_cfg.mod_ratio = 16'hFFFF;
    repeat (4) @(posedge clk_ref);
    #1 rst_n = 1;
    measure(65535.0 / 65536.0, 2);
    sine_cfg.mod_ratio = 16'h8000;
    measure(0.5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
