// tb_epwm_soc_top: end-to-end test of the peripheral at its default size
// (ten inverters, 120 gate outputs) with 300 MHz carrier clock, 150 MHz
// reference clock and 100 MHz bus clock.
//
// All ten inverters are configured over AXI4-Lite for a 50 Hz reference
// (reference prescale 229, step 5: 49.97 Hz) and then observed for one full
// reference period (about 6.0 million carrier clocks):
//   inv 0, 4, 5, 6   15 kHz triangle carrier, modulation ratio ~1
//   inv 1            7.5 kHz carrier        inv 2   30 kHz carrier
//   inv 3            modulation ratio 0.5   inv 8   sawtooth carrier, ~30 kHz
//   inv 7            starts disabled, enabled by a register write mid-period
//   inv 9            action codes force T1,T2 on and T3,T4 off
// Checked: no complementary pair ever conducts together; each phase spends
// m/pi of the period at +Vc and at -Vc; the number of T1 pulses per period
// matches f_carrier / (2 f_ref); dead time between complementary switches is
// deadband*prescale/step carrier clocks; phase B leads phase A by 120 degrees
// and phase C lags it by 120; a disabled inverter is silent and starts
// switching once enabled; registers read back; bad addresses get SLVERR.
// Each of these mechanisms is counted and must occur at least once.
module tb_epwm_soc_top;
  import epwm_pkg::*;
  localparam int N_INV = 10, ADDR_W = 8, NREG = 30;
  localparam int TURN = 6003098;            // carrier clocks per reference period
  localparam real PI = 3.141592653589793;
  localparam real FREF = 150.0e6 * 5.0 / (229.0 * 65536.0);

  logic aclk = 0, aresetn = 0, clk_car = 0, clk_ref = 0;
  logic [ADDR_W-1:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [12*N_INV-1:0] pwm_out;
  int checks = 0, failures = 0;

  epwm_soc_top dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(s_awaddr), .s_axi_awvalid(s_awvalid), .s_axi_awready(s_awready),
    .s_axi_wdata(s_wdata), .s_axi_wstrb(s_wstrb), .s_axi_wvalid(s_wvalid),
    .s_axi_wready(s_wready), .s_axi_bresp(s_bresp), .s_axi_bvalid(s_bvalid),
    .s_axi_bready(s_bready), .s_axi_araddr(s_araddr), .s_axi_arvalid(s_arvalid),
    .s_axi_arready(s_arready), .s_axi_rdata(s_rdata), .s_axi_rresp(s_rresp),
    .s_axi_rvalid(s_rvalid), .s_axi_rready(s_rready),
    .clk_carrier(clk_car), .clk_ref(clk_ref), .pwm_out);

  always #5 aclk = !aclk;                       // 100 MHz
  always #1.667 clk_car = !clk_car;             // ~300 MHz
  always @(posedge clk_car) clk_ref <= !clk_ref; // 150 MHz, same source

  `include "axi_lite_bfm.svh"

  initial begin : watchdog
    #30ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- configuration words ----------------
  function automatic logic [31:0] car_word(int step, int mode);
    carrier_cfg_t c;
    c = '0; c.period = 15'd32760; c.prescale = 8'd11; c.step = 8'(step);
    c.mode = carrier_mode_e'(mode);
    return c;
  endfunction
  function automatic logic [31:0] pwm_word(logic en, pwm_action_e a, pwm_action_e b);
    pwm_cfg_t c;
    c = '0; c.deadband = 8'd144; c.act_a = a; c.act_b = b; c.enable = en;
    return 32'(c);
  endfunction
  function automatic logic [31:0] sine_word(int m);
    sine_cfg_t c;
    c.prescale = 8'd229; c.step = 8'd5; c.mod_ratio = 16'(m);
    return c;
  endfunction

  logic [31:0] cfg_words [NREG];
  real         m_of  [N_INV];    // modulation ratio
  real         fc_of [N_INV];    // carrier frequency
  initial begin
    for (int i = 0; i < N_INV; i++) begin
      int step, mode, m;
      logic en; pwm_action_e a, b;
      step = 36; mode = 0; m = 65535; en = 1; a = ACT_ACTIVE_H; b = ACT_ACTIVE_L;
      if (i == 1) step = 18;
      if (i == 2) step = 72;
      if (i == 3) m = 32768;
      if (i == 7) en = 0;
      if (i == 8) mode = 1;
      if (i == 9) begin a = ACT_HIGH; b = ACT_LOW; end
      cfg_words[3*i + 0] = pwm_word(en, a, b);
      cfg_words[3*i + 1] = car_word(step, mode);
      cfg_words[3*i + 2] = sine_word(m);
      m_of[i]  = m / 65536.0;
      fc_of[i] = (mode == 1) ? 300.0e6 / (11.0 * (32760 / step + 1))
                             : 300.0e6 / (11.0 * 2.0 * 32760 / step);
    end
  end

  // ---------------- measurement ----------------
  logic measuring = 0;
  int   t_meas;
  int   inv7_state = 0;   // 0 disabled, 1 enable write in flight, 2 enabled
  int   n_pos [N_INV][3], n_neg [N_INV][3], n_zero [N_INV][3], t1_pulses [N_INV][3];
  real  sc [3], ss [3];
  int   gap_start [N_INV][3], gap_sw [N_INV][3], ref_steady_since [N_INV][3];
  logic [15:0] gap_ref [N_INV][3];
  // Reference value each leg is modulating, observed inside the design.
  logic [15:0] ref_probe [N_INV][3];
  for (genvar gi = 0; gi < N_INV; gi++) begin : g_probe
    for (genvar gp = 0; gp < 3; gp++) begin : g_ph
      assign ref_probe[gi][gp] = dut.g_inv[gi].u_inv.ref_c[gp];
    end
  end
  int   n_dead_ok = 0, n_inv7_before = 0, n_inv7_after = 0, n_forced = 0;
  logic [11:0] prev_g [N_INV];

  always @(posedge clk_car) if (measuring) begin
    #0.1;
    for (int i = 0; i < N_INV; i++) begin
      logic [11:0] g;
      g = pwm_out[12*i +: 12];
      for (int p = 0; p < 3; p++) begin
        logic [3:0] q, pq;
        q = g[4*p +: 4]; pq = prev_g[i][4*p +: 4];
        if (i == 9) begin
          checks++;
          if (q != 4'b0011) begin failures++; $display("FAIL forced outputs %b", q); end
          else n_forced++;
          continue;
        end
        checks++;
        if ((q[0] && q[2]) || (q[1] && q[3])) begin
          failures++; $display("FAIL shoot-through inverter %0d phase %0d %b", i, p, q);
        end
        if (i == 7) begin
          if (inv7_state == 0) begin
            checks++;
            if (q != 0) begin failures++; $display("FAIL disabled inverter switching"); end
            n_inv7_before++;
          end else if (inv7_state == 2 && q != 0) n_inv7_after++;
          continue;
        end
        if (ref_probe[i][p] != gap_ref[i][p]) ref_steady_since[i][p] = t_meas;
        gap_ref[i][p] = ref_probe[i][p];
        case (q)
          4'b0011: n_pos[i][p]++;
          4'b0110: n_zero[i][p]++;
          4'b1100: n_neg[i][p]++;
          default: ;
        endcase
        if (q[0] && !pq[0]) t1_pulses[i][p]++;
        if (i == 0 && q == 4'b0011) begin
          sc[p] += $cos(2.0 * PI * t_meas / TURN);
          ss[p] += $sin(2.0 * PI * t_meas / TURN);
        end
        // Dead time: T1 off -> T3 on, and T3 off -> T1 on (triangle carriers).
        // Gaps in which the reference moved, or that end with the same switch
        // turning on again (carrier reversal), are not measured.
        if (i != 8) begin
          if (pq[0] && !q[0]) begin gap_start[i][p] = t_meas; gap_sw[i][p] = 0; end
          if (pq[2] && !q[2]) begin gap_start[i][p] = t_meas; gap_sw[i][p] = 2; end
          if (gap_start[i][p] >= 0 && ((!pq[0] && q[0]) || (!pq[2] && q[2]))) begin
            int gap;
            gap = t_meas - gap_start[i][p];
            if (q[gap_sw[i][p] == 0 ? 2 : 0] && ref_steady_since[i][p] < gap_start[i][p] - 2) begin
              checks++;
              // 144 counts / 36 per step * 11 clocks = 44 clocks, one step of
              // slack; the 7.5 kHz and 30 kHz carriers scale it.
              if (i == 1 ? (gap < 77 || gap > 99) : i == 2 ? (gap < 11 || gap > 33)
                         : (gap < 33 || gap > 55)) begin
                failures++; $display("FAIL dead time %0d clocks inverter %0d", gap, i);
              end else n_dead_ok++;
            end
            gap_start[i][p] = -1;
          end
        end
      end
      prev_g[i] = g;
    end
    t_meas++;
  end

  initial begin
    logic [1:0] resp;
    logic [31:0] rd;
    int n_readback = 0, n_slverr = 0;
    real fr, ang [3], d;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    for (int i = 0; i < N_INV; i++) begin
      prev_g[i] = 0;
      for (int p = 0; p < 3; p++) begin
        n_pos[i][p] = 0; n_neg[i][p] = 0; n_zero[i][p] = 0; t1_pulses[i][p] = 0; gap_start[i][p] = -1;
        ref_steady_since[i][p] = 0; gap_ref[i][p] = 0;
      end
    end
    for (int p = 0; p < 3; p++) begin sc[p] = 0; ss[p] = 0; end
    repeat (5) @(posedge aclk);
    #1 aresetn = 1;
    repeat (5) @(posedge aclk);
    // Outputs are off after reset.
    checks++; if (pwm_out != 0) begin failures++; $display("FAIL outputs on after reset"); end
    // Configure: carrier and sine first, PWM (enable) last.
    for (int i = 0; i < N_INV; i++) begin
      axi_write(ADDR_W'(12*i + 4), cfg_words[3*i + 1], 4'hF, 0, resp);
      axi_write(ADDR_W'(12*i + 8), cfg_words[3*i + 2], 4'hF, 1, resp);
      axi_write(ADDR_W'(12*i + 0), cfg_words[3*i + 0], 4'hF, 2, resp);
      checks++; if (resp != 2'b00) begin failures++; $display("FAIL write response"); end
    end
    for (int r = 0; r < NREG; r++) begin
      axi_read(ADDR_W'(4*r), rd, resp);
      checks++;
      if (rd != cfg_words[r] || resp != 2'b00) begin failures++; $display("FAIL readback %0d", r); end
      else n_readback++;
    end
    axi_read(ADDR_W'(4*NREG), rd, resp);
    checks++; if (resp != 2'b10) begin failures++; $display("FAIL no SLVERR"); end else n_slverr++;
    // Let the configuration cross into the PWM clock domains.
    repeat (20) @(posedge aclk);
    @(posedge clk_car); t_meas = 0; measuring = 1;
    // Enable inverter 7 half-way through the period.
    wait (t_meas == TURN / 2);
    inv7_state = 1;
    axi_write(ADDR_W'(12*7), pwm_word(1, ACT_ACTIVE_H, ACT_ACTIVE_L), 4'hF, 0, resp);
    repeat (3) @(posedge aclk);   // write is posted; the gates follow within a few clocks
    inv7_state = 2;
    wait (t_meas == TURN);
    measuring = 0;

    // ------------- per-period results -------------
    for (int i = 0; i < N_INV; i++) begin
      if (i == 7 || i == 9) continue;
      for (int p = 0; p < 3; p++) begin
        real exp_p;
        exp_p = fc_of[i] / (2.0 * FREF);
        fr = real'(n_pos[i][p]) / TURN;
        checks++;
        if (fr < m_of[i] / PI - 0.02 || fr > m_of[i] / PI + 0.02) begin
          failures++; $display("FAIL inv %0d phase %0d +Vc share %f expected %f", i, p, fr, m_of[i] / PI);
        end
        fr = real'(n_neg[i][p]) / TURN;
        checks++;
        if (fr < m_of[i] / PI - 0.02 || fr > m_of[i] / PI + 0.02) begin
          failures++; $display("FAIL inv %0d phase %0d -Vc share %f expected %f", i, p, fr, m_of[i] / PI);
        end
        checks++;
        // Near the reference peak T1 stays on across carrier peaks, merging
        // pulses: allow 2 % below the carrier-to-reference ratio.
        if (real'(t1_pulses[i][p]) < exp_p * 0.98 - 3.0 || real'(t1_pulses[i][p]) > exp_p + 3.0) begin
          failures++; $display("FAIL inv %0d phase %0d T1 pulses %0d expected %f", i, p, t1_pulses[i][p], exp_p);
        end
      end
      $display("inv %0d: fc %0.0f Hz, T1 pulses %0d/%0d/%0d, +Vc %0d 0 %0d -Vc %0d clocks (phase A)",
               i, fc_of[i], t1_pulses[i][0], t1_pulses[i][1], t1_pulses[i][2],
               n_pos[i][0], n_zero[i][0], n_neg[i][0]);
    end
    for (int p = 0; p < 3; p++) ang[p] = $atan2(ss[p], sc[p]) * 180.0 / PI;
    for (int p = 1; p < 3; p++) begin
      d = ang[p] - ang[0];
      while (d > 180.0) d -= 360.0;
      while (d < -180.0) d += 360.0;
      checks++;
      if ((p == 1 && (d > -117.0 || d < -123.0)) || (p == 2 && (d < 117.0 || d > 123.0))) begin
        failures++; $display("FAIL phase %0d at %f degrees from phase A", p, d);
      end
    end
    // ------------- mechanisms seen -------------
    $display("mechanisms: dead-time gaps %0d, +Vc %0d, 0 %0d, -Vc %0d, sawtooth pulses %0d,",
             n_dead_ok, n_pos[0][0], n_zero[0][0], n_neg[0][0], t1_pulses[8][0]);
    $display("  7.5k pulses %0d, 30k pulses %0d, half modulation +Vc %0d, disabled clocks %0d,",
             t1_pulses[1][0], t1_pulses[2][0], n_pos[3][0], n_inv7_before);
    $display("  switching after enable %0d, forced-action clocks %0d, readbacks %0d, slverr %0d",
             n_inv7_after, n_forced, n_readback, n_slverr);
    checks += 12;
    if (n_dead_ok == 0)      begin failures++; $display("FAIL no dead-time gap"); end
    if (n_pos[0][0] == 0)    begin failures++; $display("FAIL no +Vc"); end
    if (n_zero[0][0] == 0)   begin failures++; $display("FAIL no 0 level"); end
    if (n_neg[0][0] == 0)    begin failures++; $display("FAIL no -Vc"); end
    if (t1_pulses[8][0] == 0) begin failures++; $display("FAIL no sawtooth operation"); end
    if (t1_pulses[1][0] == 0) begin failures++; $display("FAIL no 7.5 kHz operation"); end
    if (t1_pulses[2][0] == 0) begin failures++; $display("FAIL no 30 kHz operation"); end
    if (n_pos[3][0] == 0)    begin failures++; $display("FAIL no half modulation"); end
    if (n_inv7_before == 0)  begin failures++; $display("FAIL disabled inverter not observed"); end
    if (n_inv7_after == 0)   begin failures++; $display("FAIL inverter not started by enable write"); end
    if (n_forced == 0)       begin failures++; $display("FAIL forced action not observed"); end
    if (n_readback == 0 || n_slverr == 0) begin failures++; $display("FAIL bus mechanisms"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
