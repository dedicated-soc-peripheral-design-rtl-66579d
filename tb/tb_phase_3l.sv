// tb_phase_3l: one three-level leg on a full-range triangle carrier.
// Per clock: the four gates must match the comparison of the duty value with
// the upper and lower carriers of the previous clock, and T1/T3 and T2/T4
// must never be on together. Per carrier period: the on-time of T1 (duty in
// the upper half) or T4 (duty in the lower half) must match the fraction the
// duty value sets, and each of the three leg voltages (+Vc, 0, -Vc) must
// appear for the duty values that call for it. Finally the enable bit must
// hold all gates off.
module tb_phase_3l;
  import epwm_pkg::*;
  logic         clk = 0, rst_n = 0;
  carrier_cfg_t carrier_cfg;
  pwm_cfg_t     pwm_cfg;
  logic [15:0]  duty;
  phase_gates_t gates;
  logic [15:0]  carrier_lo, carrier_hi;
  int checks = 0, failures = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0, n_dead = 0;

  localparam int P = 32760, STEP = 8;      // 2*P/STEP = 8190 clocks per period
  localparam int DB = 16;

  phase_3l dut (.clk, .rst_n, .carrier_cfg, .pwm_cfg, .duty, .gates,
                .carrier_lo, .carrier_hi);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] lo_q, hi_q, duty_q;
  logic        en_q;
  always @(posedge clk) begin
    lo_q <= carrier_lo; hi_q <= carrier_hi; duty_q <= duty; en_q <= pwm_cfg.enable;
  end

  // Clock-by-clock model and level counting.
  always @(negedge clk) if (rst_n && $time > 100) begin
    logic t1, t2, t3, t4;
    t1 = en_q && (duty_q > hi_q);
    t3 = en_q && !(int'(duty_q) + DB > int'(hi_q));
    t2 = en_q && (duty_q > lo_q);
    t4 = en_q && !(int'(duty_q) + DB > int'(lo_q));
    checks++;
    if (gates != {t4, t3, t2, t1}) begin
      failures++;
      if (failures < 10) $display("FAIL gates %b expected %b (duty %0d hi %0d)", gates, {t4,t3,t2,t1}, duty_q, hi_q);
    end
    checks++;
    if ((gates[0] && gates[2]) || (gates[1] && gates[3])) begin
      failures++; $display("FAIL shoot-through %b", gates);
    end
    case (gates)
      4'b0011: n_pos++;   // T1,T2 on: +Vc
      4'b0110: n_zero++;  // T2,T3 on: 0
      4'b1100: n_neg++;   // T3,T4 on: -Vc
      default: if (en_q) n_dead++;
    endcase
  end

  task automatic period_check(input int d);
    int on1, on4, clocks, exp1, exp4;
    duty = 16'(d);
    // align to the start of a period
    @(posedge clk iff carrier_lo == 0);
    @(posedge clk iff carrier_lo == 0);
    on1 = 0; on4 = 0; clocks = 0;
    do begin
      @(posedge clk); #1; clocks++;
      on1 += gates[0]; on4 += gates[3];
    end while (carrier_lo != 0);
    exp1 = (d > 32768) ? ((d - 32768) * 2 * P / STEP) / P : 0;
    exp4 = (d + DB < 32768) ? ((32768 - d - DB) * 2 * P / STEP) / P : 0;
    checks += 3;
    if (clocks < 2 * P / STEP - 1 || clocks > 2 * P / STEP) begin failures++; $display("FAIL period %0d", clocks); end
    if (on1 < exp1 - 3 || on1 > exp1 + 3) begin failures++; $display("FAIL T1 on %0d exp %0d (duty %0d)", on1, exp1, d); end
    if (on4 < exp4 - 3 || on4 > exp4 + 3) begin failures++; $display("FAIL T4 on %0d exp %0d (duty %0d)", on4, exp4, d); end
  endtask

  initial begin
    carrier_cfg = '0; carrier_cfg.mode = MODE_TRIANGLE; carrier_cfg.period = 15'(P);
    carrier_cfg.step = 8'(STEP); carrier_cfg.prescale = 8'd1;
    pwm_cfg = '0; pwm_cfg.enable = 1; pwm_cfg.deadband = 8'(DB);
    pwm_cfg.act_a = ACT_ACTIVE_H; pwm_cfg.act_b = ACT_ACTIVE_L;
    duty = 16'h8000;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    period_check(60000);
    period_check(40000);
    period_check(32768);
    period_check(20000);
    period_check(2000);
    period_check(65535);
    period_check(0);
    checks += 4;
    if (n_pos == 0)  begin failures++; $display("FAIL no +Vc state"); end
    if (n_zero == 0) begin failures++; $display("FAIL no 0 state"); end
    if (n_neg == 0)  begin failures++; $display("FAIL no -Vc state"); end
    if (n_dead == 0) begin failures++; $display("FAIL no dead-band state"); end
    // Disable: all gates off.
    pwm_cfg.enable = 0; duty = 16'd50000;
    repeat (3) @(posedge clk); #1;
    repeat (2000) begin
      @(posedge clk); #1; checks++;
      if (gates != 4'b0000) begin failures++; $display("FAIL gates on while disabled"); break; end
    end
    $display("levels: +Vc %0d, 0 %0d, -Vc %0d, dead %0d clocks", n_pos, n_zero, n_neg, n_dead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
