// tb_carrier_gen: follows the carrier counter clock by clock. Every change
// of the counter is compared with the next value of an independent model of
// the triangle and sawtooth ramps, the spacing of changes with the prescale
// value, and the full carrier period in clocks with the frequency formula.
// The two carrier outputs must be the counter with MSB 0 and MSB 1.
module tb_carrier_gen;
  import epwm_pkg::*;
  logic         clk = 0, rst_n = 0;
  carrier_cfg_t cfg;
  logic [14:0]  cnt;
  logic [15:0]  carrier_lo, carrier_hi;
  logic         dir_down, at_zero, at_period;
  int checks = 0, failures = 0;

  carrier_gen dut (.clk, .rst_n, .cfg, .cnt, .carrier_lo, .carrier_hi,
                   .dir_down, .at_zero, .at_period);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent model state: value and direction.
  int   m_val;
  logic m_down;

  task automatic model_step(input carrier_cfg_t c);
    int s = c.step, p = c.period;
    if (c.mode == MODE_SAWTOOTH) begin
      m_down = 0;
      m_val  = (m_val + s > p) ? 0 : m_val + s;
    end else if (!m_down) begin
      if (m_val + s >= p) begin m_val = p; m_down = 1; end
      else m_val += s;
    end else begin
      if (m_val <= s) begin m_val = 0; m_down = 0; end
      else m_val -= s;
    end
  endtask

  // Run one configuration for `n_periods` full carrier periods and check the
  // period length against `exp_period` clocks.
  task automatic run(input carrier_cfg_t c, input int exp_period, input int n_periods);
    int cyc, last_change, gap_exp, zero_t, periods, prev;
    cfg = c;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    m_val = 0; m_down = 0;
    gap_exp = (c.prescale == 0) ? 1 : c.prescale;
    cyc = 0; last_change = -1; zero_t = -1; periods = 0; prev = 0;
    while (periods < n_periods) begin
      @(posedge clk); #1; cyc++;
      checks++;
      if (carrier_lo != {1'b0, cnt} || carrier_hi != {1'b1, cnt}) begin
        failures++; $display("FAIL carrier MSB split");
      end
      if (int'(cnt) != prev) begin
        model_step(c);
        checks++;
        if (int'(cnt) != m_val || dir_down != m_down) begin
          failures++;
          $display("FAIL cnt=%0d dir=%0b expected %0d/%0b", cnt, dir_down, m_val, m_down);
          m_val = int'(cnt); m_down = dir_down;
        end
        if (last_change >= 0) begin
          checks++;
          if (cyc - last_change != gap_exp) begin
            failures++; $display("FAIL step spacing %0d expected %0d", cyc - last_change, gap_exp);
          end
        end
        last_change = cyc;
        // A period starts each time the counter leaves zero.
        if (prev == 0) begin
          if (zero_t >= 0) begin
            checks++; periods++;
            if (cyc - zero_t != exp_period) begin
              failures++; $display("FAIL period %0d clocks expected %0d", cyc - zero_t, exp_period);
            end
          end
          zero_t = cyc;
        end
        prev = int'(cnt);
      end
    end
  endtask

  initial begin
    carrier_cfg_t c;
    cfg = '0;
    // Triangle, period 600, step 3, prescale 2: 2*600/3*2 = 800 clocks.
    c = '0; c.mode = MODE_TRIANGLE; c.period = 15'd600; c.step = 8'd3; c.prescale = 8'd2;
    run(c, 800, 3);
    // Triangle, period not a multiple of the step: ends clamp.
    // 0,7,...,497,500 (72 steps up) then 493,...,3,0 (72 steps down) = 144 ticks.
    c.period = 15'd500; c.step = 8'd7; c.prescale = 8'd1;
    run(c, 144, 3);
    // Sawtooth, period 300, step 5, prescale 3: (60+1) ticks * 3 = 183 clocks.
    c.mode = MODE_SAWTOOTH; c.period = 15'd300; c.step = 8'd5; c.prescale = 8'd3;
    run(c, 183, 3);
    // Full-range triangle used by the three-level modulator: 0x7FF8, step 8.
    c.mode = MODE_TRIANGLE; c.period = 15'h7FF8; c.step = 8'd8; c.prescale = 8'd1;
    run(c, 2 * 4095, 2);
    // Step 0 holds the counter.
    cfg.step = 8'd0;
    repeat (50) @(posedge clk);
    begin
      logic [14:0] held;
      held = cnt;
      repeat (50) @(posedge clk);
      checks++;
      if (cnt != held) begin failures++; $display("FAIL step 0 does not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
