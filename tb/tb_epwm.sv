// tb_epwm: drives random carrier, duty, dead band, action and enable values
// and compares both registered outputs with a reference model one clock
// later. A second phase sweeps a triangle carrier and measures the dead time
// between channel A switching off and channel B switching on.
module tb_epwm;
  import epwm_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] counter, duty;
  pwm_cfg_t    cfg;
  logic        pwm_a, pwm_b;
  int checks = 0, failures = 0;

  epwm dut (.clk, .rst_n, .counter, .duty, .cfg, .pwm_a, .pwm_b);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic act(logic [1:0] a, logic raw);
    case (a)
      2'b00: return 0;
      2'b01: return raw;
      2'b10: return !raw;
      default: return 1;
    endcase
  endfunction

  initial begin
    logic ea, eb;
    int   fall_t, gap, ngaps, t;
    logic prev_a, prev_b;
    counter = 0; duty = 0; cfg = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Random stimulus against the model.
    for (int i = 0; i < 5000; i++) begin
      counter = 16'($urandom);
      duty    = (i % 4 == 0) ? counter + 16'($urandom_range(0, 3)) - 16'd1 : 16'($urandom);
      cfg          = '0;
      cfg.deadband = 8'($urandom);
      cfg.act_a    = pwm_action_e'($urandom_range(0, 3));
      cfg.act_b    = pwm_action_e'($urandom_range(0, 3));
      cfg.enable   = ($urandom_range(0, 7) != 0);
      ea = cfg.enable && act(cfg.act_a, duty > counter);
      eb = cfg.enable && act(cfg.act_b, (int'(duty) + int'(cfg.deadband)) > int'(counter));
      @(posedge clk); #1;
      checks += 2;
      if (pwm_a !== ea || pwm_b !== eb) begin
        failures++;
        $display("FAIL cnt=%0d duty=%0d db=%0d act=%0d/%0d en=%0b got %0b%0b exp %0b%0b",
                 counter, duty, cfg.deadband, cfg.act_a, cfg.act_b, cfg.enable,
                 pwm_a, pwm_b, ea, eb);
      end
    end
    // Dead time on a triangle carrier, complementary setting.
    cfg = '0; cfg.enable = 1; cfg.act_a = ACT_ACTIVE_H; cfg.act_b = ACT_ACTIVE_L;
    cfg.deadband = 8'd20; duty = 16'd500;
    ngaps = 0; t = 0; fall_t = -1;
    prev_a = pwm_a; prev_b = pwm_b;
    for (int rep = 0; rep < 4; rep++) begin
      for (int c = 0; c < 1000; c++) begin
        counter = (c < 500) ? 16'(c * 2) : 16'((1000 - c) * 2);
        @(posedge clk); #1; t++;
        checks++;
        if (pwm_a && pwm_b) begin
          failures++; $display("FAIL shoot-through at t=%0d", t);
        end
        if ((prev_a && !pwm_a) || (prev_b && !pwm_b)) fall_t = t;
        if (((!prev_a && pwm_a) || (!prev_b && pwm_b)) && fall_t >= 0) begin
          gap = t - fall_t;
          checks++; ngaps++;
          // 20 counts of dead band at 2 counts per clock = 10 clocks.
          if (gap != 10) begin
            failures++; $display("FAIL dead time %0d clocks, expected 10", gap);
          end
        end
        prev_a = pwm_a; prev_b = pwm_b;
      end
    end
    checks++;
    if (ngaps < 6) begin failures++; $display("FAIL only %0d dead-time gaps seen", ngaps); end
    // Reset clears the outputs.
    cfg.act_a = ACT_HIGH; cfg.act_b = ACT_HIGH;
    @(posedge clk); #1;
    rst_n = 0; #1;
    checks++;
    if (pwm_a || pwm_b) begin failures++; $display("FAIL outputs not cleared by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
