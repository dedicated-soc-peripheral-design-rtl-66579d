// tb_sine_ref_gen: checks the phase accumulator (advance by `step` every
// `prescale` clocks), each of the three outputs against a floating-point
// model of the scaled offset-binary sine at phase offsets 0, 1/3 and 2/3 of
// a turn with two clocks of latency after the accumulator, and the output
// period from f = f_clk * step / (prescale * 2^16).
module tb_sine_ref_gen;
  import epwm_pkg::*;
  logic        clk = 0, rst_n = 0;
  sine_cfg_t   cfg;
  logic [15:0] ref_o [3];
  logic [15:0] phase;
  int checks = 0, failures = 0;

  sine_ref_gen #(.ACC_W(16), .ADDR_W(10)) dut (.clk, .rst_n, .cfg, .ref_o, .phase);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int ph, int m);
    real v; int lut; longint d;
    v = 32768.0 * $sin(2.0 * 3.141592653589793 * (ph >> 6) / 1024.0) + 32768.0;
    if (v > 65535.0) v = 65535.0;
    lut = $rtoi(v + 0.5);
    d = longint'(lut - 32768) * longint'(m);
    // floor division by 2^16 for a signed value
    return 32768 + int'((d >= 0) ? d / 65536 : -((-d + 65535) / 65536));
  endfunction

  localparam int OFS [3] = '{0, 21845, 43691};

  task automatic run(input int pre, input int step, input int m, input int clocks);
    int ph_hist [3];
    int e, last_ph, since, gap_exp, wraps, first_wrap, t;
    cfg.prescale = 8'(pre); cfg.step = 8'(step); cfg.mod_ratio = 16'(m);
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    gap_exp = (pre == 0) ? 1 : pre;
    ph_hist = '{0, 0, 0};
    last_ph = 0; since = 0; wraps = 0; first_wrap = -1;
    for (t = 1; t <= clocks; t++) begin
      @(posedge clk); #1;
      since++;
      // Accumulator
      if (int'(phase) != last_ph) begin
        checks++;
        if (int'(phase) != ((last_ph + step) & 16'hFFFF) || (t > 2 && since != gap_exp)) begin
          failures++; $display("FAIL phase %0d after %0d (gap %0d)", phase, last_ph, since);
        end
        if (int'(phase) < last_ph) begin
          if (first_wrap < 0) first_wrap = t;
          else begin
            wraps++;
            checks++;
            // Exact when step divides 2^16: period = prescale * 2^16 / step.
            if (65536 % step == 0 && (t - first_wrap) != wraps * gap_exp * (65536 / step)) begin
              failures++; $display("FAIL output period %0d clocks", t - first_wrap);
            end
          end
        end
        last_ph = int'(phase); since = 0;
      end
      // Outputs: two clocks after the accumulator value they come from.
      if (t > 3) begin
        for (int p = 0; p < 3; p++) begin
          e = model((ph_hist[1] + OFS[p]) & 16'hFFFF, m);
          checks++;
          if (int'(ref_o[p]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d out%0d=%0d expected %0d", t, p, ref_o[p], e);
          end
        end
      end
      ph_hist[1] = ph_hist[0]; ph_hist[0] = int'(phase);
    end
  endtask

  initial begin
    cfg = '0;
    run(1, 64, 65535, 4000);      // 1024 clocks per turn, full amplitude
    run(3, 16, 32768, 30000);     // half amplitude, prescaled
    run(0, 128, 0, 2000);         // zero modulation: constant mid-scale
    run(2, 37, 50000, 20000);     // step not a power of two
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
