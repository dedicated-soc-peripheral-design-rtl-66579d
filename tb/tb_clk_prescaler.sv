// tb_clk_prescaler: checks that the tick comes exactly once every
// max(prescale,1) clocks for a set of prescale values, each after a reset.
module tb_clk_prescaler;
  logic       clk = 0, rst_n = 0;
  logic [7:0] prescale;
  logic       tick;
  int checks = 0, failures = 0;

  clk_prescaler #(.W(8)) dut (.clk, .rst_n, .prescale, .tick);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p);
    int expect_gap, last, n, cyc;
    expect_gap = (p == 0) ? 1 : p;
    prescale = 8'(p);
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    last = -1; n = 0; cyc = 0;
    while (n < 8) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != expect_gap) begin
            failures++;
            $display("FAIL prescale=%0d gap=%0d expected %0d", p, cyc - last, expect_gap);
          end
        end
        last = cyc; n++;
      end
    end
  endtask

  initial begin
    run(0); run(1); run(2); run(3); run(7); run(11); run(229); run(255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
