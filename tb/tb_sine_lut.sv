// tb_sine_lut: reads every entry of the sine table and compares it with
// 2^15*sin(2*pi*k/1024) + 2^15 computed here in floating point (within one
// LSB), checks the known points 0, 90, 180 and 270 degrees, and checks the
// one-clock read latency.
module tb_sine_lut;
  logic        clk = 0;
  logic [9:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  sine_lut #(.ADDR_W(10), .DATA_W(16)) dut (.clk, .addr, .data);

  always #5 clk = !clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int k);
    real v;
    v = 32768.0 * $sin(2.0 * 3.141592653589793 * k / 1024.0) + 32768.0;
    if (v > 65535.0) v = 65535.0;
    return $rtoi(v + 0.5);
  endfunction

  initial begin
    int e;
    addr = 0;
    @(posedge clk);
    for (int k = 0; k < 1024; k++) begin
      addr = 10'(k);
      @(posedge clk); #1;
      e = model(k);
      checks++;
      if (int'(data) - e > 1 || e - int'(data) > 1) begin
        failures++; $display("FAIL k=%0d got %0d expected %0d", k, data, e);
      end
    end
    // Fixed points.
    addr = 0;   @(posedge clk); #1; checks++; if (data != 16'd32768) failures++;
    addr = 256; @(posedge clk); #1; checks++; if (data != 16'd65535) failures++;
    addr = 512; @(posedge clk); #1; checks++; if (data != 16'd32768) failures++;
    addr = 768; @(posedge clk); #1; checks++; if (data != 16'd0)     failures++;
    // Latency: data must not follow addr before the clock edge.
    @(negedge clk); addr = 256; #1;
    checks++; if (data != 16'd0) begin failures++; $display("FAIL read not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
