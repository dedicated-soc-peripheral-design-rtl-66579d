// tb_cfg_sync: configuration-word handshake between two unrelated clocks.
// Bursts of writes, some back to back, are issued in the source domain with
// the destination clock both faster and slower than the source. Every word
// that appears at the destination must be one that was written (never a mix
// of two), dst_load must flag each change, and after each burst the
// destination must settle to the last word written.
module tb_cfg_sync;
  logic        src_clk = 0, dst_clk = 0, rst_n = 0;
  logic [31:0] src_data, dst_data, dst_prev;
  logic        src_wr, dst_load;
  int checks = 0, failures = 0;
  int dst_half = 2;   // destination half period, changed between runs

  cfg_sync #(.W(32)) dut (.src_clk, .src_rst_n(rst_n), .src_data, .src_wr,
                          .dst_clk, .dst_rst_n(rst_n), .dst_data, .dst_load);

  always #5 src_clk = !src_clk;
  always #(dst_half) dst_clk = !dst_clk;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every value ever written, for the no-mixing check.
  bit written [logic [31:0]];
  int n_loads = 0;

  always @(posedge dst_clk) if (rst_n) begin
    #0.1;
    if (dst_data != dst_prev) begin
      checks += 2;
      if (!written.exists(dst_data)) begin
        failures++; $display("FAIL destination shows %h, never written", dst_data);
      end
      if (!dst_load) begin failures++; $display("FAIL change without dst_load"); end
      n_loads++;
    end
    dst_prev = dst_data;
  end

  task automatic burst(input int n, input int max_gap);
    logic [31:0] last;
    for (int k = 0; k < n; k++) begin
      @(posedge src_clk); #1;
      last = $urandom;
      src_data = last; src_wr = 1; written[last] = 1;
      @(posedge src_clk); #1 src_wr = 0;
      repeat ($urandom_range(0, max_gap)) @(posedge src_clk);
    end
    repeat (40 + 20 * dst_half) @(posedge src_clk);
    checks++;
    if (dst_data != last) begin
      failures++; $display("FAIL settled at %h, last written %h", dst_data, last);
    end
  endtask

  initial begin
    src_data = 0; src_wr = 0; dst_prev = 0; written[0] = 1;
    repeat (3) @(posedge src_clk);
    #1 rst_n = 1;
    dst_half = 2;   burst(200, 0); burst(200, 6);    // fast destination
    dst_half = 37;  burst(100, 0); burst(100, 20);   // slow destination
    dst_half = 5;   burst(100, 3);                   // same rate, other phase
    checks++;
    if (n_loads < 50) begin failures++; $display("FAIL only %0d loads", n_loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
