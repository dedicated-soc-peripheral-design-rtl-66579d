// tb_axi_regs: writes every register of ten inverters over AXI4-Lite with
// the three orderings of address and data, checks the register outputs, the
// one-clock write strobe of exactly the written register, read-back, byte
// strobes, and SLVERR for addresses past the last register.
module tb_axi_regs;
  import epwm_pkg::*;
  localparam int N_INV = 10, ADDR_W = 8, NREG = 30;
  logic aclk = 0, aresetn = 0;
  logic [ADDR_W-1:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] regs [NREG];
  logic [NREG-1:0] wr_strobe;
  int checks = 0, failures = 0;

  axi_regs #(.N_INV(N_INV), .ADDR_W(ADDR_W)) dut (
    .aclk, .aresetn,
    .awaddr(s_awaddr), .awvalid(s_awvalid), .awready(s_awready),
    .wdata(s_wdata), .wstrb(s_wstrb), .wvalid(s_wvalid), .wready(s_wready),
    .bresp(s_bresp), .bvalid(s_bvalid), .bready(s_bready),
    .araddr(s_araddr), .arvalid(s_arvalid), .arready(s_arready),
    .rdata(s_rdata), .rresp(s_rresp), .rvalid(s_rvalid), .rready(s_rready),
    .regs, .wr_strobe);

  always #5 aclk = !aclk;

  `include "axi_lite_bfm.svh"

  initial begin : watchdog
    repeat (100000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record every strobe.
  int strobe_count [NREG];
  always @(posedge aclk) if (aresetn)
    for (int i = 0; i < NREG; i++) if (wr_strobe[i]) strobe_count[i]++;

  logic [31:0] model [NREG];

  initial begin
    logic [1:0] resp;
    logic [31:0] rd, v;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_araddr = 0; s_wdata = 0; s_wstrb = 0;
    for (int i = 0; i < NREG; i++) begin model[i] = 0; strobe_count[i] = 0; end
    repeat (3) @(posedge aclk);
    #1 aresetn = 1;
    // Reset values are zero.
    for (int i = 0; i < NREG; i++) begin
      checks++; if (regs[i] != 0) begin failures++; $display("FAIL reg %0d not reset", i); end
    end
    // Full-word writes, inverter i register r at byte 12*i + 4*r.
    for (int i = 0; i < NREG; i++) begin
      v = $urandom;
      axi_write(ADDR_W'(4 * i), v, 4'hF, i % 3, resp);
      model[i] = v;
      checks += 3;
      if (resp != 2'b00) begin failures++; $display("FAIL write resp %0d", resp); end
      if (regs[i] != v) begin failures++; $display("FAIL reg %0d = %h expected %h", i, regs[i], v); end
      if (strobe_count[i] != 1) begin failures++; $display("FAIL strobe count reg %0d = %0d", i, strobe_count[i]); end
    end
    // No register other than the written one changed or strobed.
    for (int i = 0; i < NREG; i++) begin
      checks += 2;
      if (regs[i] != model[i]) begin failures++; $display("FAIL reg %0d overwritten", i); end
      if (strobe_count[i] != 1) begin failures++; $display("FAIL reg %0d strobed %0d times", i, strobe_count[i]); end
    end
    // Byte strobes.
    axi_write(ADDR_W'(4 * 7), 32'hA1B2C3D4, 4'b0101, 0, resp);
    model[7] = {model[7][31:24], 8'hB2, model[7][15:8], 8'hD4};
    checks++; if (regs[7] != model[7]) begin failures++; $display("FAIL byte strobes %h", regs[7]); end
    // Read back.
    for (int i = 0; i < NREG; i++) begin
      axi_read(ADDR_W'(4 * i), rd, resp);
      checks += 2;
      if (rd != model[i]) begin failures++; $display("FAIL read %0d = %h expected %h", i, rd, model[i]); end
      if (resp != 2'b00) begin failures++; $display("FAIL read resp"); end
    end
    // Out of range: SLVERR, no change.
    axi_write(ADDR_W'(4 * NREG), 32'hDEADBEEF, 4'hF, 0, resp);
    checks++; if (resp != 2'b10) begin failures++; $display("FAIL no SLVERR on write"); end
    axi_read(ADDR_W'(4 * 40), rd, resp);
    checks++; if (resp != 2'b10) begin failures++; $display("FAIL no SLVERR on read"); end
    for (int i = 0; i < NREG; i++) begin
      checks++; if (regs[i] != model[i]) begin failures++; $display("FAIL reg %0d changed by bad write", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
