// axi_regs: AXI4-Lite slave holding the configuration registers of all
// inverters.
//
// Each inverter owns three consecutive 32-bit words: PWM configuration,
// carrier configuration and sine configuration, so inverter i starts at byte
// offset 12*i (register word index 3*i + sel). The bus address is decoded
// from bit 2 upwards; the interconnect is expected to have matched the base
// address. Writes honour WSTRB. Reads return the stored word. Accesses past
// the last register return SLVERR and change nothing.
//
// A write address and its data may arrive in either order or together; the
// slave takes each as soon as it is offered, holds it, and performs the
// write when it has both and no write response is pending. Reads are served
// one at a time. Every register resets to zero, which leaves all gate
// outputs disabled.
//
// From the published design: three 32-bit registers per inverter at consecutive word
// addresses, ten inverters. Own choices: AXI4-Lite as the protocol, the
// response codes, the strobe per written register (wr_strobe, one clock, in
// the same clock as the register update).
//
// Interface: AXI4-Lite slave (aclk, aresetn, aw*, w*, b*, ar*, r*);
// regs[N_INV*3] the stored words, wr_strobe[N_INV*3].
module axi_regs
  import epwm_pkg::*;
#(
  parameter int unsigned N_INV  = 10,
  parameter int unsigned ADDR_W = 8
) (
  input  logic                   aclk,
  input  logic                   aresetn,
  input  logic [ADDR_W-1:0]      awaddr,
  input  logic                   awvalid,
  output logic                   awready,
  input  logic [31:0]            wdata,
  input  logic [3:0]             wstrb,
  input  logic                   wvalid,
  output logic                   wready,
  output logic [1:0]             bresp,
  output logic                   bvalid,
  input  logic                   bready,
  input  logic [ADDR_W-1:0]      araddr,
  input  logic                   arvalid,
  output logic                   arready,
  output logic [31:0]            rdata,
  output logic [1:0]             rresp,
  output logic                   rvalid,
  input  logic                   rready,
  output logic [REG_W-1:0]       regs      [N_INV*REGS_PER_INV],
  output logic [N_INV*REGS_PER_INV-1:0] wr_strobe
);
  localparam int unsigned NREG  = N_INV * REGS_PER_INV;
  localparam int unsigned IDX_W = $clog2(NREG);
  localparam logic [1:0] RESP_OKAY = 2'b00, RESP_SLVERR = 2'b10;

  logic              aw_held, w_held;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  logic [3:0]        w_strb;
  logic [ADDR_W-3:0] wr_idx, rd_idx;
  logic              do_write;
  logic [IDX_W-1:0]  wr_sel, rd_sel;   // register index, valid when in range

  assign awready  = !aw_held;
  assign wready   = !w_held;
  assign arready  = !rvalid;
  assign wr_idx   = aw_addr[ADDR_W-1:2];
  assign rd_idx   = araddr[ADDR_W-1:2];
  assign wr_sel   = IDX_W'(wr_idx);
  assign rd_sel   = IDX_W'(rd_idx);
  assign do_write = aw_held && w_held && !bvalid;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      aw_held   <= 1'b0;
      w_held    <= 1'b0;
      aw_addr   <= '0;
      w_data    <= '0;
      w_strb    <= '0;
      bvalid    <= 1'b0;
      bresp     <= RESP_OKAY;
      wr_strobe <= '0;
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      wr_strobe <= '0;
      if (awvalid && awready) begin
        aw_held <= 1'b1;
        aw_addr <= awaddr;
      end
      if (wvalid && wready) begin
        w_held <= 1'b1;
        w_data <= wdata;
        w_strb <= wstrb;
      end
      if (bvalid && bready) bvalid <= 1'b0;
      if (do_write) begin
        aw_held <= 1'b0;
        w_held  <= 1'b0;
        bvalid  <= 1'b1;
        if (32'(wr_idx) < NREG) begin
          bresp <= RESP_OKAY;
          for (int b = 0; b < 4; b++)
            if (w_strb[b]) regs[wr_sel][8*b +: 8] <= w_data[8*b +: 8];
        end else begin
          bresp <= RESP_SLVERR;
        end
      end
      // Strobe the register one clock after it changed, with its new value.
      if (do_write && 32'(wr_idx) < NREG) wr_strobe[wr_sel] <= 1'b1;
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      rvalid <= 1'b0;
      rdata  <= '0;
      rresp  <= RESP_OKAY;
    end else if (arvalid && arready) begin
      rvalid <= 1'b1;
      if (32'(rd_idx) < NREG) begin
        rdata <= regs[rd_sel];
        rresp <= RESP_OKAY;
      end else begin
        rdata <= '0;
        rresp <= RESP_SLVERR;
      end
    end else if (rvalid && rready) begin
      rvalid <= 1'b0;
    end
  end

  // AXI rule: a response, once valid, stays valid (with the same read
  // data) until it is accepted.
  logic        b_stall_q, r_stall_q;
  logic [31:0] rdata_q;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      b_stall_q <= 1'b0;
      r_stall_q <= 1'b0;
      rdata_q   <= '0;
    end else begin
      b_stall_q <= bvalid && !bready;
      r_stall_q <= rvalid && !rready;
      rdata_q   <= rdata;
      a_bvalid_hold: assert (!b_stall_q || bvalid)
        else $error("bvalid dropped before bready");
      a_rvalid_hold: assert (!r_stall_q || (rvalid && rdata == rdata_q))
        else $error("rvalid dropped or rdata changed before rready");
    end
  end
endmodule
