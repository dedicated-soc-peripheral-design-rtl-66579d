// AXI4-Lite master tasks shared by the testbenches. The including module
// declares aclk, the s_* signals used below and ADDR_W. Each task performs
// one transfer and waits for its response; the response is taken two clocks
// late so the slave must hold it.

// order: 0 = address and data together, 1 = address first, 2 = data first
task automatic axi_write(input logic [ADDR_W-1:0] addr, input logic [31:0] data,
                         input logic [3:0] strb, input int order,
                         output logic [1:0] resp);
  logic aw_done, w_done;
  aw_done = 0; w_done = 0;
  @(posedge aclk); #1;
  s_bready = 0;
  s_awaddr = addr; s_wdata = data; s_wstrb = strb;
  s_awvalid = (order != 2);
  s_wvalid  = (order != 1);
  while (!aw_done || !w_done) begin
    @(posedge aclk);
    if (s_awvalid && s_awready) aw_done = 1;
    if (s_wvalid && s_wready)   w_done = 1;
    #1;
    if (aw_done) s_awvalid = 0;
    if (w_done)  s_wvalid  = 0;
    if (order == 1 && aw_done && !w_done) s_wvalid  = 1;
    if (order == 2 && w_done && !aw_done) s_awvalid = 1;
  end
  repeat (2) @(posedge aclk);
  #1 s_bready = 1;
  while (!s_bvalid) begin @(posedge aclk); #1; end
  resp = s_bresp;
  @(posedge aclk); #1 s_bready = 0;
endtask

task automatic axi_read(input logic [ADDR_W-1:0] addr, output logic [31:0] data,
                        output logic [1:0] resp);
  @(posedge aclk); #1;
  s_araddr = addr; s_arvalid = 1; s_rready = 0;
  do @(posedge aclk); while (!s_arready);
  #1 s_arvalid = 0;
  repeat (2) @(posedge aclk);
  #1 s_rready = 1;
  while (!s_rvalid) begin @(posedge aclk); #1; end
  data = s_rdata; resp = s_rresp;
  @(posedge aclk); #1 s_rready = 0;
endtask
