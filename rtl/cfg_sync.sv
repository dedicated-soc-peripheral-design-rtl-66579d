// cfg_sync: carries one configuration word from the bus clock domain into a
// PWM clock domain with a request/acknowledge handshake.
//
// A write strobe in the source domain marks the word as pending. When no
// transfer is in flight the source copies the word into a holding register
// and flips a request bit. The destination synchronizes the request through
// two flip-flops, loads the (by then stable) holding register into its
// output and returns the request bit as acknowledge, which the source
// synchronizes to end the transfer. Writes that arrive during a transfer are
// not lost: the pending flag starts another transfer of the newest value.
// This is the handshake between processor and PWM units; its form is this
// design's own choice.
//
// Interface: src_clk, src_rst_n, src_data, src_wr (one-clock write strobe);
// dst_clk, dst_rst_n, dst_data, dst_load (one clock when dst_data changed).
// Timing: dst_data follows a write after about three destination clocks
// plus two source clocks; outputs reset to zero like the register file.
module cfg_sync #(
  parameter int unsigned W = 32
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] src_data,
  input  logic         src_wr,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] dst_data,
  output logic         dst_load
);
  // Source side
  logic [W-1:0] hold;
  logic         req, pending, busy;
  logic [1:0]   ack_sync;
  // Destination side
  logic [1:0]   req_sync;
  logic         ack;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      hold     <= '0;
      req      <= 1'b0;
      pending  <= 1'b0;
      busy     <= 1'b0;
      ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
      if (busy && ack_sync[1] == req) busy <= 1'b0;
      if (src_wr) pending <= 1'b1;
      if (!busy && pending && !src_wr) begin
        hold    <= src_data;
        req     <= !req;
        busy    <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      req_sync <= '0;
      ack      <= 1'b0;
      dst_data <= '0;
      dst_load <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req};
      dst_load <= 1'b0;
      if (req_sync[1] != ack) begin
        ack      <= req_sync[1];
        dst_data <= hold;
        dst_load <= 1'b1;
      end
    end
  end
endmodule
