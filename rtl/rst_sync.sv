// rst_sync: reset synchronizer. The reset asserts asynchronously and is
// released two clocks after rst_n_in rises, in step with clk, so every
// flip-flop of the destination domain leaves reset on the same edge.
// Interface: clk, rst_n_in (asynchronous, active low), rst_n_out.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
