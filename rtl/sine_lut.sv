// sine_lut: offset-binary sine table with one synchronous read port.
//
// Entry k holds f(k) = 2^(D-1) * sin(2*pi*k / 2^A) + 2^(D-1), rounded to the
// nearest integer and limited to 2^D - 1, where A = ADDR_W and D = DATA_W.
// Storing the sine already shifted up by half the range keeps every value
// unsigned, so nothing downstream handles negative numbers. The table is
// computed at elaboration time by a constant function, so no data file is
// needed; synthesis maps it to a block ROM. The mapping formula follows the
// reference generator description; using a separate address width A (1024
// entries) next to the 16-bit data width is this design's own choice.
//
// Interface: clk, addr (A bits), data (D bits).
// Timing: data is registered, valid one clock after addr.
module sine_lut #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  typedef logic [DATA_W-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t t;
    real  half, v;
    half = 2.0 ** (DATA_W - 1);
    for (int k = 0; k < DEPTH; k++) begin
      v = half * $sin(2.0 * 3.14159265358979323846 * k / DEPTH) + half;
      v = (v > 2.0 * half - 1.0) ? 2.0 * half - 1.0 : v;
      t[k] = DATA_W'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam rom_t TABLE = gen_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
