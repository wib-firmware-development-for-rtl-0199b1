// hist_bram: the histogram's dual-port block memory, DEPTH words of 32 bits
// (2^13 words: 2^14 16-bit code counters, 32 KB).
//
// Port A belongs to the histogram state machine: synchronous read and write
// on clk_a, read data registered one clock after the address (read-first: a
// write returns the word's old contents). Port B belongs to the AXI BRAM
// controller through which the processor copies the finished histogram; it
// has its own clock, clk_b, and is read-only, as in the documented block
// design, so no location has two writers. Read latency is one clock on both
// ports; dout holds its value while the port is not enabled and is undefined
// before the port's first read.
// The memory starts cleared; the histogram clears it again for every run.
module hist_bram #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk_a,
  input  logic              en_a,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  input  logic              clk_b,
  input  logic              en_b,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (en_a) begin
      dout_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
  end

  always_ff @(posedge clk_b) begin
    if (en_b) dout_b <= mem[addr_b];
  end

endmodule
