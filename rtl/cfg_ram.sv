// cfg_ram -- dual-clock buffer memory for configuration frames.
//
// Used twice in the engine. As the input memory it holds frame data written by
// the processor and read by the engine; as the output memory it holds readback
// frames written by the engine and read by the processor (and read again by
// the engine when a read region is written back somewhere else). The two ports
// run on independent clocks, so the memory also decouples the processor bus
// clock from the slower configuration port clock.
//
// Port B (clk_b) reads and writes, port A (clk_a) only reads. Both reads are
// synchronous: rdata is valid the cycle after en, and keeps its value while en
// is low. A read on port B of the word being written returns the old word.
// With DEPTH = 5120 the memory maps onto five 18-Kbit block RAMs in 1K x 16
// mode, so input plus output memory use the ten block RAMs reported for the
// Spartan-6 version; the split into two equal halves is this design's choice.
module cfg_ram #(
  parameter int unsigned DEPTH  = 5120,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  // read/write port
  input  logic              clk_b,
  input  logic              en_b,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [WIDTH-1:0]  wdata_b,
  output logic [WIDTH-1:0]  rdata_b,
  // read-only port
  input  logic              clk_a,
  input  logic              en_a,
  input  logic [ADDR_W-1:0] addr_a,
  output logic [WIDTH-1:0]  rdata_a
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

  always_ff @(posedge clk_a) begin
    if (en_a) rdata_a <= mem[addr_a];
  end

endmodule
