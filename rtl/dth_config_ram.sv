// dth_config_ram: simple dual-port block RAM caching histogram configurations.
//
// One entry per histogram (256 x 108 bits in the document: min edge, bin width, bins
// number and the precomputed max edge), addressed by the 8-bit histogram index
// {unit, sub-histogram}. The binning engine writes an entry during initialization or a
// single-histogram reset and reads it for every sample.
// Interface and timing: one write port and one read port on the same clock; the read
// data is registered (available the clock after `raddr` is presented), as a block RAM
// delivers it. A read of the address being written returns the old contents.
// The contents are not initialized: every entry is written before it is read.
module dth_config_ram #(
  parameter int unsigned WIDTH = 108,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
