// dth_sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the aggregator FIFO, where the samples of all units meet in the AXI clock
// domain tagged with {unit index, sub-histogram index}. Width and depth (40 x 512)
// follow the document; the show-ahead read port is this design's choice.
//
// How it works: a DEPTH-entry array with write and read pointers one bit wider than
// the address, so full and empty are told apart by the extra bit.
// Interface and timing: `rdata` always shows the oldest entry while `empty` is low;
// `ren` removes it at the clock edge. `wen` while `full` and `ren` while `empty` are
// ignored. Push and pop in the same cycle are allowed. `count` is the fill level.
module dth_sync_fifo #(
  parameter int unsigned WIDTH = 40,
  parameter int unsigned DEPTH = 512
) (
  input  logic               clk,
  input  logic               rstn,
  input  logic               wen,
  input  logic [WIDTH-1:0]   wdata,
  output logic               full,
  input  logic               ren,
  output logic [WIDTH-1:0]   rdata,
  output logic               empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign count = wptr - rptr;
  assign full  = count == (AW+1)'(DEPTH);
  assign empty = count == '0;
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wen && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wen && !full) wptr <= wptr + 1'b1;
      if (ren && !empty) rptr <= rptr + 1'b1;
    end
  end

endmodule
