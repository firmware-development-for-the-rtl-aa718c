// dth_async_fifo: dual-clock first-word-fall-through FIFO.
//
// Used for the 24 unit FIFOs (written in the incoming-data clock, read in the AXI clock,
// 35 x 512 each in the document) and for the two request FIFOs between the user
// interface clock and the AXI clock. The document uses vendor FIFO cores here; this is
// a plain replacement of the usual kind.
//
// How it works: binary pointers one bit wider than the address are kept in each domain
// and passed to the other domain as Gray code through two flip-flops. `full` is computed
// in the write domain against the synchronized read pointer and `empty` in the read
// domain against the synchronized write pointer, so both are conservative.
// Interface and timing: `rdata` shows the oldest entry while `empty` is low; `ren` pops
// it. A write while `full` is dropped, which is what the unit FIFOs need: the incoming
// data has no flow control. A written entry becomes visible to the reader three read
// clocks later at most. Each side has its own asynchronous active-low reset; both must
// be applied together (assertion may be asynchronous, release synchronous to each side).
module dth_async_fifo #(
  parameter int unsigned WIDTH = 35,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wclk,
  input  logic             wrstn,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrstn,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---- write domain ----
  logic [AW:0] rbin_w;
  assign rbin_w = gray2bin(rgray_w2);
  assign full   = (wbin - rbin_w) == (AW+1)'(DEPTH);

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrstn) begin
    if (!wrstn) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---- read domain ----
  assign empty = rgray == wgray_r2;
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrstn) begin
    if (!rrstn) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
