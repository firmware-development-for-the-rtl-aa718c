// dth_hist_wrapper: data path from the 24 input lines to the histogram engines
// (the "histogram wrapper entity").
//
// Samples arrive on N_UNITS lines in the incoming-data clock `wr_clk`, at most one per
// line per clock, each with a 3-bit sub-histogram index, and with no flow control.
//   1. Unit FIFOs: each line has a dual-clock FIFO of {data, sub index} (35 x 512).
//      A sample arriving while its FIFO is full is dropped: the only place where data
//      can be lost.
//   2. Round robin: in the AXI clock a counter c visits one unit per clock
//      (0, 1, ..., N_UNITS-1, 0, ...). If FIFO[c] holds data and the aggregator FIFO is
//      not full, one entry moves across, tagged with the unit index c; otherwise unit c
//      loses its turn. Nothing is dropped here.
//   3. Aggregator FIFO: {data, unit, sub} (40 x 512). When the binning engine is ready
//      and the FIFO is not empty, one entry is popped and offered with a one-cycle
//      data_valid; the histogram index is {unit, sub}.
// The binning engine (dth_histogram) and the memory engine (dth_hist_memory) sit
// behind it; the memory engine's AXI port is the port of this block.
// Resets: `rstn` (wr_clk domain) resets everything; it enters the AXI domain through a
// two-flip-flop synchronizer. `hist_rstn` (AXI domain) resets only the binning engine,
// which then re-initializes every histogram; the memory engine is left alone so that
// no AXI transaction is cut. `single_hist_rst`/`single_hist_rst_idx` go straight to
// the binning engine. Sizes and the flow follow the document; the round-robin counter
// advancing every clock whether or not a transfer happens is also the document's.
module dth_hist_wrapper
  import dth_pkg::*;
#(
  parameter int unsigned NUM_UNITS       = N_UNITS,
  parameter int unsigned UNIT_FIFO_DEPTH = 512,
  parameter int unsigned AGG_FIFO_DEPTH  = 512
) (
  input  logic                               axi_clk,
  input  logic                               wr_clk,
  input  logic                               rstn,
  input  logic                               hist_rstn,
  input  logic                               single_hist_rst,
  input  logic [HIST_W-1:0]                  single_hist_rst_idx,
  input  logic [NUM_UNITS-1:0]               wr_data_valid,
  input  logic [NUM_UNITS-1:0][DATA_W-1:0]   wr_data,
  input  logic [NUM_UNITS-1:0][SUB_W-1:0]    wr_data_idx,
  output logic                               init_done,
  output axi_req_t                           axi_req,
  input  axi_rsp_t                           axi_rsp
);

  localparam int unsigned UF_W  = DATA_W + SUB_W;           // 35
  localparam int unsigned AG_W  = DATA_W + UNIT_W + SUB_W;  // 40

  logic rstn_axi;
  dth_reset_sync #(.STAGES(2)) u_rst_axi (.clk(axi_clk), .rstn_in(rstn), .rstn_out(rstn_axi));

  // ---- unit FIFOs ----
  logic [NUM_UNITS-1:0]           uf_full, uf_empty, uf_ren;
  logic [NUM_UNITS-1:0][UF_W-1:0] uf_rdata;

  for (genvar u = 0; u < NUM_UNITS; u++) begin : g_unit
    dth_async_fifo #(.WIDTH(UF_W), .DEPTH(UNIT_FIFO_DEPTH)) u_fifo (
      .wclk (wr_clk),
      .wrstn(rstn),
      .wen  (wr_data_valid[u]),
      .wdata({wr_data[u], wr_data_idx[u]}),
      .full (uf_full[u]),
      .rclk (axi_clk),
      .rrstn(rstn_axi),
      .ren  (uf_ren[u]),
      .rdata(uf_rdata[u]),
      .empty(uf_empty[u])
    );
  end

  // ---- round robin into the aggregator FIFO ----
  logic [UNIT_W-1:0] rr;
  logic              ag_full, ag_empty, ag_wen, ag_ren;
  logic [AG_W-1:0]   ag_wdata, ag_rdata;

  assign ag_wen = !uf_empty[rr] && !ag_full;
  always_comb begin
    uf_ren     = '0;
    uf_ren[rr] = ag_wen;
  end
  assign ag_wdata = {uf_rdata[rr][UF_W-1:SUB_W], rr, uf_rdata[rr][SUB_W-1:0]};

  always_ff @(posedge axi_clk or negedge rstn_axi) begin
    if (!rstn_axi)                         rr <= '0;
    else if (rr == UNIT_W'(NUM_UNITS - 1)) rr <= '0;
    else                                   rr <= rr + 1'b1;
  end

  dth_sync_fifo #(.WIDTH(AG_W), .DEPTH(AGG_FIFO_DEPTH)) u_agg (
    .clk  (axi_clk),
    .rstn (rstn_axi),
    .wen  (ag_wen),
    .wdata(ag_wdata),
    .full (ag_full),
    .ren  (ag_ren),
    .rdata(ag_rdata),
    .empty(ag_empty),
    .count()
  );

  // ---- hand-off to the binning engine ----
  logic              he_rstn, he_ready, he_valid;
  logic [HIST_W-1:0] he_idx;
  logic [DATA_W-1:0] he_data;

  assign he_rstn = rstn_axi && hist_rstn;
  assign ag_ren  = he_ready && !ag_empty && !he_valid;

  always_ff @(posedge axi_clk or negedge rstn_axi) begin
    if (!rstn_axi) begin
      he_valid <= 1'b0;
      he_idx   <= '0;
      he_data  <= '0;
    end else begin
      he_valid <= ag_ren;
      if (ag_ren) begin
        he_data <= ag_rdata[AG_W-1 -: DATA_W];
        he_idx  <= ag_rdata[HIST_W-1:0];
      end
    end
  end

  logic        op_valid, op_ready, op_rvalid;
  op_code_e    op_code;
  logic [31:0] op_data, op_rdata;

  dth_histogram u_he (
    .clk         (axi_clk),
    .rstn        (he_rstn),
    .hist_rst    (single_hist_rst),
    .hist_rst_idx(single_hist_rst_idx),
    .ready       (he_ready),
    .data_valid  (he_valid),
    .data_idx    (he_idx),
    .data        (he_data),
    .op_valid    (op_valid),
    .op_code     (op_code),
    .op_data     (op_data),
    .op_ready    (op_ready),
    .op_rvalid   (op_rvalid),
    .op_rdata    (op_rdata),
    .init_done   (init_done)
  );

  dth_hist_memory u_hme (
    .clk      (axi_clk),
    .rstn     (rstn_axi),
    .op_valid (op_valid),
    .op_code  (op_code),
    .op_data  (op_data),
    .op_ready (op_ready),
    .op_rvalid(op_rvalid),
    .op_rdata (op_rdata),
    .axi_req  (axi_req),
    .axi_rsp  (axi_rsp)
  );

endmodule
