// dth_hbm_access: software access to the histogram memory (the "HBM access control entity").
//
// Lets the control processor read and write any word of the HBM pseudo channel through
// the register-style "user interface": a request carries a one-hot function vector
// (usr_func_wr / usr_func_rd) naming its recipient, and a read is answered with
// usr_data_rd and a one-cycle usr_rd_val. Two functions belong to this block.
//
// HBM read (function FUNC_HBM_RD, 0xA0):
//   write  usr_data_wr[32:0] = byte address (32-byte aligned),
//          usr_data_wr[38:33] = n - 1, n = 1..64 64-bit words to fetch;
//   then   n reads of the same function return the words in address order
//          (the low 64 bits of an HBM word first).
//   The request holds the read FIFO (dual clock, 256 bits in, delivered 64 bits at a
//   time) in reset for three user clocks while the address and length registers
//   settle. The AXI side sees its half of the FIFO leave reset, takes that rising edge
//   as the start signal and issues one INCR burst of ceil(n/4) beats into the FIFO. The
//   user side answers each read as soon as the FIFO holds data; a read that arrives
//   earlier waits. This is the document's scheme (reset release as the cross-domain
//   start signal, FIFO emptiness as the return signal).
// HBM write (function FUNC_HBM_WR):
//   five writes: the byte address, then the four 64-bit quarters of the 256-bit word,
//   low quarter first. They go through a 64-bit dual-clock FIFO; the AXI side counts
//   them and issues a one-beat write after the fourth quarter.
// Function numbers other than 0xA0, the quarter order and the waiting read are this
// design's choices. Clocks: usr_clk (user interface, reset `rstn`), axi_clk (HBM).
// Beats are always whole 32-byte words: AxSIZE, AxBURST (INCR) and WSTRB are constants.
module dth_hbm_access
  import dth_pkg::*;
#(
  parameter int unsigned FUNC_W      = 256,
  parameter int unsigned FUNC_HBM_RD = 'hA0,
  parameter int unsigned FUNC_HBM_WR = 'hA1,
  parameter int unsigned FIFO_DEPTH  = 512
) (
  input  logic              usr_clk,
  input  logic              axi_clk,
  input  logic              rstn,
  input  logic [FUNC_W-1:0] usr_func_wr,
  input  logic              usr_wren,
  input  logic [63:0]       usr_data_wr,
  input  logic [FUNC_W-1:0] usr_func_rd,
  input  logic              usr_rden,
  output logic [63:0]       usr_data_rd,
  output logic              usr_rd_val,
  output axi_req_t          axi_req,
  input  axi_rsp_t          axi_rsp
);

  logic rstn_axi;
  dth_reset_sync #(.STAGES(2)) u_rst_axi (.clk(axi_clk), .rstn_in(rstn), .rstn_out(rstn_axi));

  logic rd_cmd, rd_req, wr_push;
  assign rd_cmd  = usr_wren && usr_func_wr[FUNC_HBM_RD];
  assign wr_push = usr_wren && usr_func_wr[FUNC_HBM_WR];
  assign rd_req  = usr_rden && usr_func_rd[FUNC_HBM_RD];

  // =====================================================================
  // Read path, user side
  // =====================================================================
  logic [HBM_AW-1:0] rd_addr;     // stable while the AXI side uses it
  logic [5:0]        rd_nm1;      // n - 1
  logic [1:0]        rst_cnt;     // FIFO reset countdown
  logic              rdf_hold;    // read FIFO held in reset
  logic [6:0]        rd_pending;  // reads waiting for data
  logic [1:0]        lane;        // next 64-bit quarter of the head word

  logic              rdf_empty, rdf_ren;
  logic [HBM_DW-1:0] rdf_rdata;
  logic              rdf_rrstn;
  assign rdf_rrstn = rstn && !rdf_hold;

  logic serve;
  assign serve   = (rd_pending != '0) && !rdf_empty;
  assign rdf_ren = serve && lane == 2'd3;

  always_ff @(posedge usr_clk or negedge rstn) begin
    if (!rstn) begin
      rd_addr     <= '0;
      rd_nm1      <= '0;
      rst_cnt     <= '0;
      rdf_hold    <= 1'b1;
      rd_pending  <= '0;
      lane        <= '0;
      usr_rd_val  <= 1'b0;
      usr_data_rd <= '0;
    end else begin
      usr_rd_val <= 1'b0;
      if (rd_cmd) begin
        rd_addr    <= usr_data_wr[HBM_AW-1:0];
        rd_nm1     <= usr_data_wr[38:33];
        rdf_hold   <= 1'b1;
        rst_cnt    <= 2'd3;
        rd_pending <= '0;
        lane       <= '0;
      end else begin
        if (rst_cnt != '0) begin
          rst_cnt <= rst_cnt - 1'b1;
          if (rst_cnt == 2'd1) rdf_hold <= 1'b0;
        end
        if (serve) begin
          usr_rd_val  <= 1'b1;
          usr_data_rd <= rdf_rdata[64*lane +: 64];
          lane        <= lane + 1'b1;
        end
        rd_pending <= rd_pending + 7'(rd_req) - 7'(serve);
      end
    end
  end

  // =====================================================================
  // Read path, AXI side
  // =====================================================================
  logic rdf_wrstn, rdf_wrstn_q, rdf_full, rdf_wen;
  dth_reset_sync #(.STAGES(2)) u_rst_rdf (.clk(axi_clk), .rstn_in(rdf_rrstn), .rstn_out(rdf_wrstn));

  dth_async_fifo #(.WIDTH(HBM_DW), .DEPTH(FIFO_DEPTH)) u_rd_fifo (
    .wclk (axi_clk),
    .wrstn(rdf_wrstn),
    .wen  (rdf_wen),
    .wdata(axi_rsp.r_data),
    .full (rdf_full),
    .rclk (usr_clk),
    .rrstn(rdf_rrstn),
    .ren  (rdf_ren),
    .rdata(rdf_rdata),
    .empty(rdf_empty)
  );

  typedef enum logic [1:0] {R_IDLE, R_AR, R_DATA} rstate_e;
  rstate_e rstate;
  logic    rd_start;   // rising edge of the FIFO write side leaving reset, pending

  always_ff @(posedge axi_clk or negedge rstn_axi) begin
    if (!rstn_axi) begin
      rdf_wrstn_q <= 1'b0;
      rd_start    <= 1'b0;
      rstate      <= R_IDLE;
    end else begin
      rdf_wrstn_q <= rdf_wrstn;
      if (rdf_wrstn && !rdf_wrstn_q) rd_start <= 1'b1;
      unique case (rstate)
        R_IDLE:
          if (rd_start) begin
            rd_start <= 1'b0;
            rstate   <= R_AR;
          end
        R_AR:
          if (axi_rsp.ar_ready) rstate <= R_DATA;
        R_DATA:
          if (axi_rsp.r_valid && axi_req.r_ready && axi_rsp.r_last) rstate <= R_IDLE;
        default:
          rstate <= R_IDLE;
      endcase
    end
  end
  assign rdf_wen = rstate == R_DATA && axi_rsp.r_valid && !rdf_full;

  // =====================================================================
  // Write path
  // =====================================================================
  logic        wf_empty, wf_ren, wf_full;
  logic [63:0] wf_rdata;

  dth_async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_wr_fifo (
    .wclk (usr_clk),
    .wrstn(rstn),
    .wen  (wr_push),
    .wdata(usr_data_wr),
    .full (wf_full),
    .rclk (axi_clk),
    .rrstn(rstn_axi),
    .ren  (wf_ren),
    .rdata(wf_rdata),
    .empty(wf_empty)
  );

  typedef enum logic [1:0] {W_COLLECT, W_SEND, W_RESP} wstate_e;
  wstate_e           wstate;
  logic [2:0]        wcount;     // items pulled: 0 = address next, 1..4 = quarters
  logic [HBM_AW-1:0] wr_addr;
  logic [HBM_DW-1:0] wr_word;
  logic              aw_done, w_done;

  assign wf_ren = wstate == W_COLLECT && !wf_empty;

  always_ff @(posedge axi_clk or negedge rstn_axi) begin
    if (!rstn_axi) begin
      wstate  <= W_COLLECT;
      wcount  <= '0;
      wr_addr <= '0;
      wr_word <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      unique case (wstate)
        W_COLLECT:
          if (!wf_empty) begin
            if (wcount == '0) begin
              wr_addr <= wf_rdata[HBM_AW-1:0];
              wcount  <= 3'd1;
            end else begin
              wr_word[64*2'(wcount - 3'd1) +: 64] <= wf_rdata;
              if (wcount == 3'd4) begin
                wcount  <= '0;
                aw_done <= 1'b0;
                w_done  <= 1'b0;
                wstate  <= W_SEND;
              end else begin
                wcount <= wcount + 1'b1;
              end
            end
          end
        W_SEND: begin
          if (axi_req.aw_valid && axi_rsp.aw_ready) aw_done <= 1'b1;
          if (axi_req.w_valid && axi_rsp.w_ready)   w_done  <= 1'b1;
          if ((aw_done || axi_rsp.aw_ready) && (w_done || axi_rsp.w_ready)) wstate <= W_RESP;
        end
        W_RESP:
          if (axi_rsp.b_valid) wstate <= W_COLLECT;
        default:
          wstate <= W_COLLECT;
      endcase
    end
  end

  // =====================================================================
  // AXI port
  // =====================================================================
  always_comb begin
    axi_req          = '0;
    axi_req.ar_valid = rstate == R_AR;
    axi_req.ar_addr  = rd_addr;
    axi_req.ar_len   = 4'(rd_nm1 >> 2);
    axi_req.ar_size  = AXI_SIZE_32B;
    axi_req.ar_burst = AXI_BURST_INCR;
    axi_req.r_ready  = rstate == R_DATA && !rdf_full;
    axi_req.aw_valid = wstate == W_SEND && !aw_done;
    axi_req.aw_addr  = wr_addr;
    axi_req.aw_len   = '0;
    axi_req.aw_size  = AXI_SIZE_32B;
    axi_req.aw_burst = AXI_BURST_INCR;
    axi_req.w_valid  = wstate == W_SEND && !w_done;
    axi_req.w_data   = wr_word;
    axi_req.w_strb   = '1;
    axi_req.w_last   = 1'b1;
    axi_req.b_ready  = wstate == W_RESP;
  end

endmodule
