// dth_top: histogram monitor for the 24 input links of a DAQ readout board
// (the "DTHistogram entity").
//
// The monitor histograms 32-bit observables from 24 input lines ("units"), up to 8
// histograms per unit, and keeps the 64-bit bin counters in one HBM pseudo channel.
// Samples enter without flow control (dropped only if a unit FIFO is full); the control
// processor configures histograms and reads the counters over the user interface.
//
// Contents:
//   dth_hist_wrapper      unit FIFOs, round robin, aggregator FIFO, binning engine,
//                         memory engine (AXI manager 0)
//   dth_hbm_access        software reads/writes of HBM words (AXI manager 1)
//   dth_axi_interconnect  shares the single HBM AXI port between the two
// plus, here, the reset logic and the histogram-control function FUNC_HIST_CTRL of the
// user interface:
//   write, usr_data_wr[0] = 1: reset the single histogram usr_data_wr[23:16]
//                              (one pulse to the binning engine);
//   write, usr_data_wr[0] = 0: hold all histograms in reset while usr_data_wr[1] = 1
//                              (a toggle; releasing it re-initializes every histogram);
//   read: status word, bit 0 = initialization done, bit 1 = histogram reset held.
// The write encoding follows the document. The function number (0xA2, next to the HBM
// functions 0xA0/0xA1) and the status word are this design's choices: the document
// mentions debug reads without defining them.
// Resets: usr_rst_n (usr_clk domain, active low) is stretched so the internal reset
// lasts 5 usr_clk cycles beyond its release, then fed to the blocks, which synchronize
// it into axi_clk themselves. The single-histogram pulse crosses into axi_clk by a
// toggle synchronizer (its index register is stable by then); the toggle reset by a
// two-flip-flop synchronizer.
// Clocks: usr_clk 100 MHz (user interface and incoming data), axi_clk 250 MHz (HBM and
// histogram logic), asynchronous to each other.
module dth_top
  import dth_pkg::*;
#(
  parameter int unsigned FUNC_W         = 256,
  parameter int unsigned FUNC_HBM_RD    = 'hA0,
  parameter int unsigned FUNC_HBM_WR    = 'hA1,
  parameter int unsigned FUNC_HIST_CTRL = 'hA2
) (
  input  logic                             axi_clk,
  input  logic                             usr_clk,
  input  logic                             usr_rst_n,
  input  logic [FUNC_W-1:0]                usr_func_wr,
  input  logic                             usr_wren,
  input  logic [63:0]                      usr_data_wr,
  input  logic [FUNC_W-1:0]                usr_func_rd,
  input  logic                             usr_rden,
  output logic [63:0]                      usr_data_rd,
  output logic                             usr_rd_val,
  input  logic [N_UNITS-1:0]               hist_data_valid,
  input  logic [N_UNITS-1:0][DATA_W-1:0]   hist_data,
  input  logic [N_UNITS-1:0][SUB_W-1:0]    hist_data_idx,
  output axi_req_t                         axi_req,
  input  axi_rsp_t                         axi_rsp
);

  // ---- main reset, stretched ----
  logic [2:0] stretch;
  logic       rstn_usr;
  always_ff @(posedge usr_clk or negedge usr_rst_n) begin
    if (!usr_rst_n) begin
      stretch  <= '0;
      rstn_usr <= 1'b0;
    end else if (stretch != 3'd5) begin
      stretch  <= stretch + 1'b1;
    end else begin
      rstn_usr <= 1'b1;
    end
  end

  logic rstn_axi;
  dth_reset_sync #(.STAGES(2)) u_rst_axi (.clk(axi_clk), .rstn_in(rstn_usr), .rstn_out(rstn_axi));

  // ---- histogram control function (usr_clk) ----
  logic              ctrl_wr;
  logic              all_rst;        // toggle reset of all histograms
  logic              single_tgl;     // flips on every single-histogram request
  logic [HIST_W-1:0] single_idx;
  assign ctrl_wr = usr_wren && usr_func_wr[FUNC_HIST_CTRL];

  always_ff @(posedge usr_clk or negedge rstn_usr) begin
    if (!rstn_usr) begin
      all_rst    <= 1'b0;
      single_tgl <= 1'b0;
      single_idx <= '0;
    end else if (ctrl_wr) begin
      if (usr_data_wr[0]) begin
        single_tgl <= !single_tgl;
        single_idx <= usr_data_wr[23:16];
      end else begin
        all_rst    <= usr_data_wr[1];
      end
    end
  end

  // ---- into axi_clk ----
  logic [1:0] all_rst_s;
  logic [2:0] single_s;
  logic       single_pulse;
  always_ff @(posedge axi_clk or negedge rstn_axi) begin
    if (!rstn_axi) begin
      all_rst_s <= '0;
      single_s  <= '0;
    end else begin
      all_rst_s <= {all_rst_s[0], all_rst};
      single_s  <= {single_s[1:0], single_tgl};
    end
  end
  assign single_pulse = single_s[2] ^ single_s[1];

  // ---- histogram data path ----
  axi_req_t mgr_req [2];
  axi_rsp_t mgr_rsp [2];
  logic     init_done;

  dth_hist_wrapper u_hwe (
    .axi_clk            (axi_clk),
    .wr_clk             (usr_clk),
    .rstn               (rstn_usr),
    .hist_rstn          (!all_rst_s[1]),
    .single_hist_rst    (single_pulse),
    .single_hist_rst_idx(single_idx),
    .wr_data_valid      (hist_data_valid),
    .wr_data            (hist_data),
    .wr_data_idx        (hist_data_idx),
    .init_done          (init_done),
    .axi_req            (mgr_req[0]),
    .axi_rsp            (mgr_rsp[0])
  );

  // ---- software access to the HBM ----
  logic [63:0] hace_rdata;
  logic        hace_rval;

  dth_hbm_access #(
    .FUNC_W     (FUNC_W),
    .FUNC_HBM_RD(FUNC_HBM_RD),
    .FUNC_HBM_WR(FUNC_HBM_WR)
  ) u_hace (
    .usr_clk    (usr_clk),
    .axi_clk    (axi_clk),
    .rstn       (rstn_usr),
    .usr_func_wr(usr_func_wr),
    .usr_wren   (usr_wren),
    .usr_data_wr(usr_data_wr),
    .usr_func_rd(usr_func_rd),
    .usr_rden   (usr_rden),
    .usr_data_rd(hace_rdata),
    .usr_rd_val (hace_rval),
    .axi_req    (mgr_req[1]),
    .axi_rsp    (mgr_rsp[1])
  );

  dth_axi_interconnect u_aie (
    .clk  (axi_clk),
    .rstn (rstn_axi),
    .s_req(mgr_req),
    .s_rsp(mgr_rsp),
    .m_req(axi_req),
    .m_rsp(axi_rsp)
  );

  // ---- status read and read-data merge (usr_clk) ----
  logic [1:0] init_done_s;
  logic       stat_val;
  always_ff @(posedge usr_clk or negedge rstn_usr) begin
    if (!rstn_usr) begin
      init_done_s <= '0;
      stat_val    <= 1'b0;
    end else begin
      init_done_s <= {init_done_s[0], init_done};
      stat_val    <= usr_rden && usr_func_rd[FUNC_HIST_CTRL];
    end
  end

  always_comb begin
    usr_rd_val  = hace_rval || stat_val;
    usr_data_rd = hace_rval ? hace_rdata : {62'd0, all_rst, init_done_s[1]};
  end

endmodule
