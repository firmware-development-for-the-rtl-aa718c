// dth_pkg: shared constants and types of the histogramming monitor.
//
// The monitor fills histograms of 32-bit samples arriving on 24 input lines ("units")
// and keeps the bin counters in one HBM pseudo channel. This package holds what several
// modules share: the histogram index layout ({unit, sub-histogram}), the configuration
// record and its layout inside a 256-bit HBM word, the codes of the OP protocol between
// the binning engine and the memory engine, and the AXI request/response bundles used
// by every AXI manager and by the interconnect.
//
// The numbers (24 units, 8 sub-histograms per unit, 32-bit data, 12-bit bin index,
// 256-bit HBM word with four 64-bit counters, 1025 words per histogram, bursts of up
// to 16) follow the document. The AXI bundle carries only the signals these modules
// drive or read; IDs, QoS, cache and protection fields are left to the integration.
package dth_pkg;

  // ---- histogram indexing ----
  localparam int unsigned N_UNITS   = 24;              // optical links
  localparam int unsigned UNIT_W    = 5;               // bits of a unit index
  localparam int unsigned SUB_W     = 3;               // bits of a sub-histogram index
  localparam int unsigned HIST_W    = UNIT_W + SUB_W;  // 8-bit histogram index
  localparam int unsigned N_HIST    = 1 << HIST_W;     // 256 histograms
  localparam int unsigned DATA_W    = 32;              // sample width
  localparam int unsigned BN_W      = 12;              // bin index width
  localparam int unsigned BN_MAX    = (1 << BN_W) - 2; // 4094 regular bins at most
  localparam int unsigned CNT_W     = 64;              // bin counter width

  // ---- HBM word and memory layout ----
  localparam int unsigned HBM_DW         = 256;                  // HBM AXI data width
  localparam int unsigned HBM_AW         = 33;                   // byte address, 8 GB
  localparam int unsigned WORD_BYTES     = HBM_DW / 8;           // 32
  localparam int unsigned BINS_PER_WORD  = HBM_DW / CNT_W;       // 4
  localparam int unsigned WORDS_PER_HIST = 1 + (1 << BN_W) / BINS_PER_WORD; // 1025

  // Configuration record as cached in the block RAM (108 bits).
  typedef struct packed {
    logic [DATA_W-1:0] max_edge;   // min_edge + bin_width * bin_num, 32-bit wrap
    logic [BN_W-1:0]   bin_num;
    logic [DATA_W-1:0] bin_width;
    logic [DATA_W-1:0] min_edge;
  } hist_cfg_t;

  // Configuration block indices inside the 256-bit configuration word
  // (block k = bits [32k+31:32k]): min edge, bin width, bins number.
  localparam logic [2:0] CFG_BLK_ME = 3'd0;
  localparam logic [2:0] CFG_BLK_BW = 3'd1;
  localparam logic [2:0] CFG_BLK_BN = 3'd2;

  // ---- OP protocol ----
  typedef enum logic [2:0] {
    OP_READ_CFG  = 3'b001,
    OP_INC_BIN   = 3'b010,
    OP_ERASE     = 3'b111
  } op_code_e;

  // ---- AXI bundle (one HBM pseudo channel, AXI3-style 4-bit burst length) ----
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [2:0] AXI_SIZE_32B   = 3'd5;

  typedef struct packed {
    // write address
    logic              aw_valid;
    logic [HBM_AW-1:0] aw_addr;
    logic [3:0]        aw_len;
    logic [2:0]        aw_size;
    logic [1:0]        aw_burst;
    // write data
    logic              w_valid;
    logic [HBM_DW-1:0] w_data;
    logic [HBM_DW/8-1:0] w_strb;
    logic              w_last;
    // write response
    logic              b_ready;
    // read address
    logic              ar_valid;
    logic [HBM_AW-1:0] ar_addr;
    logic [3:0]        ar_len;
    logic [2:0]        ar_size;
    logic [1:0]        ar_burst;
    // read data
    logic              r_ready;
  } axi_req_t;

  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    logic [1:0]        b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [HBM_DW-1:0] r_data;
    logic [1:0]        r_resp;
    logic              r_last;
  } axi_rsp_t;

  // Byte address of word `word` of histogram `hist`, relative to a base word.
  function automatic logic [HBM_AW-1:0] hist_word_addr(input logic [HBM_AW-1:0] base_word,
                                                       input logic [HIST_W-1:0] hist,
                                                       input logic [BN_W-1:0]   word);
    logic [HBM_AW-1:0] w;
    w = base_word + HBM_AW'(hist) * HBM_AW'(WORDS_PER_HIST) + HBM_AW'(word);
    return w << $clog2(WORD_BYTES);
  endfunction

endpackage
