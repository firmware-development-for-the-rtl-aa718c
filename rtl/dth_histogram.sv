// dth_histogram: binning engine of the histogram monitor (the "histogram entity").
//
// For every sample it finds the bin of the right histogram and asks the memory engine
// to increment that bin. It knows nothing about the memory: it talks to the memory
// engine only through the OP protocol (op_valid/op_ready handshake on op_code/op_data,
// unacknowledged op_rvalid/op_rdata response).
//
// Initialization (after reset, repeated for histograms 0..N_HIST-1): read the three
// 32-bit configuration blocks (min edge ME, bin width BW, bins number BN) with
// OP_READ_CFG, sanitize them, compute max edge = ME + BW*BN (kept to 32 bits), store the
// four values in the configuration RAM at the histogram index, then send OP_ERASE for
// the BN+2 bins in use (regular bins, underflow at index BN, overflow at BN+1).
// Sanitizing (the document asks for valid defaults but names none; these are this
// design's): BW = 0 becomes 1, BN = 0 becomes 1, BN = 4095 becomes 4094. The values in
// HBM are left unchanged.
//
// Sample processing: `ready` is high in S_IDLE; a cycle with data_valid && ready takes
// {data_idx, data}. The cached configuration is read from the RAM (one clock), then
//   data <  ME        -> bin BN      (underflow)
//   data >= max edge  -> bin BN+1    (overflow)
//   otherwise         -> bin (data - ME) / BW, from the 12-bit sequential divider
// and OP_INC_BIN is sent with the histogram index in op_data[23:16] and the bin in
// op_data[11:0]. An out-of-range sample skips the 13-cycle division.
//
// Single-histogram reset: a `hist_rst` pulse records `hist_rst_idx`; once the current
// sample is finished the engine reruns the initialization steps for that histogram
// only, before taking new samples.
//
// OP data layout (document): histogram index in op_data[23:16]; configuration block in
// op_data[2:0]; bin index, or number of bins to erase minus one, in op_data[11:0].
// Interface timing: op_code/op_data are held while op_valid waits for op_ready.
module dth_histogram
  import dth_pkg::*;
#(
  parameter int unsigned NUM_HIST = N_HIST
) (
  input  logic              clk,
  input  logic              rstn,
  input  logic              hist_rst,
  input  logic [HIST_W-1:0] hist_rst_idx,
  output logic              ready,
  input  logic              data_valid,
  input  logic [HIST_W-1:0] data_idx,
  input  logic [DATA_W-1:0] data,
  output logic              op_valid,
  output op_code_e          op_code,
  output logic [31:0]       op_data,
  input  logic              op_ready,
  input  logic              op_rvalid,
  input  logic [31:0]       op_rdata,
  output logic              init_done
);

  typedef enum logic [3:0] {
    S_START,     // first clock after reset
    S_CFG_REQ,   // request one configuration block
    S_CFG_WAIT,  // wait for its response
    S_SANITIZE,  // validate the parameters, compute the max edge
    S_STORE,     // write the configuration RAM
    S_ERASE,     // ask for the bins in use to be cleared
    S_IDLE,      // ready for a sample
    S_LOOKUP,    // configuration RAM read
    S_CHECK,     // bounds check, start the divider
    S_DIVIDE,    // wait for the bin index
    S_FOUND      // send the increment
  } state_e;

  state_e state;

  logic              init_phase;   // walking through all histograms after reset
  logic [HIST_W-1:0] cur_hist;
  logic [1:0]        blk;
  logic [DATA_W-1:0] cfg_me, cfg_bw;
  logic [BN_W-1:0]   cfg_bn;
  logic [DATA_W-1:0] cfg_max;
  logic [DATA_W-1:0] sample;
  logic [BN_W-1:0]   bin_idx;
  logic              rst_pending;
  logic [HIST_W-1:0] rst_idx;

  // configuration cache
  hist_cfg_t ram_wdata, ram_rdata;
  logic      ram_we;
  dth_config_ram #(.WIDTH($bits(hist_cfg_t)), .DEPTH(N_HIST)) u_cfg_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(cur_hist),
    .wdata(ram_wdata),
    .raddr(cur_hist),
    .rdata(ram_rdata)
  );
  assign ram_we    = state == S_STORE;
  assign ram_wdata = '{max_edge: cfg_max, bin_num: cfg_bn, bin_width: cfg_bw, min_edge: cfg_me};

  // divider
  logic            div_en, div_valid;
  logic [BN_W-1:0] div_res;
  dth_divider #(.DATA_W(DATA_W), .RES_W(BN_W)) u_div (
    .clk      (clk),
    .rstn     (rstn),
    .enable   (div_en),
    .num      (sample - ram_rdata.min_edge),
    .den      (ram_rdata.bin_width),
    .res_valid(div_valid),
    .res      (div_res)
  );
  assign div_en = state == S_CHECK &&
                  sample >= ram_rdata.min_edge && sample < ram_rdata.max_edge;

  // sanitized parameters
  logic [DATA_W-1:0] san_bw;
  logic [BN_W-1:0]   san_bn;
  always_comb begin
    san_bw = (cfg_bw == '0) ? DATA_W'(1) : cfg_bw;
    if (cfg_bn == '0)                 san_bn = BN_W'(1);
    else if (cfg_bn > BN_W'(BN_MAX))  san_bn = BN_W'(BN_MAX);
    else                              san_bn = cfg_bn;
  end

  assign ready     = state == S_IDLE && !rst_pending;
  assign init_done = !init_phase;

  always_comb begin
    op_valid = 1'b0;
    op_code  = OP_READ_CFG;
    op_data  = '0;
    unique case (state)
      S_CFG_REQ: begin
        op_valid      = 1'b1;
        op_code       = OP_READ_CFG;
        op_data[23:16] = cur_hist;
        op_data[2:0]   = {1'b0, blk};
      end
      S_ERASE: begin
        op_valid       = 1'b1;
        op_code        = OP_ERASE;
        op_data[23:16] = cur_hist;
        op_data[11:0]  = cfg_bn + BN_W'(1);   // BN+2 bins, encoded minus one
      end
      S_FOUND: begin
        op_valid       = 1'b1;
        op_code        = OP_INC_BIN;
        op_data[23:16] = cur_hist;
        op_data[11:0]  = bin_idx;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state       <= S_START;
      init_phase  <= 1'b1;
      cur_hist    <= '0;
      blk         <= '0;
      cfg_me      <= '0;
      cfg_bw      <= '0;
      cfg_bn      <= '0;
      cfg_max     <= '0;
      sample      <= '0;
      bin_idx     <= '0;
      rst_pending <= 1'b0;
      rst_idx     <= '0;
    end else begin
      if (hist_rst) begin
        rst_pending <= 1'b1;
        rst_idx     <= hist_rst_idx;
      end
      unique case (state)
        S_START:
          state <= S_CFG_REQ;
        S_CFG_REQ:
          if (op_ready) state <= S_CFG_WAIT;
        S_CFG_WAIT:
          if (op_rvalid) begin
            unique case (blk)
              2'd0:    cfg_me <= op_rdata;
              2'd1:    cfg_bw <= op_rdata;
              default: cfg_bn <= op_rdata[BN_W-1:0];
            endcase
            if (blk == 2'd2) begin
              blk   <= '0;
              state <= S_SANITIZE;
            end else begin
              blk   <= blk + 1'b1;
              state <= S_CFG_REQ;
            end
          end
        S_SANITIZE: begin
          cfg_bw  <= san_bw;
          cfg_bn  <= san_bn;
          cfg_max <= cfg_me + DATA_W'(san_bw * DATA_W'(san_bn));
          state   <= S_STORE;
        end
        S_STORE:
          state <= S_ERASE;
        S_ERASE:
          if (op_ready) begin
            if (init_phase && cur_hist != HIST_W'(NUM_HIST - 1)) begin
              cur_hist <= cur_hist + 1'b1;
              state    <= S_CFG_REQ;
            end else begin
              init_phase <= 1'b0;
              state      <= S_IDLE;
            end
          end
        S_IDLE:
          if (rst_pending) begin
            // a reset request arriving in this very cycle is kept for later
            rst_pending <= hist_rst;
            cur_hist    <= rst_idx;
            if (hist_rst) rst_idx <= hist_rst_idx;
            state       <= S_CFG_REQ;
          end else if (data_valid) begin
            cur_hist <= data_idx;
            sample   <= data;
            state    <= S_LOOKUP;
          end
        S_LOOKUP:
          state <= S_CHECK;
        S_CHECK:
          if (sample < ram_rdata.min_edge) begin
            bin_idx <= ram_rdata.bin_num;
            state   <= S_FOUND;
          end else if (sample >= ram_rdata.max_edge) begin
            bin_idx <= ram_rdata.bin_num + BN_W'(1);
            state   <= S_FOUND;
          end else begin
            state   <= S_DIVIDE;
          end
        S_DIVIDE:
          if (div_valid) begin
            bin_idx <= div_res;
            state   <= S_FOUND;
          end
        S_FOUND:
          if (op_ready) state <= S_IDLE;
        default:
          state <= S_IDLE;
      endcase
    end
  end

  // OP protocol: the manager holds its request until it is taken.
  a_op_hold: assert property (@(posedge clk) disable iff (!rstn)
      op_valid && !op_ready |=> op_valid && $stable(op_code) && $stable(op_data));

endmodule
