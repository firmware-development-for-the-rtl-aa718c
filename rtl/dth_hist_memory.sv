// dth_hist_memory: memory engine of the histogram monitor (the "histogram memory entity").
//
// OP-protocol subordinate that owns the HBM layout and turns histogram operations into
// AXI transactions on one HBM pseudo channel. Histogram h occupies WORDS_PER_HIST = 1025
// consecutive 256-bit words starting at word BASE_WORD + 1025*h: word 0 is the
// configuration (bits 31:0 min edge, 63:32 bin width, 75:64 bins number), words 1..1024
// hold the 64-bit bin counters, four per word, bin b in word 1 + b/4 at bits
// [64*(b%4) +: 64]. Byte address = 32 * word.
//
// Operations (taken with op_valid && op_ready, op_ready then low until done):
//   OP_READ_CFG  one-beat read of the configuration word; the 32-bit block
//                op_data[2:0] is returned on op_rdata with a one-cycle op_rvalid.
//   OP_INC_BIN   read-modify-write of the word holding bin op_data[11:0]: one-beat
//                read, add 1 to the 64-bit lane, one-beat write, wait for B.
//   OP_ERASE     write zeros over bins 0..op_data[11:0], i.e. w = op_data[11:0]/4 + 1
//                words from word 1, in INCR bursts of min(16, remaining) beats, each
//                burst waiting for its B response before the next.
// The histogram index is op_data[23:16] for all three. These follow the document; the
// base word (0) and the choice to wait for every B response before accepting the next
// operation are this design's. Bursts are not split at 4 KB boundaries, as in the
// document: HBM ports accept that, a generic AXI subordinate may not. Error responses
// are ignored.
// Every beat is a full 32-byte word, so AxSIZE, AxBURST (INCR), WSTRB (all ones) and the
// five low address bits are constants.
module dth_hist_memory
  import dth_pkg::*;
#(
  parameter logic [HBM_AW-1:0] BASE_WORD = '0,
  parameter int unsigned       MAX_BURST = 16
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic        op_valid,
  input  op_code_e    op_code,
  input  logic [31:0] op_data,
  output logic        op_ready,
  output logic        op_rvalid,
  output logic [31:0] op_rdata,
  output axi_req_t    axi_req,
  input  axi_rsp_t    axi_rsp
);

  typedef enum logic [2:0] {
    M_IDLE,    // op_ready
    M_AR,      // read address
    M_R,       // read data
    M_RESP,    // configuration block response
    M_BURST,   // erase: set up the next burst or finish
    M_WR,      // write address + data
    M_B        // write response
  } state_e;

  state_e            state;
  op_code_e          code_q;
  logic [HIST_W-1:0] hist_q;
  logic [BN_W-1:0]   arg_q;       // bin index or bins-to-erase minus one
  logic [HBM_DW-1:0] word_q;      // word read, later the word to write
  logic [BN_W-1:0]   words_left;  // erase: words still to clear
  logic [BN_W-1:0]   wr_word;     // word offset of the current write
  logic [3:0]        wr_len;      // beats - 1 of the current write
  logic [3:0]        beat;        // write beats sent
  logic              aw_done, w_done;

  logic [BN_W-1:0] bin_word;
  assign bin_word = BN_W'(1) + BN_W'(arg_q >> 2);

  logic [BN_W-1:0] rd_word;
  assign rd_word = (code_q == OP_READ_CFG) ? '0 : bin_word;

  // read word with the selected 64-bit counter incremented (OP_INC_BIN)
  logic [HBM_DW-1:0] inc_word;
  always_comb begin
    inc_word = axi_rsp.r_data;
    inc_word[CNT_W*arg_q[1:0] +: CNT_W] = axi_rsp.r_data[CNT_W*arg_q[1:0] +: CNT_W] + CNT_W'(1);
  end

  // beats of the next erase burst
  logic [BN_W-1:0] burst_words;
  assign burst_words = (words_left > BN_W'(MAX_BURST)) ? BN_W'(MAX_BURST) : words_left;

  logic aw_hs, w_hs;
  assign aw_hs = axi_req.aw_valid && axi_rsp.aw_ready;
  assign w_hs  = axi_req.w_valid && axi_rsp.w_ready;

  assign op_ready = state == M_IDLE;

  always_comb begin
    axi_req          = '0;
    axi_req.aw_size  = AXI_SIZE_32B;
    axi_req.aw_burst = AXI_BURST_INCR;
    axi_req.ar_size  = AXI_SIZE_32B;
    axi_req.ar_burst = AXI_BURST_INCR;
    axi_req.w_strb   = '1;
    axi_req.ar_addr  = hist_word_addr(BASE_WORD, hist_q, rd_word);
    axi_req.ar_len   = '0;
    axi_req.ar_valid = state == M_AR;
    axi_req.r_ready  = state == M_R;
    axi_req.aw_addr  = hist_word_addr(BASE_WORD, hist_q, wr_word);
    axi_req.aw_len   = wr_len;
    axi_req.aw_valid = state == M_WR && !aw_done;
    axi_req.w_valid  = state == M_WR && !w_done;
    axi_req.w_data   = (code_q == OP_ERASE) ? '0 : word_q;
    axi_req.w_last   = beat == wr_len;
    axi_req.b_ready  = state == M_B;
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      state      <= M_IDLE;
      code_q     <= OP_READ_CFG;
      hist_q     <= '0;
      arg_q      <= '0;
      word_q     <= '0;
      words_left <= '0;
      wr_word    <= '0;
      wr_len     <= '0;
      beat       <= '0;
      aw_done    <= 1'b0;
      w_done     <= 1'b0;
      op_rvalid  <= 1'b0;
      op_rdata   <= '0;
    end else begin
      op_rvalid <= 1'b0;
      unique case (state)
        M_IDLE:
          if (op_valid) begin
            code_q <= op_code;
            hist_q <= op_data[23:16];
            arg_q  <= op_data[BN_W-1:0];
            if (op_code == OP_ERASE) begin
              words_left <= BN_W'(op_data[BN_W-1:2]) + BN_W'(1);
              wr_word    <= BN_W'(1);
              state      <= M_BURST;
            end else begin
              state      <= M_AR;
            end
          end
        M_AR:
          if (axi_rsp.ar_ready) state <= M_R;
        M_R:
          if (axi_rsp.r_valid) begin
            word_q <= (code_q == OP_INC_BIN) ? inc_word : axi_rsp.r_data;
            if (axi_rsp.r_last) begin
              if (code_q == OP_READ_CFG) begin
                state <= M_RESP;
              end else begin
                wr_word <= bin_word;
                wr_len  <= '0;
                beat    <= '0;
                aw_done <= 1'b0;
                w_done  <= 1'b0;
                state   <= M_WR;
              end
            end
          end
        M_RESP: begin
          op_rvalid <= 1'b1;
          op_rdata  <= word_q[32*arg_q[2:0] +: 32];
          state     <= M_IDLE;
        end
        M_BURST:
          if (words_left == '0) begin
            state <= M_IDLE;
          end else begin
            wr_len     <= 4'(burst_words - BN_W'(1));
            words_left <= words_left - burst_words;
            beat       <= '0;
            aw_done    <= 1'b0;
            w_done     <= 1'b0;
            state      <= M_WR;
          end
        M_WR: begin
          if (aw_hs) aw_done <= 1'b1;
          if (w_hs) begin
            if (beat == wr_len) w_done <= 1'b1;
            else                beat   <= beat + 1'b1;
          end
          if ((aw_done || aw_hs) && (w_done || (w_hs && beat == wr_len)))
            state <= M_B;
        end
        M_B:
          if (axi_rsp.b_valid) begin
            if (code_q == OP_ERASE) begin
              wr_word <= wr_word + BN_W'(wr_len) + BN_W'(1);
              state   <= M_BURST;
            end else begin
              state   <= M_IDLE;
            end
          end
        default:
          state <= M_IDLE;
      endcase
    end
  end

  // AXI: a raised valid stays up until its handshake.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rstn)
      axi_req.aw_valid && !axi_rsp.aw_ready |=> axi_req.aw_valid && $stable(axi_req.aw_addr));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rstn)
      axi_req.ar_valid && !axi_rsp.ar_ready |=> axi_req.ar_valid && $stable(axi_req.ar_addr));

endmodule
