// dth_axi_interconnect: two-manager to one-subordinate AXI sharer (the "AXI interconnector").
//
// The HBM pseudo channel is used both by the histogram memory engine and by the
// software access path. This block lets the two share it without either noticing:
// each manager sees an ordinary AXI subordinate.
//
// How it works: the read side (AR/R) and the write side (AW/W/B) have independent
// arbiters, so one manager may read while the other writes. An idle side grants the
// next manager whose AR (or AW) valid is high, checking first the manager that did not
// have the previous grant (alternating priority, as the document describes). From the
// clock after the grant the owner's channels are wired straight to the subordinate.
// One address handshake is passed per grant; the grant ends with the last read beat
// (R valid, ready and last) or with the write response handshake (B valid and ready).
// A manager that is not granted keeps its valid high and waits.
// Timing: one cycle of arbitration latency per transaction. Both managers must issue
// one transaction at a time (both in this design do).
// Data, address and response fields are not registered: read data and the B response
// go to both managers and only the valid bits are steered, so most outputs are plain
// copies of inputs.
module dth_axi_interconnect
  import dth_pkg::*;
(
  input  logic     clk,
  input  logic     rstn,
  input  axi_req_t s_req [2],
  output axi_rsp_t s_rsp [2],
  output axi_req_t m_req,
  input  axi_rsp_t m_rsp
);

  logic r_busy, r_owner, r_last_owner, ar_sent;
  logic w_busy, w_owner, w_last_owner, aw_sent;

  // manager that would be granted now: the other one first
  logic r_pick, w_pick;
  always_comb begin
    r_pick = s_req[!r_last_owner].ar_valid ? !r_last_owner : r_last_owner;
    w_pick = s_req[!w_last_owner].aw_valid ? !w_last_owner : w_last_owner;
  end

  logic r_req_any, w_req_any;
  assign r_req_any = s_req[0].ar_valid || s_req[1].ar_valid;
  assign w_req_any = s_req[0].aw_valid || s_req[1].aw_valid;

  logic r_end, w_end;
  assign r_end = r_busy && m_rsp.r_valid && m_rsp.r_last && s_req[r_owner].r_ready;
  assign w_end = w_busy && m_rsp.b_valid && s_req[w_owner].b_ready;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      r_busy       <= 1'b0;
      r_owner      <= 1'b0;
      r_last_owner <= 1'b1;
      ar_sent      <= 1'b0;
      w_busy       <= 1'b0;
      w_owner      <= 1'b0;
      w_last_owner <= 1'b1;
      aw_sent      <= 1'b0;
    end else begin
      // read side
      if (!r_busy) begin
        if (r_req_any) begin
          r_busy       <= 1'b1;
          r_owner      <= r_pick;
          r_last_owner <= r_pick;
          ar_sent      <= 1'b0;
        end
      end else begin
        if (m_req.ar_valid && m_rsp.ar_ready) ar_sent <= 1'b1;
        if (r_end) r_busy <= 1'b0;
      end
      // write side
      if (!w_busy) begin
        if (w_req_any) begin
          w_busy       <= 1'b1;
          w_owner      <= w_pick;
          w_last_owner <= w_pick;
          aw_sent      <= 1'b0;
        end
      end else begin
        if (m_req.aw_valid && m_rsp.aw_ready) aw_sent <= 1'b1;
        if (w_end) w_busy <= 1'b0;
      end
    end
  end

  always_comb begin
    axi_req_t rq, wq;
    rq = s_req[r_owner];
    wq = s_req[w_owner];
    m_req = '0;
    // read side from the read owner
    m_req.ar_addr  = rq.ar_addr;
    m_req.ar_len   = rq.ar_len;
    m_req.ar_size  = rq.ar_size;
    m_req.ar_burst = rq.ar_burst;
    m_req.ar_valid = r_busy && !ar_sent && rq.ar_valid;
    m_req.r_ready  = r_busy && rq.r_ready;
    // write side from the write owner
    m_req.aw_addr  = wq.aw_addr;
    m_req.aw_len   = wq.aw_len;
    m_req.aw_size  = wq.aw_size;
    m_req.aw_burst = wq.aw_burst;
    m_req.aw_valid = w_busy && !aw_sent && wq.aw_valid;
    m_req.w_data   = wq.w_data;
    m_req.w_strb   = wq.w_strb;
    m_req.w_last   = wq.w_last;
    m_req.w_valid  = w_busy && wq.w_valid;
    m_req.b_ready  = w_busy && wq.b_ready;

    for (int i = 0; i < 2; i++) begin
      s_rsp[i] = '0;
      s_rsp[i].r_data = m_rsp.r_data;
      s_rsp[i].r_resp = m_rsp.r_resp;
      s_rsp[i].r_last = m_rsp.r_last;
      s_rsp[i].b_resp = m_rsp.b_resp;
      if (r_busy && r_owner == 1'(i)) begin
        s_rsp[i].ar_ready = !ar_sent && m_rsp.ar_ready;
        s_rsp[i].r_valid  = m_rsp.r_valid;
      end
      if (w_busy && w_owner == 1'(i)) begin
        s_rsp[i].aw_ready = !aw_sent && m_rsp.aw_ready;
        s_rsp[i].w_ready  = m_rsp.w_ready;
        s_rsp[i].b_valid  = m_rsp.b_valid;
      end
    end
  end

endmodule
