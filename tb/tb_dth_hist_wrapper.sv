// tb_dth_hist_wrapper: self-checking test of the 24-line data path into HBM histograms.
//
// The wrapper (with its binning and memory engines) runs against an HBM model that
// holds a random configuration for each of the 256 histograms. Input clock 100 MHz,
// AXI clock 250 MHz. The unit and aggregator FIFOs are made 16 deep so that the
// overload cases are reached quickly. Each sample written into a unit FIFO is binned
// here too; after the data path drains, every bin of every histogram is compared with
// the model memory. Phases:
//   1. initialization: all histograms erased (bins filled with garbage beforehand);
//   2. light traffic on random lines and sub-indices: nothing may be lost;
//   3. all 24 lines at full rate: unit FIFOs overflow (the dropped samples, seen here
//      as writes into a full FIFO, must not be counted) and the aggregator FIFO fills;
//   4. single-histogram reset with a new configuration, then more traffic;
//   5. hist_rstn: every histogram is re-initialized and its bins cleared.
module tb_dth_hist_wrapper;
  import dth_pkg::*;

  localparam int NU = 24;

  logic                        axi_clk = 1'b0, wr_clk = 1'b0, rstn, hist_rstn;
  logic                        single_hist_rst;
  logic [HIST_W-1:0]           single_hist_rst_idx;
  logic [NU-1:0]               wr_data_valid;
  logic [NU-1:0][DATA_W-1:0]   wr_data;
  logic [NU-1:0][SUB_W-1:0]    wr_data_idx;
  logic                        init_done;
  axi_req_t                    axi_req;
  axi_rsp_t                    axi_rsp;
  int checks = 0, failures = 0;

  always #2 axi_clk = !axi_clk;
  always #5 wr_clk  = !wr_clk;

  dth_hist_wrapper #(.NUM_UNITS(NU), .UNIT_FIFO_DEPTH(16), .AGG_FIFO_DEPTH(16)) dut (.*);
  hbm_model #(.READ_LAT(4)) u_hbm (.clk(axi_clk), .req(axi_req), .rsp(axi_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #30000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // configuration of each histogram, as written in the model memory
  logic [31:0] me [256], bw [256];
  logic [11:0] bn [256];
  longint unsigned exp_cnt [256][4096];

  function automatic longint unsigned wordof(input int h, input int w);
    return longint'(h) * WORDS_PER_HIST + longint'(w);
  endfunction

  task automatic set_cfg(input int h);
    me[h] = $urandom_range(0, 1000);
    bw[h] = $urandom_range(1, 50);
    bn[h] = 12'($urandom_range(1, 40));
    u_hbm.poke(wordof(h, 0), {{160{1'b0}}, {20'($urandom), bn[h]}, bw[h], me[h]});
    for (int w = 1; w <= (int'(bn[h]) + 2 + 3) / 4; w++) u_hbm.poke(wordof(h, w), {8{$urandom}});
    for (int b = 0; b < 4096; b++) exp_cnt[h][b] = 0;
  endtask

  function automatic int ref_bin(input int h, input logic [31:0] d);
    if (d < me[h]) return int'(bn[h]);
    if (d >= me[h] + bw[h] * 32'(bn[h])) return int'(bn[h]) + 1;
    return int'((d - me[h]) / bw[h]);
  endfunction

  function automatic logic [31:0] rand_sample(input int h);
    return $urandom_range(0, me[h] + bw[h] * 32'(bn[h]) + 100);
  endfunction

  // count what enters the unit FIFOs and what is dropped
  int accepted = 0, dropped = 0, agg_full_cycles = 0, incs = 0;
  always @(posedge wr_clk) if (rstn) begin
    for (int u = 0; u < NU; u++) if (wr_data_valid[u]) begin
      if (dut.uf_full[u]) dropped++;
      else begin
        int h;
        h = u * 8 + int'(wr_data_idx[u]);
        exp_cnt[h][ref_bin(h, wr_data[u])]++;
        accepted++;
      end
    end
  end
  always @(posedge axi_clk) begin
    if (dut.ag_full) agg_full_cycles++;
    if (dut.op_valid && dut.op_ready && dut.op_code == OP_INC_BIN) incs++;
  end

  task automatic drain();
    int t = 0;
    while (incs < accepted && t < 200000) begin @(posedge axi_clk); t++; end
    repeat (60) @(posedge axi_clk);
    check(incs == accepted, $sformatf("%0d samples accepted but %0d increments", accepted, incs));
  endtask

  task automatic compare_all(input string phase);
    int bad = 0;
    for (int h = 0; h < 256; h++)
      for (int b = 0; b <= int'(bn[h]) + 1; b++) begin
        logic [HBM_DW-1:0] w;
        w = u_hbm.peek(wordof(h, 1 + b / 4));
        if (w[64*(b%4) +: 64] != exp_cnt[h][b]) begin
          if (bad < 10) $display("FAIL: %s: histogram %0d bin %0d holds %0d, expected %0d", phase, h, b, w[64*(b%4) +: 64], exp_cnt[h][b]);
          bad++;
        end
        checks++;
      end
    failures += bad;
  endtask

  task automatic send_light(input int n);
    for (int i = 0; i < n; i++) begin
      int u;
      @(negedge wr_clk);
      u = $urandom_range(0, NU - 1);
      wr_data_idx[u]   = 3'($urandom);
      wr_data[u]       = rand_sample(u * 8 + int'(wr_data_idx[u]));
      wr_data_valid[u] = 1'b1;
      @(negedge wr_clk);
      wr_data_valid = '0;
      repeat ($urandom_range(10, 25)) @(negedge wr_clk);
    end
  endtask

  task automatic send_flood(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge wr_clk);
      for (int u = 0; u < NU; u++) begin
        wr_data_idx[u]   = 3'($urandom);
        wr_data[u]       = rand_sample(u * 8 + int'(wr_data_idx[u]));
        wr_data_valid[u] = 1'b1;
      end
    end
    @(negedge wr_clk);
    wr_data_valid = '0;
  endtask

  task automatic wait_init();
    int t = 0;
    @(posedge axi_clk);
    while (!init_done && t < 400000) begin @(posedge axi_clk); t++; end
    check(init_done, "initialization did not finish");
    // init_done rises when the last erase is handed over; let it complete
    repeat (100) @(posedge axi_clk);
  endtask

  initial begin
    int d0;
    rstn = 0; hist_rstn = 1; single_hist_rst = 0; single_hist_rst_idx = 0;
    wr_data_valid = '0; wr_data = '0; wr_data_idx = '0;
    for (int h = 0; h < 256; h++) set_cfg(h);
    repeat (4) @(negedge wr_clk);
    rstn = 1;

    // 1. initialization
    wait_init();
    compare_all("after initialization");

    // 2. light traffic
    send_light(300);
    drain();
    check(dropped == 0, "samples dropped under light traffic");
    compare_all("light traffic");

    // 3. flood
    send_flood(60);
    drain();
    $display("flood: accepted %0d dropped %0d, aggregator full for %0d cycles", accepted, dropped, agg_full_cycles);
    check(dropped > 0, "unit FIFOs never overflowed");
    check(agg_full_cycles > 0, "aggregator FIFO never filled");
    compare_all("flood");

    // 4. single-histogram reset of histogram 77 (line 9, sub-index 5)
    set_cfg(77);
    @(negedge axi_clk);
    single_hist_rst = 1; single_hist_rst_idx = 8'd77;
    @(negedge axi_clk);
    single_hist_rst = 0;
    repeat (400) @(negedge axi_clk);
    compare_all("single reset");
    d0 = dropped;
    for (int i = 0; i < 40; i++) begin
      @(negedge wr_clk);
      wr_data_idx[9] = 3'd5; wr_data[9] = rand_sample(77); wr_data_valid[9] = 1'b1;
      @(negedge wr_clk);
      wr_data_valid = '0;
      repeat (20) @(negedge wr_clk);
    end
    drain();
    check(dropped == d0, "samples dropped after the single reset");
    compare_all("after single reset");

    // 5. reset of all histograms through hist_rstn
    for (int h = 0; h < 256; h++) set_cfg(h);
    @(negedge axi_clk);
    hist_rstn = 0;
    repeat (3) @(negedge axi_clk);
    check(!init_done, "init_done stayed high during hist_rstn");
    hist_rstn = 1;
    wait_init();
    compare_all("after hist_rstn");
    send_light(100);
    drain();
    compare_all("after hist_rstn traffic");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
