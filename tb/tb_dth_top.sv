// tb_dth_top: end-to-end test of the histogram monitor at its full size
// (24 lines, 8 histograms per line, 512-deep FIFOs, 256 histograms of up to 4096 bins).
//
// Everything goes through the ports, as the control processor and the detector links
// would use them: usr_clk 100 MHz, axi_clk 250 MHz, one HBM model on the AXI port.
//   1. reset; poll the status word until initialization is done;
//   2. write the configuration word of every histogram with HBM writes (five user
//      writes each), fill their bins with garbage, and read some configurations back;
//   3. toggle reset of all histograms: on, status shows it, off, wait for init done;
//   4. traffic on random lines with underflow, overflow and in-range samples while the
//      processor reads counters back (both AXI managers active at once);
//   5. overload: all 24 lines at full rate, so the aggregator FIFO fills and the unit
//      FIFOs overflow; the processing interval (clocks between two `ready` pulses of
//      the binning engine with its input FIFO almost full) is measured and must stay
//      under the 62 clocks per sample the original design reaches on real HBM;
//   6. single-histogram reset with a new configuration, then traffic to it.
// Expected counts are kept here for every sample that enters a unit FIFO. They are
// compared with the counters read back through the user interface (a sample of
// histograms) and with the whole HBM model (all histograms, all bins in use).
// Each mechanism is counted and must have happened at least once.
module tb_dth_top;
  import dth_pkg::*;

  localparam int FUNC_W = 256;
  localparam int F_RD   = 'hA0;
  localparam int F_WR   = 'hA1;
  localparam int F_CTRL = 'hA2;

  logic                             axi_clk = 1'b0, usr_clk = 1'b0, usr_rst_n;
  logic [FUNC_W-1:0]                usr_func_wr, usr_func_rd;
  logic                             usr_wren, usr_rden, usr_rd_val;
  logic [63:0]                      usr_data_wr, usr_data_rd;
  logic [N_UNITS-1:0]               hist_data_valid;
  logic [N_UNITS-1:0][DATA_W-1:0]   hist_data;
  logic [N_UNITS-1:0][SUB_W-1:0]    hist_data_idx;
  axi_req_t                         axi_req;
  axi_rsp_t                         axi_rsp;
  int checks = 0, failures = 0;

  always #2 axi_clk = !axi_clk;
  always #5 usr_clk = !usr_clk;

  dth_top dut (.*);
  hbm_model u_hbm (.clk(axi_clk), .req(axi_req), .rsp(axi_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #60000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- user interface
  logic [63:0] answers [$];
  always @(posedge usr_clk) if (usr_rst_n && usr_rd_val) answers.push_back(usr_data_rd);

  // one user-interface access at a time
  semaphore ui = new(1);

  task automatic uwrite(input int f, input logic [63:0] d);
    @(negedge usr_clk);
    usr_func_wr = '0; usr_func_wr[f] = 1'b1; usr_wren = 1'b1; usr_data_wr = d;
    @(negedge usr_clk);
    usr_wren = 1'b0; usr_func_wr = '0;
  endtask

  task automatic urden(input int f);
    @(negedge usr_clk);
    usr_func_rd = '0; usr_func_rd[f] = 1'b1; usr_rden = 1'b1;
    @(negedge usr_clk);
    usr_rden = 1'b0; usr_func_rd = '0;
  endtask

  task automatic wait_answers(input int n);
    int t = 0;
    while (answers.size() < n && t < 5000) begin @(negedge usr_clk); t++; end
  endtask

  function automatic longint unsigned wordof(input int h, input int w);
    return longint'(h) * WORDS_PER_HIST + longint'(w);
  endfunction

  int n_status = 0, n_hbm_wr = 0, n_hbm_rd = 0;

  task automatic hbm_write(input longint unsigned word, input logic [HBM_DW-1:0] d);
    ui.get();
    uwrite(F_WR, 64'(word << 5));
    for (int q = 0; q < 4; q++) uwrite(F_WR, d[64*q +: 64]);
    n_hbm_wr++;
    ui.put();
  endtask

  // read n (1..64) 64-bit quarters starting at an HBM word
  task automatic hbm_read(input longint unsigned word, input int n, output logic [63:0] q [$]);
    ui.get();
    answers.delete();
    uwrite(F_RD, {25'd0, 6'(n - 1), HBM_AW'(word << 5)});
    for (int i = 0; i < n; i++) urden(F_RD);
    wait_answers(n);
    check(answers.size() == n, $sformatf("HBM read of %0d quarters gave %0d", n, answers.size()));
    q = answers;
    answers.delete();
    n_hbm_rd++;
    ui.put();
  endtask

  task automatic status(output logic [63:0] s);
    ui.get();
    answers.delete();
    urden(F_CTRL);
    wait_answers(1);
    check(answers.size() == 1, "status read not answered");
    s = answers.size() > 0 ? answers[0] : '0;
    answers.delete();
    n_status++;
    ui.put();
  endtask

  task automatic ctrl(input logic [63:0] d);
    ui.get();
    uwrite(F_CTRL, d);
    ui.put();
  endtask

  task automatic wait_init_done();
    logic [63:0] s;
    int t = 0;
    do begin
      repeat (200) @(negedge usr_clk);
      status(s);
      t++;
    end while (!s[0] && t < 2000);
    check(s[0] == 1'b1, "initialization never reported done");
    // the last erase may still be in flight
    repeat (100) @(negedge usr_clk);
  endtask

  // ---------------------------------------------------------------- histograms
  logic [31:0] me [256], bw [256];
  logic [11:0] bn [256];
  longint unsigned exp_cnt [256][4096];

  function automatic logic [11:0] s_bn(input int h);
    return bn[h] == 0 ? 12'd1 : (bn[h] == 12'hFFF ? 12'd4094 : bn[h]);
  endfunction
  function automatic logic [31:0] s_bw(input int h);
    return bw[h] == 0 ? 32'd1 : bw[h];
  endfunction
  function automatic logic [31:0] max_edge(input int h);
    return me[h] + s_bw(h) * 32'(s_bn(h));
  endfunction
  function automatic int ref_bin(input int h, input logic [31:0] d);
    if (d < me[h]) return int'(s_bn(h));
    if (d >= max_edge(h)) return int'(s_bn(h)) + 1;
    return int'((d - me[h]) / s_bw(h));
  endfunction

  function automatic logic [31:0] rand_sample(input int h);
    int kind;
    kind = $urandom_range(0, 4);
    case (kind)
      0:       return (me[h] == 0) ? 32'd0 : $urandom_range(0, me[h] - 1);
      1:       return max_edge(h) + $urandom_range(0, 1000);
      default: return me[h] + $urandom_range(0, s_bw(h) * 32'(s_bn(h)) - 1);
    endcase
  endfunction

  task automatic new_cfg(input int h);
    me[h] = $urandom_range(0, 100000);
    bw[h] = $urandom_range(1, 3000);
    bn[h] = 12'($urandom_range(1, 60));
  endtask

  task automatic write_cfg(input int h);
    hbm_write(wordof(h, 0), {{160{1'b0}}, {20'($urandom), bn[h]}, bw[h], me[h]});
    for (int w = 1; w <= (int'(s_bn(h)) + 2 + 3) / 4; w++) u_hbm.poke(wordof(h, w), {8{$urandom}});
    for (int b = 0; b < 4096; b++) exp_cnt[h][b] = 0;
  endtask

  // ---------------------------------------------------------------- monitors
  int accepted = 0, dropped = 0, n_under = 0, n_over = 0, n_div = 0;
  always @(posedge usr_clk) if (usr_rst_n) begin
    for (int u = 0; u < N_UNITS; u++) if (hist_data_valid[u]) begin
      if (dut.u_hwe.uf_full[u]) dropped++;
      else begin
        int h, b;
        h = u * 8 + int'(hist_data_idx[u]);
        b = ref_bin(h, hist_data[u]);
        exp_cnt[h][b]++;
        accepted++;
        if (b == int'(s_bn(h))) n_under++;
        else if (b == int'(s_bn(h)) + 1) n_over++;
        else n_div++;
      end
    end
  end

  int incs = 0, agg_full = 0, contention = 0, single_resets = 0, toggle_resets = 0;
  int ready_gaps = 0; longint gap_sum = 0, last_ready = -1, cyc = 0;
  bit measure = 0;
  logic he_ready_q = 1'b0;   // only rising edges of ready count
  always @(posedge axi_clk) he_ready_q <= dut.u_hwe.he_ready;
  always @(posedge axi_clk) begin
    cyc++;
    if (dut.u_hwe.op_valid && dut.u_hwe.op_ready && dut.u_hwe.op_code == OP_INC_BIN) incs++;
    if (dut.u_hwe.ag_full) agg_full++;
    if ((dut.mgr_req[0].ar_valid && dut.mgr_req[1].ar_valid) ||
        (dut.mgr_req[0].aw_valid && dut.mgr_req[1].aw_valid)) contention++;
    if (dut.rstn_axi && dut.single_pulse) single_resets++;
    // processing interval: rising edges of the engine's ready, input FIFO almost full
    if (dut.u_hwe.he_ready && !he_ready_q && !dut.u_hwe.u_he.init_phase) begin
      if (measure && last_ready >= 0 && dut.u_hwe.u_agg.count > 400) begin
        gap_sum += cyc - last_ready;
        ready_gaps++;
      end
      last_ready = cyc;
    end
  end

  task automatic drain();
    int t = 0;
    while (incs < accepted && t < 2000000) begin @(posedge axi_clk); t++; end
    repeat (100) @(posedge axi_clk);
    check(incs == accepted, $sformatf("%0d samples accepted but %0d increments", accepted, incs));
  endtask

  task automatic compare_model(input string phase);
    int bad = 0;
    for (int h = 0; h < 256; h++)
      for (int b = 0; b <= int'(s_bn(h)) + 1; b++) begin
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

  // counters of histogram h read back through the user interface
  task automatic compare_ui(input int h, input string phase);
    logic [63:0] q [$];
    int nb;
    nb = int'(s_bn(h)) + 2;
    if (nb > 64) nb = 64;
    hbm_read(wordof(h, 1), nb, q);
    for (int b = 0; b < nb && b < q.size(); b++)
      check(q[b] == exp_cnt[h][b], $sformatf("%s: histogram %0d bin %0d read back %0d, expected %0d", phase, h, b, q[b], exp_cnt[h][b]));
  endtask

  task automatic send_light(input int n);
    for (int i = 0; i < n; i++) begin
      int u;
      @(negedge usr_clk);
      u = $urandom_range(0, N_UNITS - 1);
      hist_data_idx[u]   = 3'($urandom);
      hist_data[u]       = rand_sample(u * 8 + int'(hist_data_idx[u]));
      hist_data_valid[u] = 1'b1;
      @(negedge usr_clk);
      hist_data_valid = '0;
      repeat ($urandom_range(12, 30)) @(negedge usr_clk);
    end
  endtask

  task automatic send_flood(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge usr_clk);
      for (int u = 0; u < N_UNITS; u++) begin
        hist_data_idx[u]   = 3'($urandom);
        hist_data[u]       = rand_sample(u * 8 + int'(hist_data_idx[u]));
        hist_data_valid[u] = 1'b1;
      end
    end
    @(negedge usr_clk);
    hist_data_valid = '0;
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [63:0] s, q [$];
    automatic int sanitized = 0;
    usr_rst_n = 0; usr_func_wr = '0; usr_func_rd = '0; usr_wren = 0; usr_rden = 0; usr_data_wr = '0;
    hist_data_valid = '0; hist_data = '0; hist_data_idx = '0;
    repeat (5) @(negedge usr_clk);
    usr_rst_n = 1;

    // 1. reset and first initialization (empty memory: every histogram sanitized)
    wait_init_done();

    // 2. configuration through the user interface
    for (int h = 0; h < 256; h++) new_cfg(h);
    bw[3] = 0;  bn[3] = 0;                           // sanitized to BW 1, BN 1
    bw[11] = 5; bn[11] = 12'hFFF;                   // sanitized to BN 4094
    bw[200] = 0; bn[200] = 12'd7;                    // sanitized to BW 1
    for (int h = 0; h < 256; h++) begin
      write_cfg(h);
      if (bw[h] == 0 || bn[h] == 0 || bn[h] == 12'hFFF) sanitized++;
    end
    repeat (20) @(negedge usr_clk);
    foreach (me[h]) if (h % 37 == 0) begin
      hbm_read(wordof(h, 0), 2, q);
      check(q.size() == 2 && q[0] == {bw[h], me[h]} && q[1][11:0] == bn[h],
            $sformatf("configuration of histogram %0d read back wrong", h));
    end

    // 3. toggle reset of all histograms
    ctrl(64'h2);
    repeat (20) @(negedge usr_clk);
    status(s);
    check(s[1:0] == 2'b10, $sformatf("status during the toggle reset is %b", s[1:0]));
    ctrl(64'h0);
    toggle_resets++;
    wait_init_done();
    compare_model("after toggle reset");

    // 4. traffic with counter reads in parallel
    fork
      send_light(1500);
      begin
        for (int i = 0; i < 40; i++) begin
          logic [63:0] qq [$];
          int h;
          h = $urandom_range(0, 255);
          hbm_read(wordof(h, 1 + $urandom_range(0, 10)), $urandom_range(1, 64), qq);
          repeat ($urandom_range(50, 300)) @(negedge usr_clk);
        end
      end
    join
    drain();
    check(dropped == 0, "samples dropped under light traffic");
    compare_model("traffic");
    for (int h = 0; h < 256; h += 17) compare_ui(h, "traffic");
    compare_ui(3, "traffic");

    // 5. overload
    measure = 1;
    send_flood(700);
    drain();
    measure = 0;
    compare_model("overload");
    for (int h = 5; h < 256; h += 25) compare_ui(h, "overload");
    compare_ui(11, "overload");

    // 6. single-histogram reset of histogram 130 (line 16, sub-index 2)
    new_cfg(130);
    write_cfg(130);
    ctrl({40'd0, 8'd130, 15'd0, 1'b1});
    repeat (300) @(negedge usr_clk);
    compare_ui(130, "single reset");
    for (int i = 0; i < 50; i++) begin
      @(negedge usr_clk);
      hist_data_idx[16] = 3'd2; hist_data[16] = rand_sample(130); hist_data_valid[16] = 1'b1;
      @(negedge usr_clk);
      hist_data_valid = '0;
      repeat (20) @(negedge usr_clk);
    end
    drain();
    compare_ui(130, "after single reset");
    compare_model("end");

    // ---- mechanisms ----
    $display("samples: accepted %0d (underflow %0d, overflow %0d, divided %0d), dropped %0d",
             accepted, n_under, n_over, n_div, dropped);
    $display("aggregator FIFO full: %0d clocks; AXI contention: %0d clocks", agg_full, contention);
    $display("resets: toggle %0d, single %0d; sanitized configurations %0d", toggle_resets, single_resets, sanitized);
    $display("user interface: %0d HBM writes, %0d HBM reads, %0d status reads", n_hbm_wr, n_hbm_rd, n_status);
    if (ready_gaps > 0)
      $display("processing interval under load: %0d.%02d clocks average over %0d samples",
               gap_sum / longint'(ready_gaps), (gap_sum * 100 / longint'(ready_gaps)) % 100, ready_gaps);
    check(n_under > 0 && n_over > 0 && n_div > 0, "not every kind of bin was hit");
    check(dropped > 0, "no unit FIFO overflow");
    check(agg_full > 0, "the aggregator FIFO never filled");
    check(contention > 0, "the two AXI managers never competed");
    check(toggle_resets > 0 && single_resets == 1, "resets not exercised as expected");
    check(sanitized == 3, "sanitized configurations missing");
    check(ready_gaps > 100, "processing interval not measured");
    // the original design needs about 62 clocks per sample on real HBM; with this
    // model's shorter latency the interval must be well below that
    check(ready_gaps > 0 && gap_sum < 62 * longint'(ready_gaps), "processing interval above 62 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
