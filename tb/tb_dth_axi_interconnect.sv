// tb_dth_axi_interconnect: self-checking test of the two-manager AXI sharer.
//
// Two testbench managers run at the same time against one HBM model through the
// interconnect. Each owns its own address range and repeatedly writes bursts of random
// words (1..16 beats) and reads them back, comparing with what it wrote; a few reads
// go to words the other manager never touches. The test also counts, and requires,
//   - contention: both managers raising AR (or AW) valid in the same cycle,
//   - alternation: after contention the grant goes to the manager that waited,
//   - overlap: one manager's read burst in flight while the other's write is.
module tb_dth_axi_interconnect;
  import dth_pkg::*;

  logic     clk = 1'b0, rstn;
  axi_req_t s_req [2];
  axi_rsp_t s_rsp [2];
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  int checks = 0, failures = 0;
  int contention = 0, overlap = 0, done_mgr = 0;

  always #2 clk = !clk;

  dth_axi_interconnect dut (.*);
  hbm_model #(.READ_LAT(5)) u_hbm (.clk(clk), .req(m_req), .rsp(m_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rstn) begin
    if (s_req[0].ar_valid && s_req[1].ar_valid) contention++;
    if (s_req[0].aw_valid && s_req[1].aw_valid) contention++;
    if ((dut.r_busy && dut.w_busy && dut.r_owner != dut.w_owner)) overlap++;
  end

  task automatic write_burst(input int m, input longint unsigned word, input int beats,
                             ref logic [HBM_DW-1:0] data [16]);
    @(posedge clk); #1;
    s_req[m].aw_valid = 1; s_req[m].aw_addr = HBM_AW'(word << 5); s_req[m].aw_len = 4'(beats - 1);
    s_req[m].aw_size = AXI_SIZE_32B; s_req[m].aw_burst = AXI_BURST_INCR;
    s_req[m].w_strb = '1;
    fork
      begin
        @(posedge clk);
        while (!s_rsp[m].aw_ready) @(posedge clk);
        #1 s_req[m].aw_valid = 0;
      end
      begin
        for (int b = 0; b < beats; b++) begin
          s_req[m].w_valid = 1; s_req[m].w_data = data[b]; s_req[m].w_last = b == beats - 1;
          @(posedge clk);
          while (!s_rsp[m].w_ready) @(posedge clk);
          #1;
        end
        s_req[m].w_valid = 0;
      end
    join
    s_req[m].b_ready = 1;
    @(posedge clk);
    while (!s_rsp[m].b_valid) @(posedge clk);
    #1 s_req[m].b_ready = 0;
  endtask

  task automatic read_burst(input int m, input longint unsigned word, input int beats,
                            ref logic [HBM_DW-1:0] data [16]);
    int b;
    @(posedge clk); #1;
    s_req[m].ar_valid = 1; s_req[m].ar_addr = HBM_AW'(word << 5); s_req[m].ar_len = 4'(beats - 1);
    s_req[m].ar_size = AXI_SIZE_32B; s_req[m].ar_burst = AXI_BURST_INCR;
    @(posedge clk);
    while (!s_rsp[m].ar_ready) @(posedge clk);
    #1 s_req[m].ar_valid = 0;
    s_req[m].r_ready = 1;
    b = 0;
    while (1) begin
      @(posedge clk);
      if (s_rsp[m].r_valid) begin
        if (b < 16) data[b] = s_rsp[m].r_data;
        check(s_rsp[m].r_last == (b == beats - 1), $sformatf("manager %0d: RLAST at beat %0d of %0d", m, b, beats));
        b++;
        if (s_rsp[m].r_last) break;
      end
    end
    #1 s_req[m].r_ready = 0;
  endtask

  task automatic manager(input int m);
    logic [HBM_DW-1:0] wd [16], rd [16];
    for (int i = 0; i < 60; i++) begin
      longint unsigned word;
      int beats;
      word  = longint'(m) * 100000 + longint'($urandom_range(0, 2000));
      beats = $urandom_range(1, 16);
      for (int b = 0; b < 16; b++) wd[b] = {8{$urandom}};
      write_burst(m, word, beats, wd);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      read_burst(m, word, beats, rd);
      for (int b = 0; b < beats; b++)
        check(rd[b] == wd[b], $sformatf("manager %0d: word %0d beat %0d read back wrong", m, word, b));
      if (i % 10 == 0) begin
        read_burst(m, 500000 + longint'(m), 1, rd);
        check(rd[0] == '0, $sformatf("manager %0d: untouched word not zero", m));
      end
    end
    done_mgr++;
  endtask

  // grant alternation: both valid while the read side is idle -> the other one wins
  int alt_checked = 0;
  always @(posedge clk) if (rstn && !dut.r_busy && s_req[0].ar_valid && s_req[1].ar_valid) begin
    logic last;
    last = dut.r_last_owner;
    #1;
    check(dut.r_owner == !last, "read grant did not alternate");
    alt_checked++;
  end

  initial begin
    rstn = 0;
    for (int m = 0; m < 2; m++) s_req[m] = '0;
    repeat (3) @(negedge clk);
    rstn = 1;
    fork
      manager(0);
      manager(1);
    join
    check(contention > 0, "the managers never competed");
    check(overlap > 0, "read and write never overlapped");
    check(alt_checked > 0, "alternation never exercised");
    $display("contention=%0d overlap=%0d alternation=%0d", contention, overlap, alt_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
