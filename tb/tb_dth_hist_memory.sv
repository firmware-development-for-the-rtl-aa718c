// tb_dth_hist_memory: self-checking test of the memory engine against an HBM model.
//
// Drives the OP protocol as the binning engine would and inspects the model memory:
//   - configuration reads: every 32-bit block of random configuration words comes back
//     on op_rdata with a single op_rvalid pulse;
//   - erase: bins 0..N of a histogram whose words were filled with garbage become zero,
//     the word after them and the configuration word are untouched, and the number of
//     AXI write bursts is ceil(words / 16);
//   - increments: random bins of random histograms, checked counter by counter against
//     counts kept here, with a 64-bit carry case (counter preset to 2^32 - 1).
// The HBM model stalls its ready/valid signals at random.
module tb_dth_hist_memory;
  import dth_pkg::*;

  logic        clk = 1'b0, rstn;
  logic        op_valid, op_ready, op_rvalid;
  op_code_e    op_code;
  logic [31:0] op_data, op_rdata;
  axi_req_t    axi_req;
  axi_rsp_t    axi_rsp;
  int checks = 0, failures = 0;

  always #2 clk = !clk;

  dth_hist_memory dut (.*);
  hbm_model #(.READ_LAT(6)) u_hbm (.clk(clk), .req(axi_req), .rsp(axi_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint unsigned wordof(input int h, input int w);
    return longint'(h) * WORDS_PER_HIST + longint'(w);
  endfunction

  task automatic op(input op_code_e c, input logic [31:0] d);
    @(negedge clk);
    op_valid = 1; op_code = c; op_data = d;
    @(posedge clk);
    while (!op_ready) @(posedge clk);
    @(negedge clk);
    op_valid = 0; op_data = $urandom;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!op_ready) @(negedge clk);
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint unsigned counts [longint unsigned];   // (h << 12 | bin) -> expected count

  initial begin
    rstn = 0; op_valid = 0; op_code = OP_READ_CFG; op_data = '0;
    repeat (3) @(negedge clk);
    rstn = 1;

    // ---- configuration reads ----
    for (int i = 0; i < 40; i++) begin
      int h, b, waited;
      logic [HBM_DW-1:0] cw;
      h  = (i < 2) ? i * 255 : $urandom_range(0, 255);
      b  = i % 8;
      cw = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      u_hbm.poke(wordof(h, 0), cw);
      op(OP_READ_CFG, {8'd0, 8'(h), 13'd0, 3'(b)});
      waited = 0;
      while (!op_rvalid && waited < 200) begin @(posedge clk); #1; waited++; end
      check(op_rvalid && op_rdata == cw[32*b +: 32], $sformatf("config read h=%0d block %0d", h, b));
      @(posedge clk); #1;
      check(!op_rvalid, "op_rvalid longer than one cycle");
    end

    // ---- erase ----
    for (int i = 0; i < 12; i++) begin
      int h, n, words, writes0;
      logic [HBM_DW-1:0] cfg;
      h = $urandom_range(0, 255);
      n = (i == 0) ? 4095 : (i == 1) ? 0 : (i == 2) ? 63 : $urandom_range(0, 4095); // bins 0..n
      words = n / 4 + 1;
      cfg = {8{$urandom}};
      u_hbm.poke(wordof(h, 0), cfg);
      for (int w = 1; w <= words + 1 && w <= 1024; w++) u_hbm.poke(wordof(h, w), {8{$urandom | 32'h1}});
      writes0 = u_hbm.n_writes;
      op(OP_ERASE, {8'd0, 8'(h), 4'd0, 12'(n)});
      wait_idle();
      begin
        automatic bit ok = 1;
        for (int w = 1; w <= words; w++) if (u_hbm.peek(wordof(h, w)) != '0) ok = 0;
        check(ok, $sformatf("erase h=%0d n=%0d: a word was not cleared", h, n));
      end
      if (words < 1024) check(u_hbm.peek(wordof(h, words + 1)) != '0, $sformatf("erase h=%0d n=%0d went too far", h, n));
      check(u_hbm.peek(wordof(h, 0)) == cfg, "erase touched the configuration word");
      check(u_hbm.n_writes - writes0 == (words + 15) / 16,
            $sformatf("erase of %0d words used %0d bursts", words, u_hbm.n_writes - writes0));
    end

    // ---- increments ----
    u_hbm.poke(wordof(3, 1), {64'd0, 64'd0, 64'h0000_0000_FFFF_FFFF, 64'd0});
    counts[(3 << 12) | 1] = 64'h0000_0000_FFFF_FFFF;
    op(OP_INC_BIN, {8'd0, 8'd3, 4'd0, 12'd1});
    counts[(3 << 12) | 1]++;
    for (int i = 0; i < 400; i++) begin
      int h, b;
      h = $urandom_range(0, 5);
      b = (i % 5 == 0) ? 4095 : $urandom_range(0, 40);
      wait_idle();
      if (!counts.exists((longint'(h) << 12) | longint'(b))) counts[(longint'(h) << 12) | longint'(b)] = u_hbm.peek(wordof(h, 1 + b / 4))[64*(b%4) +: 64];
      counts[(longint'(h) << 12) | longint'(b)]++;
      op(OP_INC_BIN, {8'd0, 8'(h), 4'd0, 12'(b)});
    end
    wait_idle();
    foreach (counts[k]) begin
      int h, b;
      h = int'(k >> 12); b = int'(k & 64'hFFF);
      check(u_hbm.peek(wordof(h, 1 + b / 4))[64*(b%4) +: 64] == counts[k],
            $sformatf("bin %0d of histogram %0d holds %0d, expected %0d", b, h,
                      u_hbm.peek(wordof(h, 1 + b / 4))[64*(b%4) +: 64], counts[k]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
