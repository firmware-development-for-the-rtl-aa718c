// tb_dth_hbm_access: self-checking test of software access to the HBM.
//
// Drives the user interface (usr_clk 100 MHz) and an HBM model (axi_clk 250 MHz):
//   - writes: random 256-bit words written as address + four quarters, checked in the
//     model memory, including words written back to back;
//   - reads: random start words and lengths n = 1..64 (every length at least once),
//     each returned 64-bit word compared with the model memory. Some reads are issued
//     one at a time, waiting for each answer; others are issued back to back right
//     after the command, before the data can be there, so that they have to wait;
//   - a new read command after a partly consumed one discards the old data.
module tb_dth_hbm_access;
  import dth_pkg::*;

  localparam int FUNC_W = 256;
  localparam int F_RD   = 'hA0;
  localparam int F_WR   = 'hA1;

  logic              usr_clk = 1'b0, axi_clk = 1'b0, rstn;
  logic [FUNC_W-1:0] usr_func_wr, usr_func_rd;
  logic              usr_wren, usr_rden, usr_rd_val;
  logic [63:0]       usr_data_wr, usr_data_rd;
  axi_req_t          axi_req;
  axi_rsp_t          axi_rsp;
  int checks = 0, failures = 0;

  always #5 usr_clk = !usr_clk;
  always #2 axi_clk = !axi_clk;

  dth_hbm_access dut (.*);
  hbm_model #(.READ_LAT(7)) u_hbm (.clk(axi_clk), .req(axi_req), .rsp(axi_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // answers collected in order
  logic [63:0] answers [$];
  always @(posedge usr_clk) if (rstn && usr_rd_val) answers.push_back(usr_data_rd);

  task automatic uwrite(input int f, input logic [63:0] d);
    @(negedge usr_clk);
    usr_func_wr = '0; usr_func_wr[f] = 1'b1; usr_wren = 1'b1; usr_data_wr = d;
    @(negedge usr_clk);
    usr_wren = 1'b0; usr_func_wr = '0; usr_data_wr = {$urandom, $urandom};
  endtask

  task automatic urden();
    @(negedge usr_clk);
    usr_func_rd = '0; usr_func_rd[F_RD] = 1'b1; usr_rden = 1'b1;
    @(negedge usr_clk);
    usr_rden = 1'b0; usr_func_rd = '0;
  endtask

  task automatic wait_answers(input int n);
    int t = 0;
    while (answers.size() < n && t < 2000) begin @(negedge usr_clk); t++; end
  endtask

  task automatic read_cmd(input longint unsigned word, input int n);
    uwrite(F_RD, {25'd0, 6'(n - 1), HBM_AW'(word << 5)});
  endtask

  function automatic logic [63:0] expect_q(input longint unsigned word, input int i);
    logic [HBM_DW-1:0] w;
    w = u_hbm.peek(word + longint'(i) / 4);
    return w[64 * (i % 4) +: 64];
  endfunction

  initial begin
    int lens [$];
    rstn = 0; usr_func_wr = '0; usr_func_rd = '0; usr_wren = 0; usr_rden = 0; usr_data_wr = '0;
    repeat (4) @(negedge usr_clk);
    rstn = 1;
    repeat (4) @(negedge usr_clk);

    // ---- writes ----
    for (int i = 0; i < 40; i++) begin
      longint unsigned word;
      logic [HBM_DW-1:0] d;
      word = (i == 0) ? 0 : (i == 1) ? 64'h0FF_FFFF : longint'($urandom_range(0, 300000));
      d = {8{$urandom}};
      uwrite(F_WR, 64'(word << 5));
      for (int q = 0; q < 4; q++) uwrite(F_WR, d[64*q +: 64]);
      if (i % 3 == 0) begin
        repeat (12) @(negedge usr_clk);
        check(u_hbm.peek(word) == d, $sformatf("write %0d to word %0d", i, word));
      end else begin
        // back to back: check once the next one has gone too
        fork
          automatic longint unsigned fw = word;
          automatic logic [HBM_DW-1:0] fd = d;
          automatic int fi = i;
          begin
            repeat (30) @(negedge usr_clk);
            check(u_hbm.peek(fw) == fd, $sformatf("write %0d to word %0d", fi, fw));
          end
        join_none
      end
    end
    repeat (40) @(negedge usr_clk);

    // ---- reads ----
    for (int n = 1; n <= 64; n++) lens.push_back(n);
    for (int i = 0; i < 40; i++) lens.push_back($urandom_range(1, 64));
    foreach (lens[k]) begin
      longint unsigned word;
      int n;
      n = lens[k];
      word = longint'($urandom_range(0, 1000000));
      for (int w = 0; w < (n + 3) / 4; w++) if ($urandom_range(0, 3) != 0) u_hbm.poke(word + longint'(w), {8{$urandom}});
      answers.delete();
      read_cmd(word, n);
      if (k % 2 == 0) begin
        for (int i = 0; i < n; i++) begin
          urden();
          wait_answers(i + 1);
        end
      end else begin
        for (int i = 0; i < n; i++) urden();
        wait_answers(n);
      end
      check(answers.size() == n, $sformatf("read of %0d words gave %0d answers", n, answers.size()));
      for (int i = 0; i < n && i < answers.size(); i++)
        check(answers[i] == expect_q(word, i),
              $sformatf("read n=%0d word %0d quarter %0d: %h, expected %h", n, word, i, answers[i], expect_q(word, i)));
      repeat (3) @(negedge usr_clk);
      check(answers.size() == n, "extra answers");
    end

    // ---- a new command discards a partly read block ----
    begin
      longint unsigned word;
      word = 5000;
      for (int w = 0; w < 4; w++) u_hbm.poke(word + longint'(w), {8{$urandom}});
      u_hbm.poke(9000, {8{$urandom}});
      answers.delete();
      read_cmd(word, 16);
      for (int i = 0; i < 3; i++) urden();
      wait_answers(3);
      repeat (10) @(negedge usr_clk);
      answers.delete();
      read_cmd(9000, 4);
      for (int i = 0; i < 4; i++) urden();
      wait_answers(4);
      check(answers.size() == 4, "second command: wrong answer count");
      for (int i = 0; i < 4 && i < answers.size(); i++)
        check(answers[i] == expect_q(9000, i), "second command returned stale data");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
