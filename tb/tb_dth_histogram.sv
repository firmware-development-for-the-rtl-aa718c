// tb_dth_histogram: self-checking test of the binning engine.
//
// The testbench plays the memory engine on the OP protocol: it holds a configuration
// per histogram (random, including invalid bin widths of 0 and bin counts of 0 and
// 4095), answers configuration reads after a random delay, and stalls op_ready at
// random. It checks
//   - initialization: for every histogram, reads of blocks 0, 1, 2 in order, then an
//     erase of exactly BN+2 bins of the sanitized configuration;
//   - binning: each sample yields one increment for the right histogram and the bin
//     computed here (underflow BN, overflow BN+1, else (d - ME) / BW);
//   - timing: an in-range sample reaches op_valid 13 clocks later than an out-of-range
//     one (the division; "about 14" in the original description), a zero numerator
//     1 clock later, and `ready` drops right after a sample is taken;
//   - single-histogram reset: re-reads and re-erases that histogram only, after which
//     its new configuration is used.
module tb_dth_histogram;
  import dth_pkg::*;

  logic        clk = 1'b0, rstn;
  logic        hist_rst;
  logic [7:0]  hist_rst_idx;
  logic        ready, data_valid;
  logic [7:0]  data_idx;
  logic [31:0] data;
  logic        op_valid, op_ready, op_rvalid;
  op_code_e    op_code;
  logic [31:0] op_data, op_rdata;
  logic        init_done;
  int checks = 0, failures = 0;

  always #2 clk = !clk;

  dth_histogram dut (.*);

  // configuration held by the "memory"
  logic [31:0] cfg_me [256], cfg_bw [256];
  logic [11:0] cfg_bn [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [11:0] san_bn(input int h);
    return cfg_bn[h] == 0 ? 12'd1 : (cfg_bn[h] == 12'hFFF ? 12'd4094 : cfg_bn[h]);
  endfunction
  function automatic logic [31:0] san_bw(input int h);
    return cfg_bw[h] == 0 ? 32'd1 : cfg_bw[h];
  endfunction
  function automatic logic [11:0] ref_bin(input int h, input logic [31:0] d);
    logic [31:0] maxe;
    maxe = cfg_me[h] + 32'(64'(san_bw(h)) * 64'(san_bn(h)));
    if (d < cfg_me[h]) return san_bn(h);
    if (d >= maxe)     return san_bn(h) + 12'd1;
    return 12'((d - cfg_me[h]) / san_bw(h));
  endfunction

  // ---- OP subordinate ----
  typedef struct { op_code_e code; logic [31:0] data; longint t; } op_t;
  op_t ops [$];
  longint cyc = 0;
  bit     busy = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    op_ready = 0; op_rvalid = 0; op_rdata = '0;
    forever begin
      @(posedge clk);
      op_rvalid <= 1'b0;
      if (rstn && op_valid && op_ready) begin
        op_t o;
        o.code = op_code; o.data = op_data; o.t = cyc;
        ops.push_back(o);
        op_ready <= 1'b0;
        if (op_code == OP_READ_CFG) begin
          int h, b;
          h = int'(op_data[23:16]); b = int'(op_data[2:0]);
          repeat ($urandom_range(1, 4)) @(posedge clk);
          op_rvalid <= 1'b1;
          op_rdata  <= (b == 0) ? cfg_me[h] : (b == 1) ? cfg_bw[h] : {20'($urandom), cfg_bn[h]};
        end else begin
          repeat ($urandom_range(0, 2)) @(posedge clk);
        end
      end else begin
        op_ready <= $urandom_range(0, 3) != 0;
      end
    end
  end

  task automatic expect_init(input int h);
    op_t o;
    for (int b = 0; b < 3; b++) begin
      wait (ops.size() > 0);
      o = ops.pop_front();
      check(o.code == OP_READ_CFG && int'(o.data[23:16]) == h && int'(o.data[2:0]) == b,
            $sformatf("init h=%0d: expected config read block %0d, got code %b data %h", h, b, o.code, o.data));
    end
    wait (ops.size() > 0);
    o = ops.pop_front();
    check(o.code == OP_ERASE && int'(o.data[23:16]) == h && o.data[11:0] == san_bn(h) + 12'd1,
          $sformatf("init h=%0d: erase op %b %h, BN=%0d", h, o.code, o.data, san_bn(h)));
  endtask

  // send one sample, return the cycle it was taken and the cycle its op was taken
  task automatic send(input int h, input logic [31:0] d, output longint t_in, output longint t_op);
    op_t o;
    @(negedge clk);
    while (!ready) @(negedge clk);
    data_valid = 1; data_idx = 8'(h); data = d;
    @(negedge clk);
    t_in = cyc;
    data_valid = 0; data = $urandom;
    check(!ready, "ready still high after a sample was taken");
    wait (ops.size() > 0);
    o = ops.pop_front();
    t_op = o.t;
    check(o.code == OP_INC_BIN && int'(o.data[23:16]) == h && o.data[11:0] == ref_bin(h, d),
          $sformatf("sample h=%0d d=%0d: op %b %h, expected bin %0d", h, d, o.code, o.data, ref_bin(h, d)));
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic longint t_in, t_op, lat_in = -1, lat_out = -1;
    automatic int n_under = 0, n_over = 0, n_div = 0;
    for (int h = 0; h < 256; h++) begin
      cfg_me[h] = $urandom_range(0, 100000);
      cfg_bw[h] = (h % 17 == 3) ? 0 : $urandom_range(1, 5000);
      cfg_bn[h] = (h % 19 == 4) ? 12'd0 : (h % 23 == 5) ? 12'hFFF : 12'($urandom_range(1, 4094));
    end
    cfg_me[7] = 32'hFFFF_FF00; cfg_bw[7] = 32'h1000_0000; cfg_bn[7] = 12'd20; // max edge wraps
    rstn = 0; hist_rst = 0; hist_rst_idx = 0; data_valid = 0; data_idx = 0; data = 0;
    repeat (3) @(negedge clk);
    rstn = 1;
    for (int h = 0; h < 256; h++) expect_init(h);
    wait (init_done);
    check(ops.size() == 0, "extra operations after initialization");

    for (int i = 0; i < 600; i++) begin
      int h, kind;
      logic [31:0] d, maxe;
      h = $urandom_range(0, 255);
      kind = $urandom_range(0, 3);
      maxe = cfg_me[h] + san_bw(h) * 32'(san_bn(h));
      case (kind)
        0:       d = (cfg_me[h] == 0) ? 0 : $urandom_range(0, cfg_me[h] - 1);
        1:       d = maxe + $urandom_range(0, 1000);
        default: d = cfg_me[h] + $urandom_range(0, 32'(san_bw(h) * 32'(san_bn(h))));
      endcase
      send(h, d, t_in, t_op);
      if (d < cfg_me[h]) begin n_under++; lat_out = t_op - t_in; end
      else if (d >= maxe) begin n_over++; lat_out = t_op - t_in; end
      else n_div++;
      if (d >= cfg_me[h] && d < maxe && t_op - t_in < 60) lat_in = t_op - t_in;
    end
    check(n_under > 0 && n_over > 0 && n_div > 0, "not all bin kinds exercised");

    // single-histogram reset with a new configuration
    cfg_me[42] = 1000; cfg_bw[42] = 10; cfg_bn[42] = 12'd5;
    @(negedge clk);
    hist_rst = 1; hist_rst_idx = 8'd42;
    @(negedge clk);
    hist_rst = 0;
    expect_init(42);
    send(42, 1025, t_in, t_op);   // bin 2 with the new configuration
    send(42, 1050, t_in, t_op);   // overflow = 6
    send(42, 999, t_in, t_op);    // underflow = 5
    // cycle counts on histogram 42, op_ready already high when op_valid rises
    begin
      longint a, b, c, e, f, g;
      force op_ready = 1'b1;
      send(42, 1015, a, b);   // in range, non-zero numerator: full division
      send(42, 998, c, e);    // underflow: no division
      send(42, 1000, f, g);   // zero numerator: divider answers at once
      release op_ready;
      $display("in-range %0d clocks, out-of-range %0d clocks, zero numerator %0d clocks", b - a, e - c, g - f);
      check((b - a) - (e - c) == 13, $sformatf("division costs %0d clocks, expected 13", (b - a) - (e - c)));
      check((g - f) - (e - c) == 1, $sformatf("zero-numerator shortcut costs %0d clocks, expected 1", (g - f) - (e - c)));
    end
    check(ops.size() == 0, "extra operations");

    $display("under=%0d over=%0d divided=%0d", n_under, n_over, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
