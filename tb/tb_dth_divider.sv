// tb_dth_divider: self-checking test of the sequential 12-bit-quotient divider.
//
// Drives random divisions whose quotient fits in 12 bits (full-range and small
// divisors, remainders up to den-1, the 0-dividend shortcut, the 439700/234 example)
// and compares res with a reference computed here with 64-bit arithmetic. It also
// checks the timing: res_valid comes exactly 13 clocks after enable (12 quotient bits
// plus the load cycle), or 1 clock for a zero dividend, and lasts one cycle.
module tb_dth_divider;
  logic        clk = 1'b0;
  logic        rstn;
  logic        enable;
  logic [31:0] num, den;
  logic        res_valid;
  logic [11:0] res;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  dth_divider dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [31:0] n, input logic [31:0] d);
    int cycles;
    longint unsigned expect_q;
    expect_q = longint'(n) / longint'(d);
    @(negedge clk);
    num = n; den = d; enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    num = $urandom; den = $urandom;   // the divider must have kept its own copies
    cycles = 1;
    while (!res_valid && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(res_valid, $sformatf("no res_valid for %0d/%0d", n, d));
    check(res == 12'(expect_q), $sformatf("%0d/%0d gave %0d, expected %0d", n, d, res, expect_q));
    check(cycles == ((n == 0) ? 1 : 13), $sformatf("%0d/%0d took %0d clocks", n, d, cycles));
    @(negedge clk);
    check(!res_valid, "res_valid longer than one cycle");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstn = 1'b0; enable = 1'b0; num = '0; den = 1;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    divide(439700, 234);
    divide(0, 17);
    divide(4095, 1);
    divide(32'hFFFF_FFFF, 32'h0010_0000);   // quotient 4095
    divide(32'h8000_0000, 32'h8000_0000);   // large divisor, shifted product beyond 32 bits
    divide(32'hC000_0000, 32'h4000_0001);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] d, q, r;
      d = (i % 2 != 0) ? $urandom_range(1, 1000) : ($urandom | 32'h1) >> $urandom_range(0, 31);
      if (d == 0) d = 1;
      q = $urandom_range(0, 4095);
      while (longint'(q) * longint'(d) > 64'hFFFF_FFFF) q = q >> 1;
      r = $urandom % d;
      if (longint'(q) * longint'(d) + longint'(r) > 64'hFFFF_FFFF) r = 0;
      divide(q * d + r, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
