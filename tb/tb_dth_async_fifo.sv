// tb_dth_async_fifo: self-checking test of the dual-clock FIFO used for the unit FIFOs.
//
// Writes at 100 MHz, reads at 250 MHz (the two clocks of the design). Every accepted
// write (wen && !full at a write edge) is recorded; every pop must return the oldest
// recorded value. The reader pauses for long stretches so the FIFO fills and writes
// are dropped, as the unit FIFOs drop data without flow control; the test checks that
// this happened, that full is never raised far below DEPTH entries (it may lag the
// reader by the synchronizer delay), and that all
// data is drained at the end.
module tb_dth_async_fifo;
  localparam int W = 35, D = 16;
  logic wclk = 1'b0, rclk = 1'b0, wrstn, rrstn;
  logic wen, ren, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, drops = 0, pops = 0, pushes = 0;
  bit reading;

  always #5 wclk = !wclk;
  always #2 rclk = !rclk;

  dth_async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  always @(posedge wclk) if (wrstn) begin
    if (wen && !full) begin model.push_back(wdata); pushes++; end
    else if (wen) drops++;
    if (full) check(model.size() > D - 8, "full far below DEPTH entries (beyond the synchronizer delay)");
    wen   <= 1'($urandom_range(0, 1));
    wdata <= {3'($urandom), $urandom};
  end

  // reader
  always @(posedge rclk) if (rrstn) begin
    if (ren && !empty) begin
      check(model.size() > 0 && rdata == model[0], "read data order");
      if (model.size() > 0) void'(model.pop_front());
      pops++;
    end
    ren <= reading && $urandom_range(0, 3) != 0;
  end

  initial begin
    wrstn = 0; rrstn = 0; wen = 0; ren = 0; wdata = '0; reading = 1;
    #30; wrstn = 1; rrstn = 1;
    repeat (4) begin
      reading = 1; #3000;
      reading = 0; #2000;
    end
    reading = 1;
    @(negedge wclk); force wen = 0;
    #2000;
    check(model.size() == 0 && empty, "FIFO not drained");
    check(drops > 0, "no write was dropped while full");
    check(pops > 100, "too few reads");
    release wen;
    $display("pushes=%0d pops=%0d drops=%0d", pushes, pops, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
