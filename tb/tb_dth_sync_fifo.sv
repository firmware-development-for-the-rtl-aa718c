// tb_dth_sync_fifo: self-checking test of the single-clock show-ahead FIFO.
//
// Random pushes and pops against a queue kept in the testbench: data order, the
// full/empty flags and the fill count are compared every cycle, a push while full must
// be ignored, and the FIFO is filled to its depth at least once.
module tb_dth_sync_fifo;
  localparam int W = 40, D = 16;
  logic clk = 1'b0, rstn;
  logic wen, ren, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, times_full = 0;

  always #5 clk = !clk;

  dth_sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rstn = 0; wen = 0; ren = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rstn = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 300) % 2;               // alternate filling and draining
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (!empty) check(rdata == model[0], "head data");
      if (full) times_full++;
      wen   = $urandom_range(0, 9) < (phase != 0 ? 3 : 7);
      ren   = $urandom_range(0, 9) < (phase != 0 ? 7 : 3);
      wdata = {$urandom, 8'($urandom)};
      @(posedge clk);
      #1;
    end
    wen = 0; ren = 0;
    check(times_full > 0, "FIFO never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model updated on the same edge as the FIFO
  always @(posedge clk) if (rstn) begin
    bit do_pop;
    do_pop = ren && model.size() > 0;
    if (do_pop) void'(model.pop_front());
    if (wen && (model.size() + (do_pop ? 1 : 0)) < D) model.push_back(wdata);
  end
endmodule
