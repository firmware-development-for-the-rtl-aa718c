// tb_dth_config_ram: self-checking test of the configuration RAM.
//
// Writes random 108-bit records to random addresses while reading random addresses,
// and checks that each read returns, one clock later, the last value written there
// before the read (read-before-write on a collision).
module tb_dth_config_ram;
  logic clk = 1'b0;
  logic we;
  logic [7:0] waddr, raddr;
  logic [107:0] wdata, rdata;
  logic [107:0] model [256];
  bit           valid [256];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  dth_config_ram dut (.*);

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [107:0] expect_d;
    bit           expect_v;
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we    = 1'($urandom_range(0, 1));
      waddr = 8'($urandom);
      raddr = (i % 3 == 0) ? waddr : 8'($urandom);
      wdata = {12'($urandom), $urandom, $urandom, $urandom};
      expect_d = model[raddr];
      expect_v = valid[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
      #1;
      if (expect_v) begin
        checks++;
        if (rdata !== expect_d) begin
          failures++;
          $display("FAIL: address %0d read %h expected %h", raddr, rdata, expect_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
