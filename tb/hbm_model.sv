// hbm_model: behavioural model of one HBM pseudo channel AXI port (simulation only).
//
// A sparse 256-bit-word memory (unwritten words read as zero) behind an AXI subordinate
// with independent read and write channels. Reads return their beats READ_LAT clocks
// after the address handshake; STALL makes the ready/valid signals drop at random
// (about one cycle in four) so that managers see back-pressure. Write data is accepted
// after the write address; the response follows the last beat. Full-word writes only
// (the design always writes all strobes). Byte address / 32 = word address.
// Testbenches reach the memory with the peek/poke functions.
module hbm_model
  import dth_pkg::*;
#(
  parameter int unsigned READ_LAT = 8,
  parameter bit          STALL    = 1'b1
) (
  input  logic     clk,
  input  axi_req_t req,
  output axi_rsp_t rsp
);

  logic [HBM_DW-1:0] mem [longint unsigned];
  int unsigned n_reads, n_writes, n_both;

  function automatic logic [HBM_DW-1:0] peek(input longint unsigned word);
    return mem.exists(word) ? mem[word] : '0;
  endfunction

  function automatic void poke(input longint unsigned word, input logic [HBM_DW-1:0] d);
    mem[word] = d;
  endfunction

  function automatic bit stall();
    return STALL && ($urandom_range(0, 3) == 0);
  endfunction

  // each channel process drives its own signals
  logic              ar_ready = 1'b0, r_valid = 1'b0, r_last = 1'b0;
  logic [HBM_DW-1:0] r_data = '0;
  logic              aw_ready = 1'b0, w_ready = 1'b0, b_valid = 1'b0;

  always_comb begin
    rsp          = '0;
    rsp.ar_ready = ar_ready;
    rsp.r_valid  = r_valid;
    rsp.r_data   = r_data;
    rsp.r_last   = r_last;
    rsp.aw_ready = aw_ready;
    rsp.w_ready  = w_ready;
    rsp.b_valid  = b_valid;
  end

  initial begin
    n_reads = 0; n_writes = 0; n_both = 0;
  end

  // read channel: ready is offered (unless stalling) and the address is taken on the
  // clock edge where valid and ready are both high
  initial begin
    longint unsigned addr;
    int unsigned     len;
    forever begin
      @(posedge clk);
      if (!stall()) begin
        ar_ready <= 1'b1;
        do @(posedge clk); while (!req.ar_valid);
        addr = longint'(req.ar_addr) >> 5;
        len  = int'(req.ar_len);
        ar_ready <= 1'b0;
        n_reads++;
        repeat (READ_LAT) @(posedge clk);
        // one beat offer per clock; an offered beat stays until it is taken
        begin
          int b;
          bit vld;
          b   = 0;
          vld = 1'b0;
          while (b <= int'(len)) begin
            vld = vld || !stall();
            r_valid <= vld;
            r_data  <= peek(addr + longint'(b));
            r_last  <= b == int'(len);
            @(posedge clk);
            if (vld && req.r_ready) begin
              b++;
              vld = 1'b0;
            end
          end
          r_valid <= 1'b0;
          r_last  <= 1'b0;
        end
      end
    end
  end

  // write channel
  initial begin
    longint unsigned addr;
    int unsigned     len, b;
    forever begin
      @(posedge clk);
      if (!stall()) begin
        aw_ready <= 1'b1;
        do @(posedge clk); while (!req.aw_valid);
        addr = longint'(req.aw_addr) >> 5;
        len  = int'(req.aw_len);
        if (r_valid || req.ar_valid) n_both++;
        aw_ready <= 1'b0;
        b = 0;
        while (b <= len) begin
          w_ready <= !stall();
          @(posedge clk);
          if (w_ready && req.w_valid) begin
            mem[addr + longint'(b)] = req.w_data;
            if (req.w_last != (b == len)) $display("hbm_model: WLAST misplaced at beat %0d", b);
            b++;
          end
        end
        w_ready <= 1'b0;
        n_writes++;
        @(posedge clk);
        b_valid <= 1'b1;
        do @(posedge clk); while (!req.b_ready);
        b_valid <= 1'b0;
      end
    end
  end

endmodule
