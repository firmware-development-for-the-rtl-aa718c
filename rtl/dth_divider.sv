// dth_divider: sequential unsigned divider with a short quotient.
//
// Computes res = floor(num / den) for DATA_W-bit operands when the quotient is known to
// fit in RES_W bits (the bin index of a histogram: the sample has already been checked
// to lie inside the histogram, so (data - min_edge) / bin_width < 2^12).
//
// How it works: restoring division, one quotient bit per clock from the MSB down. A
// running product acc = res * den is kept so that bit i is set when
// den * 2^i <= num - acc; acc then grows by den * 2^i. The shifted divisor is compared
// at DATA_W+RES_W bits, so no bit of den * 2^i is lost for any divisor.
//
// Interface and timing: a one-cycle `enable` samples num/den. A zero dividend answers
// on the next clock. Otherwise an internal busy flag is raised on the next clock, the
// RES_W quotient bits take RES_W cycles, and `res_valid` pulses for one cycle, RES_W+1
// clocks after `enable` (13 for the 12-bit default). `res` holds the quotient from the
// `res_valid` pulse until the next `enable`. An `enable` while busy restarts.
// The algorithm, the port list and the cycle behaviour follow the document; the wide
// compare is this design's choice.
module dth_divider #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned RES_W  = 12
) (
  input  logic              clk,
  input  logic              rstn,
  input  logic              enable,
  input  logic [DATA_W-1:0] num,
  input  logic [DATA_W-1:0] den,
  output logic              res_valid,
  output logic [RES_W-1:0]  res
);

  localparam int unsigned WW = DATA_W + RES_W;

  logic                     busy;
  logic [DATA_W-1:0]        num_q;
  logic [DATA_W-1:0]        den_q;
  logic [DATA_W-1:0]        acc;      // res * den so far, always <= num_q
  logic [$clog2(RES_W)-1:0] bit_idx;

  logic [WW-1:0] trial;
  logic          take;
  always_comb begin
    trial = WW'(den_q) << bit_idx;
    take  = trial <= WW'(num_q - acc);
  end

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      busy      <= 1'b0;
      res_valid <= 1'b0;
      res       <= '0;
      num_q     <= '0;
      den_q     <= '0;
      acc       <= '0;
      bit_idx   <= '0;
    end else begin
      res_valid <= 1'b0;
      if (enable) begin
        res     <= '0;
        acc     <= '0;
        bit_idx <= ($clog2(RES_W))'(RES_W - 1);
        num_q   <= num;
        den_q   <= den;
        if (num == '0) begin
          res_valid <= 1'b1;
          busy      <= 1'b0;
        end else begin
          busy      <= 1'b1;
        end
      end else if (busy) begin
        if (take) begin
          res[bit_idx] <= 1'b1;
          acc          <= acc + DATA_W'(trial);
        end
        if (bit_idx == '0) begin
          res_valid <= 1'b1;
          busy      <= 1'b0;
        end else begin
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

endmodule
