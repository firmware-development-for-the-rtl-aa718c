// dth_reset_sync: reset synchronizer, asynchronous assertion, synchronous release.
//
// Brings an active-low reset into the clock domain of `clk` with a chain of STAGES
// flip-flops (two, as the document asks for the main reset entering the AXI clock
// domain). `rstn_out` drops as soon as `rstn_in` drops and rises STAGES clocks after
// `rstn_in` rises, so every flip-flop it feeds leaves reset on the same clock edge.
module dth_reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rstn_in,
  output logic rstn_out
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rstn_in) begin
    if (!rstn_in) chain <= '0;
    else          chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign rstn_out = chain[STAGES-1];

endmodule
