// Weight calculator: half of pipeline stage 3 of the event-driven network.
//
// The weight of a synapse depends only on the difference between the pixel
// values of its two neurons, so it is read from a 256-entry table addressed
// by |PrePixelValue - PostPixelValue| instead of being stored per synapse.
// The table is filled at elaboration with
//   w(d) = WMAX * (1 - 1/(1 + exp(-(ALPHA*d/255 - DELTA))))
// in potential codes (threshold = 2^13-1): nearly WMAX for equal pixels,
// half of it at d = 255*DELTA/ALPHA, falling towards 0 beyond. The defaults
// are the segmentation settings the network was run with; the scaling of d to
// [0,1] and the sign of DELTA are this design's reading of the rule.
// Output is registered: one cycle latency.
module ed_weight_calc
  import ed_pkg::*;
#(
  parameter real WMAX  = 0.0325,
  parameter real ALPHA = 100.0,
  parameter real DELTA = 6.0
) (
  input  logic             clk,
  input  logic [PIX_W-1:0] pre_pix,
  input  logic [PIX_W-1:0] post_pix,
  output logic [WGT_W-1:0] weight
);

  logic [WGT_W-1:0] lut [1 << PIX_W];
  logic [PIX_W-1:0] diff;

  initial begin
    for (int unsigned d = 0; d < (1 << PIX_W); d++) begin
      lut[d] = WGT_W'(weight_of_diff(d, WMAX, ALPHA, DELTA));
    end
  end

  assign diff = (pre_pix >= post_pix) ? pre_pix - post_pix : post_pix - pre_pix;

  always_ff @(posedge clk) weight <= lut[diff];

endmodule
