// Synapse model: first half of pipeline stage 4 of the event-driven network.
//
// For an ordinary post-synaptic neuron (same = 0) the synaptic weight is added
// to its membrane potential. For the firing neuron itself (same = 1) the
// threshold is subtracted instead, a soft reset that keeps any excess. A sum
// that reaches the threshold saturates at the threshold code, which the next
// block turns into "fire now"; a reset that would go below zero gives zero.
// Purely combinational; the register of stage 4 sits after the inverse
// membrane model.
module ed_synapse_model
  import ed_pkg::*;
(
  input  logic             same,           // SamePreAndPost
  input  logic [WGT_W-1:0] weight,         // SynWeight
  input  logic [POT_W-1:0] potential,      // PostPotential
  output logic [POT_W-1:0] new_potential   // PostNewPotential
);

  logic [POT_W:0] sum;

  always_comb begin
    if (same) begin
      new_potential = (potential >= VTH_CODE) ? potential - VTH_CODE : '0;
      sum           = '0;
    end else begin
      sum           = {1'b0, potential} + (POT_W + 1)'(weight);
      new_potential = (sum >= (POT_W + 1)'(VTH_CODE)) ? VTH_CODE : sum[POT_W-1:0];
    end
  end

endmodule
