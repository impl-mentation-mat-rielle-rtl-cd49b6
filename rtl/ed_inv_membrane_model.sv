// Inverse membrane model: second half of pipeline stage 4 of the
// event-driven network.
//
// The new membrane potential addresses an 8192-entry table giving the time
// left before the neuron reaches the threshold on the charging curve
// p(t) = I0/tau*(1-exp(-t/tau)) (the inverse of the membrane-model table:
// potential 0 reads 2^13-1 ticks, the threshold code reads 0). Adding the
// simulation time gives the new predicted firing time, modulo 2^13.
// Output is registered: one cycle latency.
module ed_inv_membrane_model
  import ed_pkg::*;
#(
  parameter real I0  = 6.918,
  parameter real TAU = 0.1447,
  parameter real VTH = 1.0
) (
  input  logic              clk,
  input  logic [POT_W-1:0]  potential,    // PostNewPotential
  input  logic [TIME_W-1:0] sim_time,     // SimulationTime
  output logic [TIME_W-1:0] firing_time   // PostNewFiringTime
);

  logic [TIME_W-1:0] lut [1 << POT_W];

  initial begin
    for (int unsigned p = 0; p < (1 << POT_W); p++) begin
      lut[p] = TIME_W'(left_of_pot(p, curve_k(I0, TAU, VTH)));
    end
  end

  always_ff @(posedge clk) firing_time <= lut[potential] + sim_time;

endmodule
