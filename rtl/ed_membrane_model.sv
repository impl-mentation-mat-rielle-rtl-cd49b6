// Membrane model: half of pipeline stage 3 of the event-driven network.
//
// A neuron is stored as its predicted firing time. Subtracting the current
// simulation time gives its phase, the time left before it reaches the
// threshold (modulo 2^13). The phase addresses an 8192-entry table holding the
// membrane potential on the charging curve p(t) = I0/tau*(1-exp(-t/tau)),
// scaled so that phase 0 reads the threshold code 2^13-1 and phase 2^13-1
// reads 0. The table is computed at elaboration from I0, TAU and VTH (defaults
// are the segmentation settings). Output is registered: one cycle latency.
module ed_membrane_model
  import ed_pkg::*;
#(
  parameter real I0  = 6.918,
  parameter real TAU = 0.1447,
  parameter real VTH = 1.0
) (
  input  logic              clk,
  input  logic [TIME_W-1:0] firing_time,  // PostFiringTime
  input  logic [TIME_W-1:0] sim_time,     // SimulationTime
  output logic [POT_W-1:0]  potential     // PostPotential
);

  logic [POT_W-1:0]  lut [1 << TIME_W];
  logic [TIME_W-1:0] phase;

  initial begin
    for (int unsigned i = 0; i < (1 << TIME_W); i++) begin
      lut[i] = POT_W'(pot_of_left(i, curve_k(I0, TAU, VTH)));
    end
  end

  assign phase = firing_time - sim_time;   // PostPhase

  always_ff @(posedge clk) potential <= lut[phase];

endmodule
