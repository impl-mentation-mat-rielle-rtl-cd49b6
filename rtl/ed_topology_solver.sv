// Topology solver: first stage of the event-driven processing pipeline.
//
// Turns (pre-synaptic neuron ID, synapse number) into the post-synaptic
// neuron ID. In the normal mode the synapse number addresses a small table of
// ID offsets which is added to the pre-synaptic ID, so every neuron has the
// same regular neighbourhood (the 8-neighbour image grid by default). When the
// selected offset is 0 the SamePreAndPost flag is raised: that "synapse" is
// the firing neuron itself, which later stages reset instead of exciting.
// In fully-connected mode the synapse number itself is the post-synaptic ID,
// a counter running through every neuron.
//
// The offset table resets to: 0, -R-1, -R, -R+1, -1, +1, R-1, R, R+1 (R =
// ROW_PITCH, the image width including an inactive border) and can be
// rewritten through lut_we/lut_addr/lut_data. Table order and reset contents
// are this design's choice. Outputs are registered: one cycle latency.
module ed_topology_solver
  import ed_pkg::*;
#(
  parameter int unsigned NLUT      = 16,
  parameter int unsigned ROW_PITCH = 408
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     full_conn,     // 1: fully-connected topology
  input  logic [SNW-1:0]           syn_nbr,       // SynapseNbr
  input  logic [IDW-1:0]           pre_id,        // PreNeuronID
  input  logic                     lut_we,
  input  logic [$clog2(NLUT)-1:0]  lut_addr,
  input  logic [IDW-1:0]           lut_data,      // two's complement offset
  output logic [IDW-1:0]           post_id,       // PostNeuronID
  output logic                     same           // SamePreAndPost
);

  localparam logic [IDW-1:0] R = IDW'(ROW_PITCH);

  logic [IDW-1:0] lut [NLUT];
  logic [IDW-1:0] offset;
  logic [IDW-1:0] post_c;

  function automatic logic [IDW-1:0] reset_offset(int unsigned i);
    case (i)
      1: return -R - 1'b1;
      2: return -R;
      3: return -R + 1'b1;
      4: return '1;            // -1
      5: return IDW'(1);
      6: return R - 1'b1;
      7: return R;
      8: return R + 1'b1;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLUT; i++) lut[i] <= reset_offset(i);
    end else if (lut_we) begin
      lut[lut_addr] <= lut_data;
    end
  end

  assign offset = lut[syn_nbr[$clog2(NLUT)-1:0]];
  assign post_c = full_conn ? syn_nbr[IDW-1:0] : pre_id + offset;

  always_ff @(posedge clk) begin
    post_id <= post_c;
    same    <= full_conn ? (post_c == pre_id) : (offset == '0);
  end

endmodule
