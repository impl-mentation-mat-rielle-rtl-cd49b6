// Processing element of the event-driven network: a 5-stage pipeline that
// applies one synapse of a spike to one neuron.
//
//   stage 1  topology solver: (PreNeuronID, SynapseNbr) -> PostNeuronID and
//            SamePreAndPost (the "synapse" to the firing neuron itself)
//   stage 2  neuron state memory read: firing time, pixel, active bit
//   stage 3  weight calculator (pixel difference -> weight) and membrane
//            model (firing time - simulation time -> potential)
//   stage 4  synapse model (potential + weight, or soft reset) and inverse
//            membrane model (new potential -> new firing time)
//   stage 5  write the new firing time back to the state memory and present
//            the update (out_*) to the event queue
// One synapse can enter per clock; the update for it leaves 4 cycles later
// (out_valid). out_active is 0 for border neurons, which are not updated.
// Successive synapses must address different neurons while they are in the
// pipeline (true within one spike); the controller issues a new spike only
// when the pipeline is empty.
//
// The ext_* ports give the host the state memory's ports while the pipeline
// is idle: ext_wr_* loads a neuron, ext_rd_* reads one back (data one cycle
// later). lut_* rewrites the topology offset table.
module ed_pe
  import ed_pkg::*;
#(
  parameter int unsigned N_NEURONS = 65536,
  parameter int unsigned ROW_PITCH = 408,
  parameter real         I0        = 6.918,
  parameter real         TAU       = 0.1447,
  parameter real         VTH       = 1.0,
  parameter real         WMAX      = 0.0325,
  parameter real         ALPHA     = 100.0,
  parameter real         DELTA     = 6.0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              full_conn,
  // from the controller
  input  logic              in_valid,
  input  logic [SNW-1:0]    syn_nbr,
  input  logic [IDW-1:0]    pre_id,
  input  logic [PIX_W-1:0]  pre_pix,
  input  logic [TIME_W-1:0] sim_time,
  // to the event queue
  output logic              out_valid,
  output logic              out_active,
  output logic [IDW-1:0]    out_id,
  output logic [TIME_W-1:0] out_time,
  output logic [PIX_W-1:0]  out_pix,
  // host access
  input  logic              ext_wr_en,
  input  logic [IDW-1:0]    ext_wr_addr,
  input  nstate_t           ext_wr_data,
  input  logic              ext_rd_en,
  input  logic [IDW-1:0]    ext_rd_addr,
  output nstate_t           ext_rd_data,
  input  logic              lut_we,
  input  logic [3:0]        lut_addr,
  input  logic [IDW-1:0]    lut_data
);

  localparam int unsigned AW = $clog2(N_NEURONS);

  // pipeline registers (signals crossing stage boundaries)
  typedef struct packed {
    logic              valid;
    logic [PIX_W-1:0]  pre_pix;
    logic [TIME_W-1:0] sim_time;
  } s1_t;
  typedef struct packed {
    logic              valid;
    logic              same;
    logic [IDW-1:0]    post_id;
    logic [PIX_W-1:0]  pre_pix;
    logic [TIME_W-1:0] sim_time;
  } s2_t;
  typedef struct packed {
    logic              valid;
    logic              same;
    logic              active;
    logic [IDW-1:0]    post_id;
    logic [PIX_W-1:0]  post_pix;
    logic [TIME_W-1:0] sim_time;
  } s3_t;
  typedef struct packed {
    logic              valid;
    logic              active;
    logic [IDW-1:0]    post_id;
    logic [PIX_W-1:0]  post_pix;
  } s4_t;

  s1_t s1; s2_t s2; s3_t s3; s4_t s4;

  // stage 1
  logic [IDW-1:0] post_id_s1;
  logic           same_s1;
  ed_topology_solver #(.NLUT(16), .ROW_PITCH(ROW_PITCH)) u_topo (
    .clk, .rst_n, .full_conn, .syn_nbr, .pre_id,
    .lut_we, .lut_addr, .lut_data,
    .post_id(post_id_s1), .same(same_s1));

  // stage 2 / 5: state memory
  nstate_t rd_data;
  logic    wr_en;
  logic [AW-1:0] wr_addr;
  nstate_t wr_data;
  logic [TIME_W-1:0] new_ftime;   // PostNewFiringTime

  always_comb begin
    if (s4.valid && s4.active) begin
      wr_en   = 1'b1;
      wr_addr = s4.post_id[AW-1:0];
      wr_data = '{active: 1'b1, ftime: new_ftime, pix: s4.post_pix};
    end else begin
      wr_en   = ext_wr_en;
      wr_addr = ext_wr_addr[AW-1:0];
      wr_data = ext_wr_data;
    end
  end

  ed_state_mem #(.DEPTH(N_NEURONS)) u_mem (
    .clk,
    .rd_addr(ext_rd_en ? ext_rd_addr[AW-1:0] : post_id_s1[AW-1:0]),
    .rd_data,
    .wr_en, .wr_addr, .wr_data);
  assign ext_rd_data = rd_data;

  // stage 3
  logic [WGT_W-1:0] syn_weight;
  logic [POT_W-1:0] post_potential;
  ed_weight_calc #(.WMAX(WMAX), .ALPHA(ALPHA), .DELTA(DELTA)) u_wcalc (
    .clk, .pre_pix(s2.pre_pix), .post_pix(rd_data.pix), .weight(syn_weight));
  ed_membrane_model #(.I0(I0), .TAU(TAU), .VTH(VTH)) u_mm (
    .clk, .firing_time(rd_data.ftime), .sim_time(s2.sim_time), .potential(post_potential));

  // stage 4
  logic [POT_W-1:0] post_new_potential;
  ed_synapse_model u_syn (
    .same(s3.same), .weight(syn_weight), .potential(post_potential),
    .new_potential(post_new_potential));
  ed_inv_membrane_model #(.I0(I0), .TAU(TAU), .VTH(VTH)) u_imm (
    .clk, .potential(post_new_potential), .sim_time(s3.sim_time), .firing_time(new_ftime));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0;
    end else begin
      s1 <= '{valid: in_valid, pre_pix: pre_pix, sim_time: sim_time};
      s2 <= '{valid: s1.valid, same: same_s1, post_id: post_id_s1,
              pre_pix: s1.pre_pix, sim_time: s1.sim_time};
      s3 <= '{valid: s2.valid, same: s2.same, active: rd_data.active, post_id: s2.post_id,
              post_pix: rd_data.pix, sim_time: s2.sim_time};
      s4 <= '{valid: s3.valid, active: s3.active, post_id: s3.post_id, post_pix: s3.post_pix};
    end
  end

  // stage 5: to the event queue
  assign out_valid  = s4.valid;
  assign out_active = s4.active;
  assign out_id     = s4.post_id;
  assign out_time   = new_ftime;
  assign out_pix    = s4.post_pix;

endmodule
