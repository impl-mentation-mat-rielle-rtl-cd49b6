// Event-driven hardware spiking neural network implementing the simplified
// Oscillatory Dynamic Link Matcher (ODLM).
//
// Every neuron is a leaky integrate-and-fire oscillator; neurons joined by
// strong excitatory synapses pull each other into step and end up firing
// together, so groups of synchronous neurons mark segments of an image.
// Instead of updating every neuron at each time step, the network keeps each
// neuron as its predicted firing time in a sorted event queue and jumps from
// one spike to the next:
//   1. the merger presents the earliest neuron of the event queue;
//   2. the controller sets the simulation time to its firing time;
//   3. for each of its synapses the processing element finds the target
//      neuron, converts its firing time to a potential, adds the weight
//      computed from the two pixel values (or resets the firing neuron),
//      converts back to a firing time and writes it back;
//   4. the event queue moves that neuron to its new place.
// Topology and weights are computed on the fly, so no weight matrix is
// stored: 8-neighbour image grids use an offset table, full connectivity a
// counter (full_conn).
//
// Sizes default to 65 536 neurons, 13-bit times and potentials, 8-bit pixels
// and 9-bit weights. Host access (load, read back, run, synapse count) goes
// through the controller's parallel command port; see ed_controller.
module ed_hsnn
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
  input  logic              host_valid,
  output logic              host_ready,
  input  logic [1:0]        host_cmd,
  input  logic [IDW-1:0]    host_id,
  input  nstate_t           host_state,
  input  logic [31:0]       host_arg,
  output logic              host_rd_valid,
  output nstate_t           host_rd_data,
  output logic              run_done,
  input  logic              full_conn,
  input  logic              lut_we,
  input  logic [3:0]        lut_addr,
  input  logic [IDW-1:0]    lut_data,
  output logic [TIME_W-1:0] sim_time,
  output logic [31:0]       n_events,
  output logic [31:0]       n_synapses,
  output logic              q_overflow
);

  localparam int unsigned LEVELS = $clog2(N_NEURONS) + 1;

  // controller <-> PE
  logic              pe_valid;
  logic [SNW-1:0]    syn_nbr;
  logic [IDW-1:0]    pre_id;
  logic [PIX_W-1:0]  pre_pix;
  logic              pe_out_valid, pe_out_active;
  logic [IDW-1:0]    pe_out_id;
  logic [TIME_W-1:0] pe_out_time;
  logic [PIX_W-1:0]  pe_out_pix;
  logic              ext_wr_en, ext_rd_en;
  logic [IDW-1:0]    ext_wr_addr, ext_rd_addr;
  nstate_t           ext_wr_data, ext_rd_data;
  // controller <-> queue
  logic              q_valid, q_ready, q_stable;
  q_op_e             q_op;
  logic [IDW-1:0]    q_id;
  logic [TIME_W-1:0] q_time;
  logic [PIX_W-1:0]  q_pix;
  // queue -> merger -> controller
  logic              qt_valid [1];
  logic [IDW-1:0]    qt_id    [1];
  logic [TIME_W-1:0] qt_time  [1];
  logic [PIX_W-1:0]  qt_pix   [1];
  logic              top_valid;
  logic [IDW-1:0]    top_id;
  logic [TIME_W-1:0] top_time;
  logic [PIX_W-1:0]  top_pix;
  logic [0:0]        top_q;
  logic              rd_done, rd_found;
  logic [TIME_W-1:0] rd_time;

  ed_controller u_ctrl (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_cmd, .host_id, .host_state, .host_arg,
    .host_rd_valid, .host_rd_data, .run_done,
    .top_valid, .top_id, .top_time, .top_pix,
    .sim_time, .pe_valid, .syn_nbr, .pre_id, .pre_pix,
    .pe_out_valid, .pe_out_active, .pe_out_id, .pe_out_time, .pe_out_pix,
    .ext_wr_en, .ext_wr_addr, .ext_wr_data, .ext_rd_en, .ext_rd_addr, .ext_rd_data,
    .q_valid, .q_ready, .q_stable, .q_op, .q_id, .q_time, .q_pix,
    .n_events, .n_synapses);

  ed_pe #(.N_NEURONS(N_NEURONS), .ROW_PITCH(ROW_PITCH), .I0(I0), .TAU(TAU), .VTH(VTH),
          .WMAX(WMAX), .ALPHA(ALPHA), .DELTA(DELTA)) u_pe (
    .clk, .rst_n, .full_conn,
    .in_valid(pe_valid), .syn_nbr, .pre_id, .pre_pix, .sim_time,
    .out_valid(pe_out_valid), .out_active(pe_out_active), .out_id(pe_out_id),
    .out_time(pe_out_time), .out_pix(pe_out_pix),
    .ext_wr_en, .ext_wr_addr, .ext_wr_data, .ext_rd_en, .ext_rd_addr, .ext_rd_data,
    .lut_we, .lut_addr, .lut_data);

  ed_event_queue #(.LEVELS(LEVELS)) u_queue (
    .clk, .rst_n, .now(sim_time),
    .req_valid(q_valid), .req_ready(q_ready), .req_op(q_op), .req_id(q_id),
    .req_time(q_time), .req_pix(q_pix),
    .top_valid(qt_valid[0]), .top_id(qt_id[0]), .top_time(qt_time[0]), .top_pix(qt_pix[0]),
    .top_stable(q_stable), .idle(),
    .rd_done, .rd_found, .rd_time, .overflow(q_overflow));

  ed_merger #(.NQ(1)) u_merger (
    .now(sim_time), .q_valid(qt_valid), .q_id(qt_id), .q_time(qt_time), .q_pix(qt_pix),
    .top_valid, .top_id, .top_time, .top_pix, .top_q);

endmodule
