// Top level holding the two hardware implementations of the simplified
// Oscillatory Dynamic Link Matcher side by side, each with its own host ports:
//   ed_*  the event-driven network (ed_hsnn): one pipelined processing
//         element, a structured-heap event queue, 65 536 neurons with
//         on-the-fly topology and weights;
//   bs_*  the bit-slice time-driven network (bs_hsnn): 648 columns, a full
//         weight matrix in memory, bit-serial arithmetic.
// ED_ROW_PITCH is the width of the event-driven network's image grid
// (including its inactive border). They share only the clock and reset. Both host ports are plain parallel
// ports standing in for the serial link to a host computer.
module odlm_top
  import ed_pkg::*;
#(
  parameter int unsigned ED_NEURONS = 65536,
  parameter int unsigned ED_ROW_PITCH = 408,
  parameter int unsigned BS_N       = 648,
  parameter int unsigned BS_P       = 16,
  parameter int unsigned BS_W       = 11
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // event-driven network
  input  logic                         ed_host_valid,
  output logic                         ed_host_ready,
  input  logic [1:0]                   ed_host_cmd,
  input  logic [IDW-1:0]               ed_host_id,
  input  nstate_t                      ed_host_state,
  input  logic [31:0]                  ed_host_arg,
  output logic                         ed_host_rd_valid,
  output nstate_t                      ed_host_rd_data,
  output logic                         ed_run_done,
  input  logic                         ed_full_conn,
  input  logic                         ed_lut_we,
  input  logic [3:0]                   ed_lut_addr,
  input  logic [IDW-1:0]               ed_lut_data,
  output logic [TIME_W-1:0]            ed_sim_time,
  output logic [31:0]                  ed_n_events,
  output logic [31:0]                  ed_n_synapses,
  output logic                         ed_q_overflow,
  // bit-slice network
  input  logic                         bs_cfg_wr,
  input  logic [2:0]                   bs_cfg_addr,
  input  logic [31:0]                  bs_cfg_wdata,
  output logic [31:0]                  bs_cfg_rdata,
  input  logic                         bs_wld_en,
  input  logic [$clog2(BS_N*BS_W)-1:0] bs_wld_addr,
  input  logic [BS_N-1:0]              bs_wld_row,
  output logic [BS_N-1:0]              bs_wrd_row,
  input  logic                         bs_pot_wr,
  input  logic [$clog2(BS_N)-1:0]      bs_pot_col,
  input  logic [BS_P-1:0]              bs_pot_wdata,
  output logic [BS_P-1:0]              bs_pot_rdata,
  output logic                         bs_busy,
  output logic                         bs_spike_detect,
  output logic [BS_N-1:0]              bs_spikes
);

  ed_hsnn #(.N_NEURONS(ED_NEURONS), .ROW_PITCH(ED_ROW_PITCH)) u_ed (
    .clk, .rst_n,
    .host_valid(ed_host_valid), .host_ready(ed_host_ready), .host_cmd(ed_host_cmd),
    .host_id(ed_host_id), .host_state(ed_host_state), .host_arg(ed_host_arg),
    .host_rd_valid(ed_host_rd_valid), .host_rd_data(ed_host_rd_data), .run_done(ed_run_done),
    .full_conn(ed_full_conn), .lut_we(ed_lut_we), .lut_addr(ed_lut_addr), .lut_data(ed_lut_data),
    .sim_time(ed_sim_time), .n_events(ed_n_events), .n_synapses(ed_n_synapses),
    .q_overflow(ed_q_overflow));

  bs_hsnn #(.N(BS_N), .P(BS_P), .W(BS_W)) u_bs (
    .clk, .rst_n,
    .cfg_wr(bs_cfg_wr), .cfg_addr(bs_cfg_addr), .cfg_wdata(bs_cfg_wdata), .cfg_rdata(bs_cfg_rdata),
    .wld_en(bs_wld_en), .wld_addr(bs_wld_addr), .wld_row(bs_wld_row), .wrd_row(bs_wrd_row),
    .pot_wr(bs_pot_wr), .pot_col(bs_pot_col), .pot_wdata(bs_pot_wdata), .pot_rdata(bs_pot_rdata),
    .busy(bs_busy), .spike_detect(bs_spike_detect), .spikes(bs_spikes));

endmodule
