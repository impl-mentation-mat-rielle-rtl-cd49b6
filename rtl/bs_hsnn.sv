// Bit-slice, time-driven hardware spiking neural network implementing the
// simplified Oscillatory Dynamic Link Matcher (ODLM).
//
// Every neuron has its own slice (column): a membrane model unit holding the
// potential, a synapse model unit with a one-bit serial adder, and a column of
// the weight memory holding the weights of all synapses onto that neuron.
// The whole network advances in lock step. In time evolution every potential
// climbs its piece-wise linear charging curve by one time step per clock.
// As soon as any neuron crosses the threshold (the OR of all Spike flags),
// evolution pauses for a spike propagation: each column latches its own Spike
// as its spiking bit, and the spiking bits travel once around the ring of
// columns. At each of the N ring positions every column reads the weight that
// belongs to the bit it currently holds and adds it bit-serially to its
// potential. All neurons that fired in the same time step are therefore
// propagated together, in P*N clocks, however many they are. Spikes caused
// by the propagation trigger another one; otherwise evolution resumes.
//
// Defaults: N = 648 neurons, P = 16-bit potentials, W = 11-bit weights; any
// topology, since every (pre, post) pair has a weight slot (0 = no synapse).
//
// Host side (parallel, this design's own):
//   cfg_*    configuration registers (bs_config_regs): run length, curve
//            shift, status; writing register 0 starts a run
//   wld_*    write one N-bit row of the weight memory (one bit of one weight
//            slot in every column); wrd_* reads a row back one clock later
//   pot_*    load / read the potential of one column
module bs_hsnn #(
  parameter int unsigned N = 648,
  parameter int unsigned P = 16,
  parameter int unsigned W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_wr,
  input  logic [2:0]              cfg_addr,
  input  logic [31:0]             cfg_wdata,
  output logic [31:0]             cfg_rdata,
  input  logic                    wld_en,
  input  logic [$clog2(N*W)-1:0]  wld_addr,
  input  logic [N-1:0]            wld_row,
  output logic [N-1:0]            wrd_row,
  input  logic                    pot_wr,
  input  logic [$clog2(N)-1:0]    pot_col,
  input  logic [P-1:0]            pot_wdata,
  output logic [P-1:0]            pot_rdata,
  output logic                    busy,
  output logic                    spike_detect,
  output logic [N-1:0]            spikes     // Spike flag of every column
);

  localparam int unsigned AW = $clog2(N*W);

  logic [31:0]   run_steps, n_props, n_steps;
  logic [3:0]    pwl_shift;
  logic          start;
  logic          evolve, load_sb, shift_sb, add_en, first, last, w_en;
  logic [AW-1:0] wmem_addr;
  logic [N-1:0]  w_bits, sb;
  logic [P-1:0]  pot [N];

  bs_config_regs u_cfg (
    .clk, .rst_n, .wr_en(cfg_wr), .addr(cfg_addr), .wr_data(cfg_wdata), .rd_data(cfg_rdata),
    .run_steps, .pwl_shift, .start, .busy, .n_props, .n_steps);

  bs_controller #(.N(N), .P(P), .W(W)) u_ctrl (
    .clk, .rst_n, .start, .run_steps, .spike_detect, .busy,
    .evolve, .load_sb, .shift_sb, .add_en, .first, .last, .w_en, .wmem_addr,
    .n_steps, .n_props);

  bs_weight_mem #(.N(N), .W(W)) u_wmem (
    .clk, .addr(busy ? wmem_addr : wld_addr), .rd_bits(w_bits),
    .ld_en(wld_en && !busy), .ld_addr(wld_addr), .ld_row(wld_row));
  assign wrd_row = w_bits;

  for (genvar i = 0; i < N; i++) begin : g_col
    bs_slice #(.P(P)) u_slice (
      .clk, .rst_n, .evolve, .pwl_shift, .load_sb, .shift_sb, .add_en, .first, .last,
      .w_en, .w_bit(w_bits[i]),
      .sb_in(sb[(i + N - 1) % N]), .sb_out(sb[i]),
      .ld_en(pot_wr && !busy && pot_col == ($clog2(N))'(i)), .ld_val(pot_wdata),
      .pot(pot[i]), .spike(spikes[i]));
  end

  assign spike_detect = |spikes;
  assign pot_rdata    = pot[pot_col];

endmodule
