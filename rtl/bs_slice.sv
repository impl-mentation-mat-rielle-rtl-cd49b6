// One slice (column) of the bit-slice network: the neuron's synapse model
// unit and membrane model unit. The weight memory of the column lives in the
// shared block-RAM array (bs_weight_mem) and delivers one weight bit per clock
// on w_bit. Neighbouring slices are linked only by the spiking-bit ring
// (sb_in from the left, sb_out to the right); Spike goes to the global OR.
// All control inputs are common to every slice and come from bs_controller.
module bs_slice #(
  parameter int unsigned P = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         evolve,
  input  logic [3:0]   pwl_shift,
  input  logic         load_sb,
  input  logic         shift_sb,
  input  logic         add_en,
  input  logic         first,
  input  logic         last,
  input  logic         w_en,
  input  logic         w_bit,
  input  logic         sb_in,
  output logic         sb_out,
  input  logic         ld_en,
  input  logic [P-1:0] ld_val,
  output logic [P-1:0] pot,
  output logic         spike
);

  logic pot_lsb, sum_bit, ovf;

  bs_smu u_smu (
    .clk, .rst_n, .spike, .load_sb, .shift_sb, .sb_in, .sb_out,
    .add_en, .first, .last, .w_en, .w_bit, .pot_bit(pot_lsb), .sum_bit, .ovf);

  bs_mmu #(.P(P)) u_mmu (
    .clk, .rst_n, .evolve, .pwl_shift, .shift(add_en), .sum_bit, .ovf,
    .clr_spike(load_sb), .ld_en, .ld_val, .pot, .pot_lsb, .spike);

endmodule
