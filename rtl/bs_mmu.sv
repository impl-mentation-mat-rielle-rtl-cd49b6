// Membrane model unit (MMU) of one column of the bit-slice network.
//
// Holds the neuron's P-bit membrane potential and its Spike flag. The
// threshold is 2^P: a carry out of the potential is a spike, and dropping
// that carry is the reset (the threshold is subtracted, the excess kept).
//
// Time evolution (evolve = 1, one time step per clock): the two MSBs of the
// potential pick one of four equally wide segments; a decoder turns them into
// a one-hot word 1000, 0100, 0010, 0001 for segments 0..3, which is shifted
// left by pwl_shift and added. Each segment therefore charges at half the
// slope of the one before, a concave, monotonically rising 4-segment
// piece-wise linear stand-in for the exponential charging curve; a larger
// shift makes a faster oscillator. With P = 16 and pwl_shift = 6 one period is
// 32+64+128+256 = 480 time steps. The decoder order is this design's choice.
//
// Spike propagation (shift = 1): the potential rotates one bit per clock,
// LSB first out on pot_lsb, and the synapse unit's sum bit enters at the MSB,
// so after P clocks the register holds potential + weight. ovf (carry out of
// that serial sum) sets Spike. clr_spike clears Spike (the reset of the
// neurons whose spike is being propagated). ld_en loads a potential from the
// host and clears Spike.
module bs_mmu #(
  parameter int unsigned P = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         evolve,
  input  logic [3:0]   pwl_shift,
  input  logic         shift,
  input  logic         sum_bit,
  input  logic         ovf,
  input  logic         clr_spike,
  input  logic         ld_en,
  input  logic [P-1:0] ld_val,
  output logic [P-1:0] pot,
  output logic         pot_lsb,
  output logic         spike
);

  logic [3:0]   onehot;
  logic [P:0]   next;

  always_comb begin
    unique case (pot[P-1 -: 2])
      2'b00: onehot = 4'b1000;
      2'b01: onehot = 4'b0100;
      2'b10: onehot = 4'b0010;
      default: onehot = 4'b0001;
    endcase
    next = {1'b0, pot} + ((P + 1)'(onehot) << pwl_shift);
  end

  assign pot_lsb = pot[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pot   <= '0;
      spike <= 1'b0;
    end else if (ld_en) begin
      pot   <= ld_val;
      spike <= 1'b0;
    end else if (evolve) begin
      pot <= next[P-1:0];
      if (next[P]) spike <= 1'b1;
    end else begin
      if (shift) pot <= {sum_bit, pot[P-1:1]};
      if (clr_spike) spike <= 1'b0;
      else if (ovf) spike <= 1'b1;
    end
  end

endmodule
