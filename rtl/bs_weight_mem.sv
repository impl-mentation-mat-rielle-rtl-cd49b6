// Weight memory array of the bit-slice network.
//
// Column i stores the weights of all synapses onto neuron i, N weights of W
// bits. The array is organised by bit: one address selects the same bit of
// the same weight slot in every column, and a read returns one bit per column
// (an N-bit row). Address = slot*W + bit. Slot k of column i holds the weight
// from neuron (i-k) mod N, the neuron whose spiking bit column i holds after k
// ring shifts; 0 where there is no synapse.
//
// Reads are synchronous (data one clock after the address). The load port
// writes a whole row, one bit of one weight slot in every column, as the
// serial-to-parallel loading register does; rows read back the same way.
module bs_weight_mem #(
  parameter int unsigned N = 648,
  parameter int unsigned W = 11
) (
  input  logic                       clk,
  input  logic [$clog2(N*W)-1:0]     addr,
  output logic [N-1:0]               rd_bits,
  input  logic                       ld_en,
  input  logic [$clog2(N*W)-1:0]     ld_addr,
  input  logic [N-1:0]               ld_row
);

  logic [N-1:0] mem [N*W];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_row;
    rd_bits <= mem[addr];
  end

endmodule
