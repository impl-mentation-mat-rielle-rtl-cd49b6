// Synapse model unit (SMU) of one column of the bit-slice network.
//
// Holds the column's spiking bit (SB), one stage of the ring that carries
// every column's "I fired" bit around the network during spike propagation,
// and a one-bit serial adder. While a weight is added, the potential arrives
// LSB first on pot_bit and the weight bits on w_bit; the adder adds the weight
// only when SB is set, i.e. when the column whose bit is currently held
// fired. The weight is W bits and the potential P bits: w_en is high for the
// first W bits and low for the remaining P-W, which only propagate the carry.
// first clears the carry at bit 0; at the last bit a carry out is reported on
// ovf (the potential crossed the threshold).
//
// load_sb copies the column's own Spike into SB at the start of a
// propagation; shift_sb takes the left neighbour's bit (sb_in).
module bs_smu (
  input  logic clk,
  input  logic rst_n,
  input  logic spike,
  input  logic load_sb,
  input  logic shift_sb,
  input  logic sb_in,
  output logic sb_out,
  input  logic add_en,
  input  logic first,
  input  logic last,
  input  logic w_en,
  input  logic w_bit,
  input  logic pot_bit,
  output logic sum_bit,
  output logic ovf
);

  logic sb, carry, c_in, a, cout;

  assign sb_out  = sb;
  assign c_in    = first ? 1'b0 : carry;
  assign a       = w_bit & w_en & sb;
  assign sum_bit = pot_bit ^ a ^ c_in;
  assign cout    = (pot_bit & a) | (pot_bit & c_in) | (a & c_in);
  assign ovf     = add_en & last & cout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb    <= 1'b0;
      carry <= 1'b0;
    end else begin
      if (load_sb)       sb <= spike;
      else if (shift_sb) sb <= sb_in;
      if (add_en)        carry <= cout;
    end
  end

endmodule
