// Neuron state memory of the event-driven network.
//
// One word per neuron: an active bit (border neurons are inactive and never
// fire), the predicted firing time and the pixel value. It has one read port,
// used by pipeline stage 2, and one write port, used by the write-back of
// stage 5 and by host loading. Both are synchronous: read data appears one
// clock after the address, a write lands at the clock edge. A read and a
// write to the same address in one cycle return the old word.
module ed_state_mem
  import ed_pkg::*;
#(
  parameter int unsigned DEPTH = 65536
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output nstate_t                  rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  nstate_t                  wr_data
);

  nstate_t mem [DEPTH];

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
