// Configuration registers of the bit-slice network.
//
// Settings from the host and status back to it, on a small word-addressed
// register port:
//   0  run_steps   write: number of time steps to run; also starts the run
//   1  pwl_shift   write: left shift of the charging-curve decoder word (4 bits)
//   2  status      read: {31'b0, busy}
//   3  n_props     read: propagation phases in the current/last run
//   4  n_steps     read: time steps done in the current/last run
// Reads are combinational. The register map is this design's own.
module bs_config_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [2:0]  addr,
  input  logic [31:0] wr_data,
  output logic [31:0] rd_data,
  output logic [31:0] run_steps,
  output logic [3:0]  pwl_shift,
  output logic        start,
  input  logic        busy,
  input  logic [31:0] n_props,
  input  logic [31:0] n_steps
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_steps <= '0;
      pwl_shift <= 4'd6;
      start     <= 1'b0;
    end else begin
      start <= wr_en && addr == 3'd0 && !busy;
      if (wr_en && addr == 3'd0 && !busy) run_steps <= wr_data;
      if (wr_en && addr == 3'd1 && !busy) pwl_shift <= wr_data[3:0];
    end
  end

  always_comb begin
    unique case (addr)
      3'd0: rd_data = run_steps;
      3'd1: rd_data = {28'b0, pwl_shift};
      3'd2: rd_data = {31'b0, busy};
      3'd3: rd_data = n_props;
      3'd4: rd_data = n_steps;
      default: rd_data = '0;
    endcase
  end

endmodule
