// HSNN controller of the bit-slice network: the two-phase finite state
// machine.
//
//   time evolution : every MMU advances one time step per clock (evolve) as
//                    long as no neuron is spiking and run steps remain;
//   spike propagation : when spike_detect (the OR of every column's Spike) is
//                    high, one clock latches each column's Spike into its
//                    spiking bit and resets the firing neurons, then N ring
//                    positions of P clocks each follow. In each position the
//                    SMUs add, bit-serially, W weight bits and P-W carry-only
//                    bits; at its end the spiking bits move one column right.
//                    After N positions they are home again.
// If the propagation made new neurons fire, another propagation follows;
// otherwise time evolution resumes. One propagation takes P*N+2 clocks
// whatever the number of spikes it carries.
//
// The weight-memory bit address is a +1 counter that runs one clock ahead of
// use (the memory read is registered) and wraps to 0 after the last bit of the
// last weight slot. start begins a run of run_steps time steps; busy stays high
// until they are done and no spike is pending.
module bs_controller #(
  parameter int unsigned N = 648,
  parameter int unsigned P = 16,
  parameter int unsigned W = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [31:0]             run_steps,
  input  logic                    spike_detect,
  output logic                    busy,
  output logic                    evolve,
  output logic                    load_sb,
  output logic                    shift_sb,
  output logic                    add_en,
  output logic                    first,
  output logic                    last,
  output logic                    w_en,
  output logic [$clog2(N*W)-1:0]  wmem_addr,
  output logic [31:0]             n_steps,   // time steps done in this run
  output logic [31:0]             n_props    // propagation phases in this run
);

  localparam int unsigned AW = $clog2(N*W);
  localparam int unsigned BW = $clog2(P);
  localparam int unsigned SW = $clog2(N);

  typedef enum logic [2:0] {B_IDLE, B_EVOLVE, B_PSTART, B_PROP, B_PCHECK} bstate_e;

  bstate_e        state;
  logic [31:0]    steps_left;
  logic [BW-1:0]  bitc;
  logic [SW-1:0]  slot;
  logic [BW-1:0]  next_bit;

  assign busy     = (state != B_IDLE);
  assign evolve   = (state == B_EVOLVE) && !spike_detect && steps_left != 0;
  assign load_sb  = (state == B_PSTART);
  assign add_en   = (state == B_PROP);
  assign first    = (state == B_PROP) && bitc == '0;
  assign last     = (state == B_PROP) && bitc == BW'(P - 1);
  assign w_en     = (state == B_PROP) && bitc < BW'(W);
  assign shift_sb = last;
  assign next_bit = (bitc == BW'(P - 1)) ? '0 : bitc + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= B_IDLE;
      steps_left <= '0;
      bitc       <= '0;
      slot       <= '0;
      wmem_addr  <= '0;
      n_steps    <= '0;
      n_props    <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (start) begin
          steps_left <= run_steps;
          n_steps    <= '0;
          n_props    <= '0;
          state      <= B_EVOLVE;
        end

        B_EVOLVE: begin
          if (spike_detect) begin
            state <= B_PSTART;
          end else if (steps_left == 0) begin
            state <= B_IDLE;
          end else begin
            steps_left <= steps_left - 1'b1;
            n_steps    <= n_steps + 1'b1;
          end
        end

        B_PSTART: begin
          // address 0 is on the memory now; its data is used in the next clock
          wmem_addr <= AW'(1 % (N * W));
          bitc      <= '0;
          slot      <= '0;
          n_props   <= n_props + 1'b1;
          state     <= B_PROP;
        end

        B_PROP: begin
          bitc <= next_bit;
          if (next_bit < BW'(W) && !(last && slot == SW'(N - 1))) begin
            wmem_addr <= (wmem_addr == AW'(N * W - 1)) ? '0 : wmem_addr + 1'b1;
          end
          if (last) begin
            if (slot == SW'(N - 1)) begin
              wmem_addr <= '0;
              state     <= B_PCHECK;
            end else begin
              slot <= slot + 1'b1;
            end
          end
        end

        B_PCHECK: state <= spike_detect ? B_PSTART : B_EVOLVE;

        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
