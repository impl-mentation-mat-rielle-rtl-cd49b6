// Controller of the event-driven network.
//
// Runs the event loop: take the next event (the earliest neuron) from the
// merger, jump the simulation time to its firing time, then hand the
// processing element the synapse numbers 0 .. n_syn-1 of that neuron together
// with its ID and pixel value. Each update coming out of the processing
// element is passed to the event queue as a delete-insert (Q_UPDATE) so the
// neuron moves to its new place in firing order. The next synapse is issued
// once the queue has accepted the previous update (the queue works on several
// updates at once, one tree level apart), and the next event is taken once
// the last update has been accepted and the queue reports its root final
// (q_stable). A run stops after run_events events or when the queue is empty.
//
// It also serves the host while idle (host_ready high), one command at a time:
//   H_LOAD  write neuron host_id (firing time, pixel, active) and, if active,
//           insert it in the event queue
//   H_READ  read neuron host_id back: host_rd_valid pulses with host_rd_data
//   H_RUN   process host_arg events
//   H_NSYN  set the number of synapses per neuron to host_arg
// The command set and the parallel host port are this design's own; the
// topology table and mode are written directly through the network's ports.
module ed_controller
  import ed_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              host_valid,
  output logic              host_ready,
  input  logic [1:0]        host_cmd,
  input  logic [IDW-1:0]    host_id,
  input  nstate_t           host_state,
  input  logic [31:0]       host_arg,
  output logic              host_rd_valid,
  output nstate_t           host_rd_data,
  output logic              run_done,       // pulse at the end of a run
  // next event, from the merger
  input  logic              top_valid,
  input  logic [IDW-1:0]    top_id,
  input  logic [TIME_W-1:0] top_time,
  input  logic [PIX_W-1:0]  top_pix,
  // to the processing element
  output logic [TIME_W-1:0] sim_time,       // SimulationTime
  output logic              pe_valid,
  output logic [SNW-1:0]    syn_nbr,        // SynapseNbr
  output logic [IDW-1:0]    pre_id,         // PreNeuronID
  output logic [PIX_W-1:0]  pre_pix,        // PrePixelValue
  input  logic              pe_out_valid,
  input  logic              pe_out_active,
  input  logic [IDW-1:0]    pe_out_id,
  input  logic [TIME_W-1:0] pe_out_time,
  input  logic [PIX_W-1:0]  pe_out_pix,
  output logic              ext_wr_en,
  output logic [IDW-1:0]    ext_wr_addr,
  output nstate_t           ext_wr_data,
  output logic              ext_rd_en,
  output logic [IDW-1:0]    ext_rd_addr,
  input  nstate_t           ext_rd_data,
  // to the event queue
  output logic              q_valid,
  input  logic              q_ready,
  input  logic              q_stable,       // queue root final
  output q_op_e             q_op,
  output logic [IDW-1:0]    q_id,
  output logic [TIME_W-1:0] q_time,
  output logic [PIX_W-1:0]  q_pix,
  // statistics
  output logic [31:0]       n_events,
  output logic [31:0]       n_synapses
);

  localparam logic [1:0] H_LOAD = 2'd0, H_READ = 2'd1, H_RUN = 2'd2, H_NSYN = 2'd3;

  typedef enum logic [2:0] {
    C_IDLE, C_LOADQ, C_READ, C_FETCH, C_ISSUE, C_WAITPE, C_WAITQ
  } cstate_e;

  cstate_e        state;
  logic [31:0]    events_left;
  logic [SNW-1:0] n_syn;
  q_elem_t        ld;

  assign host_ready = (state == C_IDLE);

  always_comb begin
    ext_wr_en   = (state == C_IDLE) && host_valid && host_cmd == H_LOAD;
    ext_wr_addr = host_id;
    ext_wr_data = host_state;
    ext_rd_en   = (state == C_IDLE) && host_valid && host_cmd == H_READ;
    ext_rd_addr = host_id;
    pe_valid    = (state == C_ISSUE) && q_ready;
    q_valid     = 1'b0;
    q_op        = Q_UPDATE;
    q_id        = pe_out_id;
    q_time      = pe_out_time;
    q_pix       = pe_out_pix;
    if (state == C_LOADQ) begin
      q_valid = 1'b1;
      q_op    = Q_INSERT;
      q_id    = ld.id;
      q_time  = ld.time_;
      q_pix   = ld.pix;
    end else if (state == C_WAITPE && pe_out_valid && pe_out_active) begin
      q_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      events_left   <= '0;
      n_syn         <= SNW'(9);
      ld            <= '0;
      sim_time      <= '0;
      syn_nbr       <= '0;
      pre_id        <= '0;
      pre_pix       <= '0;
      host_rd_valid <= 1'b0;
      host_rd_data  <= '0;
      run_done      <= 1'b0;
      n_events      <= '0;
      n_synapses    <= '0;
    end else begin
      host_rd_valid <= 1'b0;
      run_done      <= 1'b0;
      unique case (state)
        C_IDLE: if (host_valid) begin
          unique case (host_cmd)
            H_LOAD: if (host_state.active) begin
              ld    <= '{valid: 1'b1, id: host_id, time_: host_state.ftime, pix: host_state.pix};
              state <= C_LOADQ;
            end
            H_READ: state <= C_READ;
            H_RUN: begin
              events_left <= host_arg;
              state       <= C_FETCH;
            end
            H_NSYN: n_syn <= host_arg[SNW-1:0];
            default: ;
          endcase
        end

        C_LOADQ: if (q_ready) state <= C_WAITQ;

        C_READ: begin
          host_rd_valid <= 1'b1;
          host_rd_data  <= ext_rd_data;
          state         <= C_IDLE;
        end

        C_FETCH: if (q_stable) begin
          if (!top_valid || events_left == 0) begin
            run_done <= 1'b1;
            state    <= C_IDLE;
          end else begin
            sim_time <= top_time;
            pre_id   <= top_id;
            pre_pix  <= top_pix;
            syn_nbr  <= '0;
            state    <= C_ISSUE;
          end
        end

        C_ISSUE: if (q_ready) state <= C_WAITPE;

        C_WAITPE: if (pe_out_valid) begin
          n_synapses <= n_synapses + 1'b1;
          state      <= C_WAITQ;
        end

        C_WAITQ: if (q_ready && !q_valid) begin
          if (ld.valid) begin
            // end of a host load
            ld.valid <= 1'b0;
            state    <= C_IDLE;
          end else if (syn_nbr + 1'b1 == n_syn) begin
            n_events    <= n_events + 1'b1;
            events_left <= events_left - 1'b1;
            state       <= C_FETCH;
          end else begin
            syn_nbr <= syn_nbr + 1'b1;
            state   <= C_ISSUE;
          end
        end

        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
