// Merger of the event-driven network.
//
// With several processing elements, each feeding its own event queue, the
// next event of the whole network is the earliest of the queues' root nodes.
// The merger compares them, as (firing time - simulation time) modulo 2^13,
// and presents the winner; ties go to the lowest queue index. It is
// combinational. With the single queue of the default build it simply
// forwards that queue's root.
module ed_merger
  import ed_pkg::*;
#(
  parameter int unsigned NQ = 1
) (
  input  logic [TIME_W-1:0] now,
  input  logic              q_valid [NQ],
  input  logic [IDW-1:0]    q_id    [NQ],
  input  logic [TIME_W-1:0] q_time  [NQ],
  input  logic [PIX_W-1:0]  q_pix   [NQ],
  output logic              top_valid,
  output logic [IDW-1:0]    top_id,      // TopNeuronID
  output logic [TIME_W-1:0] top_time,    // TopFiringTime
  output logic [PIX_W-1:0]  top_pix,     // TopPixelValue
  output logic [$clog2(NQ+1)-1:0] top_q  // which queue won
);

  always_comb begin
    top_valid = 1'b0;
    top_id    = '0;
    top_time  = '0;
    top_pix   = '0;
    top_q     = '0;
    for (int i = 0; i < NQ; i++) begin
      if (q_valid[i] && (!top_valid || key_of(q_time[i], now) < key_of(top_time, now))) begin
        top_valid = 1'b1;
        top_id    = q_id[i];
        top_time  = q_time[i];
        top_pix   = q_pix[i];
        top_q     = ($clog2(NQ+1))'(i);
      end
    end
  end

endmodule
