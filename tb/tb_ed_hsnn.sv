// End-to-end test of the event-driven network on a 16x16 grid (14x14 image
// plus an inactive border; left half dark, right half bright). Neurons are
// loaded with random firing times through the host port and the network runs
// for many events. A reference model, independent of the RTL, replays every
// event: the neuron the hardware picks must be one of the earliest in the
// model and its firing time must equal the new simulation time; the model
// then applies the same spike. At the end every neuron is read back and
// compared. A second run uses the fully-connected topology. Counted
// mechanisms: events, resets, neurons pushed to fire at once, wrap-around of
// the 13-bit time, skipped inactive neurons, fully-connected events.
module tb_ed_hsnn;
  import ed_pkg::*;
  import tb_ed_ref_pkg::*;
  localparam int NN = 256, RP = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic host_valid, host_ready, host_rd_valid, run_done, full_conn, lut_we, q_overflow;
  logic [1:0] host_cmd;
  logic [IDW-1:0] host_id, lut_data;
  nstate_t host_state, host_rd_data;
  logic [31:0] host_arg, n_events, n_synapses;
  logic [3:0] lut_addr;
  logic [TIME_W-1:0] sim_time;
  ed_hsnn #(.N_NEURONS(NN), .ROW_PITCH(RP)) dut (.*);

  int checks = 0, failures = 0;
  int n_ev = 0, n_reset = 0, n_now = 0, n_wrap = 0, n_inact = 0, n_full = 0;
  nstate_t model [NN];
  int offs [9] = '{0, -RP-1, -RP, -RP+1, -1, 1, RP-1, RP, RP+1};
  int prev_now = 0, nsyn = 9;
  bit fullc = 0;

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // replay each event in the model when the hardware starts it
  always @(negedge clk) if (dut.u_ctrl.pe_valid && dut.u_ctrl.syn_nbr == 0) begin
    int pre, now, kmin;
    pre = int'(dut.u_ctrl.pre_id); now = int'(dut.u_ctrl.sim_time);
    kmin = 99999;
    for (int i = 0; i < NN; i++) if (model[i].active) kmin = (((int'(model[i].ftime) - prev_now) & 8191) < kmin) ? ((int'(model[i].ftime) - prev_now) & 8191) : kmin;
    chk(model[pre].active && int'(model[pre].ftime) == now, $sformatf("event neuron %0d time", pre));
    chk(((now - prev_now) & 8191) == kmin, "event is the earliest");
    if (now < prev_now) n_wrap++;
    prev_now = now;
    n_ev++; n_reset++;
    if (fullc) n_full++;
    for (int s = 0; s < nsyn; s++) begin
      int post; bit same;
      post = fullc ? s : pre + offs[s];
      same = (post == pre);
      if (!model[post].active) n_inact++;
      else begin
        int t;
        t = ref_update(model[post].ftime, model[post].pix, model[pre].pix, same, now);
        if (!same && t == now) n_now++;
        model[post].ftime = TIME_W'(t);
      end
    end
  end

  task automatic host(input logic [1:0] cmd, input int id, input nstate_t st, input int arg);
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    host_valid = 1; host_cmd = cmd; host_id = IDW'(id); host_state = st; host_arg = arg;
    @(negedge clk);
    host_valid = 0;
    while (!host_ready) @(negedge clk);
  endtask

  task automatic readback();
    for (int i = 0; i < NN; i++) begin
      host(2'd1, i, '0, 0);
      @(negedge clk);
      wait (host_ready);
      chk(host_rd_data == model[i], $sformatf("neuron %0d: %0d exp %0d", i, host_rd_data.ftime, model[i].ftime));
    end
  endtask


  initial begin
    int t0;
    host_valid = 0; host_cmd = 0; host_id = 0; host_state = '0; host_arg = 0;
    full_conn = 0; lut_we = 0; lut_addr = 0; lut_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NN; i++) begin
      int r, c; r = i / RP; c = i % RP;
      model[i].active = !(r == 0 || c == 0 || r == RP - 1 || c == RP - 1);
      model[i].ftime = TIME_W'($urandom);
      model[i].pix = (c < 8) ? PIX_W'(40 + $urandom_range(4)) : PIX_W'(200 + $urandom_range(4));
      host(2'd0, i, model[i], 0);
    end
    t0 = $time;
    host(2'd2, 0, '0, 3000);
    wait (run_done); @(negedge clk);
    $display("run of %0d events: %0d cycles, %0d synapses", n_events, ($time - t0) / 10, n_synapses);
    chk(n_events == 3000 && n_ev == 3000, "event count");
    chk(!q_overflow, "queue never overflowed");
    readback();
    // fully-connected topology, 256 synapses per neuron
    full_conn = 1; fullc = 1; nsyn = NN;
    host(2'd3, 0, '0, NN);
    host(2'd2, 0, '0, 20);
    wait (run_done); @(negedge clk);
    chk(n_events == 3020, "fully-connected events");
    readback();
    $display("events=%0d resets=%0d fire_now=%0d wraps=%0d inactive_skips=%0d full_conn_events=%0d",
             n_ev, n_reset, n_now, n_wrap, n_inact, n_full);
    chk(n_ev > 0, "events happened");
    chk(n_now > 0, "a neuron was pushed to fire at once");
    chk(n_wrap > 0, "time wrapped");
    chk(n_inact > 0, "inactive neurons skipped");
    chk(n_full > 0, "fully-connected mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
