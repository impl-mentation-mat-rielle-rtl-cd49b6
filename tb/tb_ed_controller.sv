// Self-checking test of the event-driven controller against simple stand-ins
// for the processing element (answers 4 cycles after each synapse) and the
// event queue (input busy for a random time after each request, and its root
// unsettled for a random, longer time). Checks the host
// commands (load with and without queue insert, read back, synapse count),
// that each event jumps the simulation time to the top firing time and issues
// synapse numbers 0..n-1 with the top neuron's ID and pixel, that updates
// reach the queue as delete-inserts, that no synapse is issued while the queue
// is busy, that no event is taken while the queue root is unsettled, and that runs stop after the requested events or an empty queue.
module tb_ed_controller;
  import ed_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic host_valid, host_ready, host_rd_valid, run_done;
  logic [1:0] host_cmd;
  logic [IDW-1:0] host_id, pre_id, pe_out_id, ext_wr_addr, ext_rd_addr, q_id, top_id;
  nstate_t host_state, host_rd_data, ext_wr_data, ext_rd_data;
  logic [31:0] host_arg, n_events, n_synapses;
  logic top_valid, pe_valid, pe_out_valid, pe_out_active, ext_wr_en, ext_rd_en, q_valid, q_ready, q_stable;
  logic [TIME_W-1:0] top_time, sim_time, pe_out_time, q_time;
  logic [PIX_W-1:0] top_pix, pre_pix, pe_out_pix, q_pix;
  logic [SNW-1:0] syn_nbr;
  q_op_e q_op;
  ed_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // PE stand-in
  logic [3:0] pv_sh = '0; logic [SNW-1:0] syn_d [4]; logic [IDW-1:0] id_d [4]; logic [TIME_W-1:0] t_d [4];
  always_ff @(posedge clk) begin
    pv_sh <= {pv_sh[2:0], pe_valid};
    syn_d[0] <= syn_nbr; id_d[0] <= pre_id; t_d[0] <= sim_time;
    for (int i = 1; i < 4; i++) begin syn_d[i] <= syn_d[i-1]; id_d[i] <= id_d[i-1]; t_d[i] <= t_d[i-1]; end
  end
  assign pe_out_valid  = pv_sh[3];
  assign pe_out_active = syn_d[3] != 3;
  assign pe_out_id     = id_d[3] + IDW'(syn_d[3]);
  assign pe_out_time   = t_d[3] + TIME_W'(syn_d[3]);
  assign pe_out_pix    = PIX_W'(syn_d[3]);
  assign ext_rd_data   = '{active: 1'b1, ftime: TIME_W'(ext_rd_addr * 3), pix: PIX_W'(ext_rd_addr)};

  // queue stand-in
  int busy_cnt = 0, stab_cnt = 0, n_fetch_wait = 0;
  logic was_fetch_unstable = 1'b0;
  int n_upd = 0, n_ins = 0;
  q_op_e last_op; logic [IDW-1:0] last_id; logic [TIME_W-1:0] last_t;
  assign q_ready  = (busy_cnt == 0);
  assign q_stable = (busy_cnt == 0) && (stab_cnt == 0);
  always @(posedge clk) begin
    if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (stab_cnt > 0) stab_cnt <= stab_cnt - 1;
    if (busy_cnt == 0 && q_valid) begin
      busy_cnt <= $urandom_range(1, 12);
      stab_cnt <= $urandom_range(1, 30);
      last_op <= q_op; last_id <= q_id; last_t <= q_time;
      if (q_op == Q_UPDATE) n_upd++; else n_ins++;
    end
  end

  // synapse issue checker
  int exp_syn = 0, nsyn = 9, issued = 0;
  always @(negedge clk) if (rst_n && pe_valid) begin
    chk(q_ready, "issue while queue busy");
    chk(syn_nbr == SNW'(exp_syn), $sformatf("synapse %0d exp %0d", syn_nbr, exp_syn));
    chk(pre_id == top_id && pre_pix == top_pix && sim_time == top_time, "event fields");
    exp_syn = (exp_syn + 1) % nsyn;
    issued++;
  end
  // the next event is only taken from a settled queue root (state 3 = fetch)
  always @(negedge clk) if (rst_n) begin
    if (was_fetch_unstable) chk(int'(dut.state) == 3, "fetch waits for a settled queue root");
    was_fetch_unstable = (int'(dut.state) == 3) && !q_stable;
    if (was_fetch_unstable) n_fetch_wait++;
  end
  // update forwarding checker
  always @(negedge clk) if (rst_n && pe_out_valid && pe_out_active) begin
    chk(q_valid && q_op == Q_UPDATE && q_id == pe_out_id && q_time == pe_out_time && q_pix == pe_out_pix, "update forwarded");
  end
  // a new top after every event
  always @(n_events) if (rst_n) begin
    top_id = IDW'($urandom); top_time = top_time + TIME_W'($urandom_range(50)); top_pix = PIX_W'($urandom);
  end

  task automatic host(input logic [1:0] cmd, input int id, input nstate_t st, input int arg);
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    host_valid = 1; host_cmd = cmd; host_id = IDW'(id); host_state = st; host_arg = arg;
    @(negedge clk);
    host_valid = 0;
  endtask

  initial begin
    int ev0;
    host_valid = 0; host_cmd = 0; host_id = 0; host_state = '0; host_arg = 0;
    top_valid = 1; top_id = 16'd1234; top_time = 13'd100; top_pix = 8'd77;
    repeat (2) @(negedge clk); rst_n = 1;
    // load an active neuron: state write and queue insert
    fork
      host(2'd0, 55, '{active: 1'b1, ftime: 13'd999, pix: 8'd12}, 0);
      begin @(posedge ext_wr_en); #1; chk(ext_wr_addr == 16'd55 && ext_wr_data.ftime == 13'd999, "load write"); end
    join
    wait (host_ready); @(negedge clk);
    chk(n_ins == 1 && last_op == Q_INSERT && last_id == 16'd55 && last_t == 13'd999, "load insert");
    // load an inactive neuron: no insert
    host(2'd0, 56, '{active: 1'b0, ftime: 13'd5, pix: 8'd1}, 0);
    repeat (20) @(negedge clk);
    chk(n_ins == 1, "inactive neuron not inserted");
    // read back
    fork
      host(2'd1, 21, '0, 0);
      begin @(posedge host_rd_valid); #1; chk(host_rd_data.ftime == 13'd63 && host_rd_data.pix == 8'd21, "read back"); end
    join
    // run 5 events of 9 synapses
    ev0 = issued;
    host(2'd2, 0, '0, 5);
    wait (run_done); @(negedge clk);
    chk(n_events == 5, "events counted");
    chk(issued - ev0 == 45 && n_synapses == 45, $sformatf("synapses issued %0d", issued - ev0));
    chk(n_upd == 40, $sformatf("updates %0d (inactive synapse 3 skipped)", n_upd));
    // 4 synapses per neuron
    host(2'd3, 0, '0, 4); nsyn = 4; exp_syn = 0;
    ev0 = issued;
    host(2'd2, 0, '0, 3);
    wait (run_done); @(negedge clk);
    chk(issued - ev0 == 12 && n_events == 8, "synapse count setting");
    // empty queue ends the run at once
    top_valid = 0;
    ev0 = issued;
    host(2'd2, 0, '0, 10);
    wait (run_done); @(negedge clk);
    chk(issued == ev0 && n_events == 8, "empty queue");
    chk(n_fetch_wait > 0, "fetch waited for the queue root at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
