// Full-size run of the top level with every parameter at its default: the
// event-driven network with 65 536 neurons (a 408 x 160 grid: a 406 x 158
// image inside an inactive border, plus unused IDs) and the bit-slice network
// with 648 columns (a 24 x 27 image with 8-neighbour synapses). Both are
// loaded through their host ports and run at the same time: 3000 events on
// the event-driven side, each replayed and checked in a reference model, with
// every neuron read back afterwards; 40 time steps on the bit-slice side with
// all propagations they trigger, checked potential by potential and clock by
// clock against a reference model.
module tb_odlm_full;
  import ed_pkg::*;
  import tb_ed_ref_pkg::*;
  import tb_bs_ref_pkg::*;
  localparam int NN = 65536, RP = 408, ROWS = 160;
  localparam int BN = 648, BP = 16, BW = 11, BAW = $clog2(BN * BW), BC = 27;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic ed_host_valid, ed_host_ready, ed_host_rd_valid, ed_run_done, ed_full_conn, ed_lut_we, ed_q_overflow;
  logic [1:0] ed_host_cmd;
  logic [IDW-1:0] ed_host_id, ed_lut_data;
  nstate_t ed_host_state, ed_host_rd_data;
  logic [31:0] ed_host_arg, ed_n_events, ed_n_synapses;
  logic [3:0] ed_lut_addr;
  logic [TIME_W-1:0] ed_sim_time;
  logic bs_cfg_wr, bs_wld_en, bs_pot_wr, bs_busy, bs_spike_detect;
  logic [2:0] bs_cfg_addr;
  logic [31:0] bs_cfg_wdata, bs_cfg_rdata;
  logic [BAW-1:0] bs_wld_addr;
  logic [BN-1:0] bs_wld_row, bs_wrd_row, bs_spikes;
  logic [$clog2(BN)-1:0] bs_pot_col;
  logic [BP-1:0] bs_pot_wdata, bs_pot_rdata;

  odlm_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // ---------------- event-driven network ----------------
  int n_ev = 0, n_reset = 0, n_now = 0, n_wrap = 0, n_inact = 0, n_full = 0, n_lut = 0;
  nstate_t model [NN];
  int offs [16];
  int prev_now = 0, nsyn = 9;
  bit fullc = 0, lut4 = 0;

  always @(negedge clk) if (dut.u_ed.u_ctrl.pe_valid && dut.u_ed.u_ctrl.syn_nbr == 0) begin
    int pre, now, kmin;
    pre = int'(dut.u_ed.u_ctrl.pre_id); now = int'(dut.u_ed.u_ctrl.sim_time);
    kmin = 99999;
    for (int i = 0; i < NN; i++)
      if (model[i].active && ((int'(model[i].ftime) - prev_now) & 8191) < kmin) kmin = (int'(model[i].ftime) - prev_now) & 8191;
    chk(model[pre].active && int'(model[pre].ftime) == now, $sformatf("event neuron %0d time", pre));
    chk(((now - prev_now) & 8191) == kmin, "event is the earliest");
    if (now < prev_now) n_wrap++;
    prev_now = now;
    n_ev++; n_reset++;
    if (fullc) n_full++;
    if (lut4) n_lut++;
    for (int s = 0; s < nsyn; s++) begin
      int post; bit same;
      post = fullc ? s : (pre + offs[s]) & (NN - 1);
      same = fullc ? (post == pre) : (offs[s] == 0);
      if (!model[post].active) n_inact++;
      else begin
        int t;
        t = ref_update(model[post].ftime, model[post].pix, model[pre].pix, same, now);
        if (!same && t == now) n_now++;
        model[post].ftime = TIME_W'(t);
      end
    end
  end

  task automatic ed_host(input logic [1:0] cmd, input int id, input nstate_t st, input int arg);
    @(negedge clk);
    while (!ed_host_ready) @(negedge clk);
    ed_host_valid = 1; ed_host_cmd = cmd; ed_host_id = IDW'(id); ed_host_state = st; ed_host_arg = arg;
    @(negedge clk);
    ed_host_valid = 0;
    while (!ed_host_ready) @(negedge clk);
  endtask

  task automatic ed_readback();
    for (int i = 0; i < NN; i++) begin
      ed_host(2'd1, i, '0, 0);
      chk(ed_host_rd_data == model[i], $sformatf("neuron %0d", i));
    end
  endtask

  task automatic ed_run(input int n);
    int e0;
    longint t0;
    e0 = ed_n_events;
    t0 = $time;
    ed_host(2'd2, 0, '0, n);
    wait (ed_run_done); @(negedge clk);
    chk(ed_n_events == e0 + n, "event count");
    // 9 synapses per event, one queue update every 9 clocks, plus the wait
    // for the queue root before each event
    $display("event-driven run: %0d clocks for %0d events", ($time - t0) / 10, n);
    chk(($time - t0) / 10 <= longint'(n) * 120, "event throughput");
    ed_readback();
  endtask

  task automatic ed_test();
    offs = '{0, -RP-1, -RP, -RP+1, -1, 1, RP-1, RP, RP+1, 0, 0, 0, 0, 0, 0, 0};
    for (int i = 0; i < NN; i++) begin
      int r, c; r = i / RP; c = i % RP;
      model[i].active = !(r == 0 || c == 0 || r >= ROWS - 1 || c == RP - 1);
      model[i].ftime = TIME_W'($urandom);
      model[i].pix = (c < RP / 2) ? PIX_W'(60 + $urandom_range(4)) : PIX_W'(180 + $urandom_range(4));
      ed_host(2'd0, i, model[i], 0);
    end
    $display("event-driven network loaded at t=%0t", $time);
    ed_run(3000);
    chk(!ed_q_overflow, "event queue never overflowed");
  endtask

  // ---------------- bit-slice network ----------------
  int pot[], w[], st[];
  bit spk[];

  task automatic bs_cfg(input int a, input int d);
    @(negedge clk); bs_cfg_wr = 1; bs_cfg_addr = 3'(a); bs_cfg_wdata = d; @(negedge clk); bs_cfg_wr = 0;
  endtask

  task automatic bs_load();
    for (int k = 0; k < BN; k++)
      for (int b = 0; b < BW; b++) begin
        @(negedge clk); bs_wld_en = 1; bs_wld_addr = BAW'(k * BW + b);
        for (int i = 0; i < BN; i++) bs_wld_row[i] = (w[i * BN + k] >> b) & 1;
      end
    @(negedge clk); bs_wld_en = 0;
    for (int i = 0; i < BN; i++) begin
      @(negedge clk); bs_pot_wr = 1; bs_pot_col = 10'(i); bs_pot_wdata = BP'(pot[i]); spk[i] = 0;
    end
    @(negedge clk); bs_pot_wr = 0;
  endtask

  task automatic bs_run(input int steps, input int sh);
    longint exp_cyc, cyc;
    int p0;
    p0 = st[1];
    bs_cfg(1, sh);
    exp_cyc = bs_ref_run(BN, BP, sh, steps, pot, spk, w, st);
    bs_cfg(0, steps);
    @(negedge clk);
    cyc = 0;
    while (bs_busy) begin cyc++; @(negedge clk); end
    chk(cyc == exp_cyc, $sformatf("bit-slice busy clocks %0d exp %0d", cyc, exp_cyc));
    bs_cfg_addr = 3; #1 chk(bs_cfg_rdata == st[1] - p0, "n_props");
    bs_cfg_addr = 4; #1 chk(bs_cfg_rdata == steps, "n_steps");
    for (int i = 0; i < BN; i++) begin
      bs_pot_col = 10'(i); #1 chk(int'(bs_pot_rdata) == pot[i], "bit-slice potential");
    end
  endtask

  task automatic bs_test();
    pot = new[BN]; w = new[BN * BN]; spk = new[BN]; st = new[9];
    // 24 x 27 image, two halves; 8-neighbour synapses, strong inside a half
    for (int i = 0; i < BN * BN; i++) w[i] = 0;
    for (int i = 0; i < BN; i++)
      for (int dr = -1; dr <= 1; dr++)
        for (int dc = -1; dc <= 1; dc++) begin
          int r, c, j;
          r = i / BC + dr; c = i % BC + dc; j = r * BC + c;
          if ((dr != 0 || dc != 0) && r >= 0 && r < BN / BC && c >= 0 && c < BC)
            w[i * BN + (i - j + BN) % BN] = ((c < BC / 2) == ((i % BC) < BC / 2)) ? 1200 : 20;
        end
    for (int i = 0; i < BN; i++) pot[i] = $urandom_range(0, (1 << BP) - 1);
    pot[100] = pot[101];
    bs_load();
    $display("bit-slice network loaded at t=%0t", $time);
    bs_run(40, 6);
  endtask

  initial begin
    ed_host_valid = 0; ed_host_cmd = 0; ed_host_id = 0; ed_host_state = '0; ed_host_arg = 0;
    ed_full_conn = 0; ed_lut_we = 0; ed_lut_addr = 0; ed_lut_data = 0;
    bs_cfg_wr = 0; bs_cfg_addr = 0; bs_cfg_wdata = 0; bs_wld_en = 0; bs_wld_addr = 0; bs_wld_row = 0;
    bs_pot_wr = 0; bs_pot_col = 0; bs_pot_wdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      ed_test();
      bs_test();
    join
    $display("event-driven: events=%0d resets=%0d fire_now=%0d wraps=%0d inactive_skips=%0d lut_grid_events=%0d full_conn_events=%0d",
             n_ev, n_reset, n_now, n_wrap, n_inact, n_lut, n_full);
    $display("bit-slice: steps=%0d props=%0d cascades=%0d multi_spike=%0d weight_crossings=%0d ring_shifts=%0d",
             st[0], st[1], st[3], st[4], st[6], st[1] * BN);
    chk(n_ev > 0, "events");
    chk(n_reset > 0, "resets");
    chk(n_now > 0, "neuron pushed to fire at once");
    chk(n_inact > 0, "inactive neuron skipped");
    chk(st[0] > 0, "time steps");
    chk(st[1] > 0, "propagations");
    chk(st[4] > 0, "several spikes in one propagation");
    chk(st[6] > 0, "threshold crossing caused by a weight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
