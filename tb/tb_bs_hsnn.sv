// End-to-end test of the bit-slice network at N = 8 columns (P = 16,
// W = 11). Random weights (self weight 0) are loaded row by row and read back;
// potentials are loaded, some equal (simultaneous spikes) and some just
// below the threshold (cascades). Runs of random length and curve shift are
// compared with the reference model: every potential after the run, the
// number of time steps and propagations in the status registers, and the
// exact number of busy clocks (P*N+2 per propagation). Counted mechanisms:
// time steps, propagations, cascaded propagations, propagations carrying
// several spikes, threshold crossings from a weight and from evolution.
// A final long run with equal excitatory weights shows the neurons locking
// into one group that fires together.
module tb_bs_hsnn;
  import tb_bs_ref_pkg::*;

  localparam int N = 8, P = 16, W = 11, AW = $clog2(N * W);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_wr, wld_en, pot_wr, busy, spike_detect;
  logic [2:0] cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic [AW-1:0] wld_addr;
  logic [N-1:0] wld_row, wrd_row, spikes;
  logic [$clog2(N)-1:0] pot_col;
  logic [P-1:0] pot_wdata, pot_rdata;
  bs_hsnn #(.N(N), .P(P), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  int pot[], w[];
  bit spk[];
  int st[];
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  task automatic load_weights();
    for (int k = 0; k < N; k++)
      for (int b = 0; b < W; b++) begin
        @(negedge clk); wld_en = 1; wld_addr = AW'(k * W + b);
        for (int i = 0; i < N; i++) wld_row[i] = (w[i * N + k] >> b) & 1;
      end
    @(negedge clk); wld_en = 0;
    for (int a = 0; a < N * W; a++) begin
      logic [N-1:0] e;
      wld_addr = AW'(a); @(negedge clk);
      for (int i = 0; i < N; i++) e[i] = (w[i * N + a / W] >> (a % W)) & 1;
      chk(wrd_row == e, "weight row read back");
    end
  endtask

  task automatic load_pots();
    for (int i = 0; i < N; i++) begin
      @(negedge clk); pot_wr = 1; pot_col = 3'(i); pot_wdata = P'(pot[i]); spk[i] = 0;
    end
    @(negedge clk); pot_wr = 0;
  endtask

  task automatic cfg(input int a, input int d);
    @(negedge clk); cfg_wr = 1; cfg_addr = 3'(a); cfg_wdata = d; @(negedge clk); cfg_wr = 0;
  endtask

  task automatic run(input int steps, input int sh);
    longint exp_cyc, cyc;
    int props0;
    props0 = st[1];
    cfg(1, sh);
    exp_cyc = bs_ref_run(N, P, sh, steps, pot, spk, w, st);
    @(negedge clk); cfg_wr = 1; cfg_addr = 0; cfg_wdata = steps;
    @(negedge clk); cfg_wr = 0;
    @(negedge clk);
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    chk(cyc == exp_cyc, $sformatf("busy clocks %0d exp %0d", cyc, exp_cyc));
    cfg_addr = 3; #1 chk(cfg_rdata == st[1] - props0, "n_props register");
    cfg_addr = 4; #1 chk(cfg_rdata == steps, "n_steps register");
    chk(spikes == 0 && !spike_detect, "no spike left at the end");
    for (int i = 0; i < N; i++) begin
      pot_col = 3'(i); #1;
      chk(int'(pot_rdata) == pot[i], $sformatf("pot %0d = %0d exp %0d", i, pot_rdata, pot[i]));
    end
  endtask

  initial begin
    cfg_wr = 0; cfg_addr = 0; cfg_wdata = 0; wld_en = 0; wld_addr = 0; wld_row = 0;
    pot_wr = 0; pot_col = 0; pot_wdata = 0;
    pot = new[N]; w = new[N * N]; spk = new[N];
    st = new[9];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) w[i * N + k] = (k == 0) ? 0 : $urandom_range(0, (1 << W) - 1);
      load_weights();
      for (int i = 0; i < N; i++) pot[i] = $urandom_range(0, (1 << P) - 1);
      pot[1] = pot[0]; pot[2] = pot[0];                   // fire together
      pot[3] = (1 << P) - $urandom_range(1, 1500);        // close to threshold
      pot[4] = (1 << P) - $urandom_range(1, 1500);
      load_pots();
      run($urandom_range(50, 600), $urandom_range(5, 8));
    end
    // synchronisation: all-to-all excitation
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) w[i * N + k] = (k == 0) ? 0 : 1500;
    load_weights();
    for (int i = 0; i < N; i++) pot[i] = $urandom_range(0, (1 << P) - 1);
    load_pots();
    st[8] = 0;
    run(20000, 6);
    $display("steps=%0d props=%0d chains=%0d cascades=%0d multi=%0d max_spikes=%0d max_per_step=%0d weight_crossings=%0d step_crossings=%0d",
             st[0], st[1], st[2], st[3], st[4], st[5], st[8], st[6], st[7]);
    chk(st[0] > 0, "time steps");
    chk(st[1] > 0, "propagations");
    chk(st[3] > 0, "cascaded propagation");
    chk(st[4] > 0, "several spikes in one propagation");
    chk(st[6] > 0, "threshold crossed by a weight");
    chk(st[8] == N, "all neurons fire in one time step after synchronising");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
