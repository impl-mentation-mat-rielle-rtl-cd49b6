// Test of the bit-slice controller at N = 5 columns, P = 4-bit potentials,
// W = 3-bit weights. The testbench plays the network: it raises
// spike_detect at random during evolution, drops it when the spiking bits are
// latched (load_sb) and raises it again at random during a propagation (a
// cascade). Every clock edge it checks: evolve only while no spike is pending and
// steps remain; a propagation is one load_sb clock, then exactly N*P add_en
// clocks with first/last/w_en/shift_sb at the right bit positions and the
// weight address of each used bit (slot*W + bit) presented one clock
// earlier, then one check clock, P*N+2 clocks in all; cascades go straight to
// the next propagation; the run ends after run_steps evolution steps; the
// n_steps / n_props counters match.
module tb_bs_controller;
  localparam int N = 5, P = 4, W = 3, AW = $clog2(N * W);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic start, spike_detect, busy, evolve, load_sb, shift_sb, add_en, first, last, w_en;
  logic [31:0] run_steps, n_steps, n_props;
  logic [AW-1:0] wmem_addr;
  bs_controller #(.N(N), .P(P), .W(W)) dut (.*);
  int checks = 0, failures = 0;
  int n_ev = 0, n_prop = 0, n_casc = 0, steps_left = 0;
  int phase = 0;   // 0 evolve/idle, 1 inside propagation (idx counts add_en clocks), 2 check clock
  int idx = 0, prop_len = 0;
  logic [AW-1:0] prev_addr;
  logic pend;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  always @(posedge clk) if (rst_n && busy) begin
    if (phase == 0) begin
      chk(!add_en && !shift_sb, "no add while evolving");
      if (load_sb) begin
        chk(pend && !evolve, "propagation starts on a pending spike");
        phase = 1; idx = 0; prop_len = 1; n_prop++;
        pend = 0;
      end else if (evolve) begin
        chk(!pend && steps_left > 0, "evolve only without spike and with steps left");
        steps_left--; n_ev++;
        if ($urandom_range(0, 9) == 0) pend = 1;
      end
    end else if (phase == 1) begin
      prop_len++;
      chk(add_en && !evolve && !load_sb, "add_en through the propagation");
      chk(first == (idx % P == 0) && last == (idx % P == P - 1), "first/last");
      chk(w_en == (idx % P < W) && shift_sb == last, "w_en/shift_sb");
      if (w_en) chk(prev_addr == AW'((idx / P) * W + idx % P), $sformatf("weight address idx %0d: %0d", idx, prev_addr));
      if ($urandom_range(0, 60) == 0) pend = 1;
      idx++;
      if (idx == N * P) phase = 2;
    end else begin
      prop_len++;
      chk(!add_en && !evolve && !load_sb, "check clock");
      chk(prop_len == P * N + 2, "propagation length P*N+2");
      phase = 0;
      if (pend) n_casc++;
    end
  end
  always @(negedge clk) spike_detect = pend;
  always @(posedge clk) prev_addr <= wmem_addr;

  initial begin
    start = 0; run_steps = 0; spike_detect = 0; pend = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int rs;
      rs = $urandom_range(0, 200);
      @(negedge clk); start = 1; run_steps = rs; steps_left = rs; n_prop = 0; n_ev = 0;
      @(negedge clk); start = 0;
      while (busy) @(negedge clk);
      chk(steps_left == 0 && !pend, "run completed");
      chk(n_steps == rs && n_ev == rs, "n_steps");
      chk(n_props == n_prop, "n_props");
    end
    $display("cascaded propagations: %0d", n_casc);
    chk(n_casc > 0, "cascade happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
