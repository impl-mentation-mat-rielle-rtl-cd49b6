// Test of the bit-slice membrane model unit (P = 16). Checks, against an
// integer model written here: one evolution step from random potentials at
// every curve shift (segment slope = one-hot word << shift, carry -> Spike);
// the oscillation period from 0 to the threshold, 480 steps at shift 6; the
// per-segment step sizes 512/256/128/64 at shift 6; bit-serial rotation (sum
// bit in at the MSB, LSB out); Spike set by ovf, cleared by clr_spike and by
// a host load; load priority over evolution.
module tb_bs_mmu;
  localparam int P = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic evolve, shift, sum_bit, ovf, clr_spike, ld_en, pot_lsb, spike;
  logic [3:0] pwl_shift;
  logic [P-1:0] ld_val, pot;
  bs_mmu #(.P(P)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  function automatic int step_of(int p, int sh);
    return (8 >> (p >> (P - 2))) << sh;
  endfunction
  task automatic idle(); evolve = 0; shift = 0; sum_bit = 0; ovf = 0; clr_spike = 0; ld_en = 0; endtask
  task automatic load(input int v);
    @(negedge clk); idle(); ld_en = 1; ld_val = P'(v); @(negedge clk); ld_en = 0;
  endtask
  initial begin
    int p, n, exp_v, s;
    idle(); pwl_shift = 6; ld_val = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // single steps
    for (int i = 0; i < 2000; i++) begin
      p = $urandom_range(0, (1 << P) - 1); s = $urandom_range(0, 10);
      load(p); chk(spike == 0 && pot == P'(p), "load");
      pwl_shift = 4'(s); evolve = 1; @(negedge clk); evolve = 0;
      exp_v = p + step_of(p, s);
      chk(pot == P'(exp_v), $sformatf("step from %0d shift %0d: %0d", p, s, pot));
      chk(spike == (exp_v >= (1 << P)), "spike on carry");
    end
    // period and segment slopes at shift 6
    load(0); pwl_shift = 6; n = 0;
    evolve = 1;
    while (!spike && n < 1000) begin
      p = int'(pot);
      @(negedge clk); n++;
      if (!spike) chk(int'(pot) - p == step_of(p, 6), "segment slope");
    end
    evolve = 0;
    $display("period at shift 6: %0d steps", n);
    chk(n == 480, "period 480");
    chk(pot == 0, "reset keeps the excess (0)");
    // spike held while idle, cleared by clr_spike
    @(negedge clk); chk(spike == 1, "spike held");
    clr_spike = 1; @(negedge clk); clr_spike = 0; chk(spike == 0, "clr_spike");
    // serial rotation
    for (int i = 0; i < 200; i++) begin
      int v, r; logic [P-1:0] b;
      v = $urandom_range(0, (1 << P) - 1); b = P'($urandom);
      load(v);
      for (int k = 0; k < P; k++) begin
        chk(pot_lsb == pot[0], "lsb out");
        chk(pot_lsb == ((v >> k) & 1), "lsb order");
        shift = 1; sum_bit = b[k]; ovf = (k == P - 1) && b[0]; @(negedge clk);
      end
      shift = 0; ovf = 0;
      chk(pot == b, "rotated in sum bits");
      chk(spike == b[0], "ovf sets spike");
    end
    // load clears spike and wins over evolve
    load(16'hFFF0); evolve = 1; @(negedge clk); evolve = 0; chk(spike == 1, "overflow spike");
    @(negedge clk); ld_en = 1; evolve = 1; ld_val = 16'h1234; @(negedge clk); idle();
    chk(spike == 0 && pot == 16'h1234, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
