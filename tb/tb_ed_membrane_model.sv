// Self-checking test of the membrane model: potential for random firing and
// simulation times (including wrap-around of the 13-bit time) against the
// charging curve evaluated here, the end points (0 ticks left = threshold,
// 8191 left = 0), monotonicity, and the one-cycle latency.
module tb_ed_membrane_model;
  import ed_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [12:0] firing_time, sim_time, potential;
  ed_membrane_model dut (.*);
  int checks = 0, failures = 0;
  function automatic int expp(int left);
    real k, x;
    k = -$ln(1.0 - 1.0 * 0.1447 / 6.918);
    x = (8191.0 - left) / 8191.0;
    return int'($floor((1.0 - $exp(-k * x)) / (1.0 - $exp(-k)) * 8191.0 + 0.5));
  endfunction
  initial begin
    int prev; prev = 9000;
    for (int k = 0; k < 3000; k++) begin
      int now, left;
      now = $urandom_range(8191); left = (k < 2) ? k * 8191 : $urandom_range(8191);
      sim_time = 13'(now); firing_time = 13'(now + left);
      @(negedge clk);
      checks++; if (int'(potential) != expp(left)) begin failures++; $display("FAIL left=%0d got %0d exp %0d", left, potential, expp(left)); end
    end
    sim_time = 0; firing_time = 0; @(negedge clk);
    checks++; if (potential != 13'd8191) failures++;
    firing_time = 13'd8191; @(negedge clk);
    checks++; if (potential != 13'd0) failures++;
    for (int left = 0; left < 8192; left += 37) begin
      firing_time = 13'(left); @(negedge clk);
      checks++; if (int'(potential) > prev) begin failures++; $display("FAIL monotonic"); end
      prev = int'(potential);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
