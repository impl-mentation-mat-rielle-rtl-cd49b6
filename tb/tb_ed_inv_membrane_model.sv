// Self-checking test of the inverse membrane model: the firing time for random
// potentials and simulation times against the inverse charging curve
// evaluated here, its end points, and the round trip time -> potential ->
// time within one tick.
module tb_ed_inv_membrane_model;
  import ed_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [12:0] potential, sim_time, firing_time;
  ed_inv_membrane_model dut (.*);
  int checks = 0, failures = 0;
  function automatic real kk(); return -$ln(1.0 - 0.1447 / 6.918); endfunction
  function automatic int expt(int p);
    real x;
    x = -$ln(1.0 - (p / 8191.0) * (1.0 - $exp(-kk()))) / kk();
    return int'($floor((1.0 - x) * 8191.0 + 0.5));
  endfunction
  function automatic int expp(int left);
    real x;
    x = (8191.0 - left) / 8191.0;
    return int'($floor((1.0 - $exp(-kk() * x)) / (1.0 - $exp(-kk())) * 8191.0 + 0.5));
  endfunction
  initial begin
    for (int k = 0; k < 3000; k++) begin
      int now, p;
      now = $urandom_range(8191); p = $urandom_range(8191);
      sim_time = 13'(now); potential = 13'(p);
      @(negedge clk);
      checks++; if (firing_time != 13'(now + expt(p))) begin failures++; $display("FAIL p=%0d", p); end
    end
    sim_time = 100; potential = 13'd8191; @(negedge clk);
    checks++; if (firing_time != 13'd100) begin failures++; $display("FAIL threshold"); end
    potential = 0; @(negedge clk);
    checks++; if (firing_time != 13'(100 + 8191)) begin failures++; $display("FAIL zero"); end
    sim_time = 0;
    for (int left = 0; left < 8192; left += 13) begin
      int d;
      potential = 13'(expp(left)); @(negedge clk);
      d = int'(firing_time) - left;
      checks++; if (d > 2 || d < -2) begin failures++; $display("FAIL round trip %0d -> %0d", left, firing_time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
