// Self-checking test of the weight calculator: every pixel-difference entry is
// compared with the sigmoid rule evaluated here, the result must not depend on
// which pixel is pre- or post-synaptic, must fall with the difference, and the
// output is registered.
module tb_ed_weight_calc;
  import ed_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] pre_pix, post_pix;
  logic [8:0] weight;
  ed_weight_calc dut (.*);
  int checks = 0, failures = 0;
  function automatic int expw(int d);
    real w;
    w = 0.0325 * (1.0 - 1.0 / (1.0 + $exp(-(100.0 * d / 255.0 - 6.0))));
    return int'($floor(w * 8191.0 + 0.5));
  endfunction
  initial begin
    int prev; prev = 1000;
    for (int d = 0; d < 256; d++) begin
      int a;
      a = $urandom_range(255 - d);
      @(negedge clk); pre_pix = 8'(a + d); post_pix = 8'(a);
      @(negedge clk);
      checks++; if (int'(weight) != expw(d)) begin failures++; $display("FAIL d=%0d w=%0d exp=%0d", d, weight, expw(d)); end
      checks++; if (int'(weight) > prev) begin failures++; $display("FAIL not decreasing at %0d", d); end
      prev = int'(weight);
      pre_pix = 8'(a); post_pix = 8'(a + d);
      @(negedge clk);
      checks++; if (int'(weight) != expw(d)) begin failures++; $display("FAIL symmetric d=%0d", d); end
    end
    checks++; if (expw(0) < 260) begin failures++; $display("FAIL w(0) too small"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
