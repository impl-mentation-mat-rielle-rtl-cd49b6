// Self-checking test of the synapse model: weight addition with saturation at
// the threshold, and the soft reset of the firing neuron, over random and
// corner-case operands.
module tb_ed_synapse_model;
  import ed_pkg::*;
  logic same;
  logic [8:0] weight;
  logic [12:0] potential, new_potential;
  ed_synapse_model dut (.*);
  int checks = 0, failures = 0, n_sat = 0, n_reset = 0;
  initial begin
    for (int k = 0; k < 5000; k++) begin
      int p, w, e;
      same = (k % 4 == 0);
      p = (k % 9 == 0) ? 8191 : $urandom_range(8191);
      w = $urandom_range(511);
      potential = 13'(p); weight = 9'(w);
      #1;
      if (same) begin e = (p >= 8191) ? p - 8191 : 0; n_reset++; end
      else begin e = p + w; if (e >= 8191) begin e = 8191; n_sat++; end end
      checks++;
      if (int'(new_potential) != e) begin failures++; $display("FAIL p=%0d w=%0d same=%0d got %0d exp %0d", p, w, same, new_potential, e); end
    end
    checks++; if (n_sat == 0 || n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
