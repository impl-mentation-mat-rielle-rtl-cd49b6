// Test of one bit-slice column (SMU + MMU, P = 16, W = 11). A random
// potential is loaded, a random spiking bit is shifted in from the left, and
// a weight is streamed in bit-serially over P clocks as the controller does;
// the potential must become pot + weight (when the bit is set) modulo 2^P and
// Spike must mark the carry. Then Spike is latched into the spiking bit with
// load_sb, which must also clear Spike (the reset), and evolution steps are
// compared with the piece-wise linear model.
module tb_bs_slice;
  localparam int P = 16, W = 11;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic evolve, load_sb, shift_sb, add_en, first, last, w_en, w_bit, sb_in, sb_out, ld_en, spike;
  logic [3:0] pwl_shift;
  logic [P-1:0] ld_val, pot;
  bs_slice #(.P(P)) dut (.*);
  int checks = 0, failures = 0, n_ovf = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    evolve = 0; load_sb = 0; shift_sb = 0; add_en = 0; first = 0; last = 0; w_en = 0; w_bit = 0;
    sb_in = 0; ld_en = 0; ld_val = 0; pwl_shift = 6;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int pv, wv, sum, p2; logic s;
      pv = (i % 2) ? (1 << P) - 1 - $urandom_range(0, 2047) : $urandom_range(0, (1 << P) - 1);
      wv = $urandom_range(0, (1 << W) - 1); s = $urandom_range(0, 3) != 0;
      ld_en = 1; ld_val = P'(pv); @(negedge clk); ld_en = 0;
      sb_in = s; shift_sb = 1; @(negedge clk); shift_sb = 0;
      chk(sb_out == s, "spiking bit shifted in");
      for (int k = 0; k < P; k++) begin
        add_en = 1; first = (k == 0); last = (k == P - 1); w_en = (k < W);
        w_bit = (k < W) ? wv[k] : 1'b0;
        @(negedge clk);
      end
      add_en = 0; first = 0; last = 0; w_en = 0;
      sum = s ? pv + wv : pv;
      chk(pot == P'(sum), $sformatf("pot %0d exp %0d", pot, P'(sum)));
      chk(spike == (sum >= (1 << P)), "spike from serial carry");
      if (spike) begin
        n_ovf++;
        load_sb = 1; @(negedge clk); load_sb = 0;
        chk(spike == 0 && sb_out == 1, "load_sb latches and resets");
      end
      p2 = int'(pot);
      pwl_shift = 4'($urandom_range(3, 8)); evolve = 1; @(negedge clk); evolve = 0;
      chk(int'(pot) == ((p2 + ((8 >> (p2 >> (P - 2))) << pwl_shift)) & 16'hFFFF), "evolution step");
    end
    chk(n_ovf > 0, "propagation overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
