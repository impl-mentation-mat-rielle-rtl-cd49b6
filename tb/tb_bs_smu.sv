// Test of the bit-slice synapse model unit. The potential and the weight are
// streamed LSB first for P = 16 clocks (weight bits only in the first W = 11);
// the serial sum bits must form (pot + weight) mod 2^P when the spiking bit
// is set and pot unchanged when it is clear, and ovf must equal the carry out
// at the last bit. Also checks the spiking-bit register: load from Spike,
// shift from the left neighbour, hold otherwise.
module tb_bs_smu;
  localparam int P = 16, W = 11;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic spike, load_sb, shift_sb, sb_in, sb_out, add_en, first, last, w_en, w_bit, pot_bit, sum_bit, ovf;
  bs_smu dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    spike = 0; load_sb = 0; shift_sb = 0; sb_in = 0; add_en = 0; first = 0; last = 0; w_en = 0; w_bit = 0; pot_bit = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int pv, wv, sum; logic s; logic [P-1:0] got; logic o;
      pv = $urandom_range(0, (1 << P) - 1);
      wv = $urandom_range(0, (1 << W) - 1);
      if (i % 3 == 0) pv = (1 << P) - 1 - $urandom_range(0, 3000);
      s = $urandom_range(0, 3) != 0;
      spike = s; load_sb = 1; @(negedge clk); load_sb = 0; spike = !s;
      chk(sb_out == s, "load_sb");
      o = 0;
      for (int k = 0; k < P; k++) begin
        add_en = 1; first = (k == 0); last = (k == P - 1); w_en = (k < W);
        w_bit = (k < W) ? wv[k] : $urandom_range(0, 1);
        pot_bit = pv[k];
        #1; got[k] = sum_bit; if (k == P - 1) o = ovf; else chk(ovf == 0, "ovf only at last bit");
        @(negedge clk);
      end
      add_en = 0; first = 0; last = 0; w_en = 0;
      sum = s ? pv + wv : pv;
      chk(got == P'(sum), $sformatf("serial sum %0d+%0d sb=%0d", pv, wv, s));
      chk(o == (sum >= (1 << P)), "ovf");
      // ring shift
      sb_in = $urandom_range(0, 1); shift_sb = 1; @(negedge clk); shift_sb = 0;
      chk(sb_out == sb_in, "shift_sb");
      sb_in = !sb_in; @(negedge clk); chk(sb_out == !sb_in, "sb holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
