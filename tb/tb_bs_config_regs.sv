// Test of the bit-slice configuration registers: reset values, writes and
// read-back of run_steps and pwl_shift, the one-clock start pulse on a write
// of register 0, writes ignored while busy, and the status registers.
module tb_bs_config_regs;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, start, busy;
  logic [2:0] addr;
  logic [31:0] wr_data, rd_data, run_steps, n_props, n_steps;
  logic [3:0] pwl_shift;
  bs_config_regs dut (.*);
  int checks = 0, failures = 0, n_start = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  always @(posedge clk) if (start) n_start++;
  initial begin
    int rs, ps, ns;
    wr_en = 0; addr = 0; wr_data = 0; busy = 0; n_props = 0; n_steps = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(pwl_shift == 6 && run_steps == 0 && start == 0, "reset values");
    rs = 0; ps = 6; ns = 0;
    for (int i = 0; i < 500; i++) begin
      int a; logic [31:0] d; logic b;
      a = $urandom_range(0, 5); d = $urandom; b = $urandom_range(0, 3) == 0;
      busy = b; n_props = $urandom; n_steps = $urandom;
      @(negedge clk);
      wr_en = 1; addr = 3'(a); wr_data = d;
      @(negedge clk); wr_en = 0;
      if (!b && a == 0) begin rs = d; ns++; end
      if (!b && a == 1) ps = d[3:0];
      chk(start == (!b && a == 0), "start pulse");
      @(negedge clk); chk(start == 0, "start is one clock");
      chk(run_steps == rs && pwl_shift == ps, $sformatf("register values %0h %0h %0d %0d", run_steps, rs, pwl_shift, ps));
      addr = 0; #1 chk(rd_data == rs, "read run_steps");
      addr = 1; #1 chk(rd_data == ps, "read pwl_shift");
      addr = 2; #1 chk(rd_data == {31'b0, busy}, "read busy");
      addr = 3; #1 chk(rd_data == n_props, "read n_props");
      addr = 4; #1 chk(rd_data == n_steps, "read n_steps");
    end
    chk(n_start == ns && ns > 0, "start count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
