// Test of the bit-slice weight memory (N = 12 columns, W = 5): random row
// writes mirrored in a model array, reads checked one clock after the
// address, and a write and a read of the same row in one clock (the read
// returns the old row).
module tb_bs_weight_mem;
  localparam int N = 12, W = 5, D = N * W, AW = $clog2(N * W);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] addr, ld_addr;
  logic [N-1:0] rd_bits, ld_row;
  logic ld_en;
  bs_weight_mem #(.N(N), .W(W)) dut (.*);
  logic [N-1:0] model [D];
  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    ld_en = 0; addr = 0; ld_addr = 0; ld_row = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); ld_en = 1; ld_addr = AW'(a); ld_row = N'($urandom); model[a] = ld_row;
    end
    @(negedge clk); ld_en = 0;
    for (int i = 0; i < 3000; i++) begin
      int a, b;
      a = $urandom_range(0, D - 1); b = $urandom_range(0, D - 1);
      addr = AW'(a);
      ld_en = $urandom_range(0, 1); ld_addr = AW'(b); ld_row = N'($urandom);
      @(negedge clk);
      chk(rd_bits == model[a], $sformatf("row %0d", a));
      if (ld_en) model[b] = ld_row;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
