// Self-checking test of the neuron state memory (256 words): random writes and
// reads against a model, one-cycle read latency, read-before-write on a
// same-address collision.
module tb_ed_state_mem;
  import ed_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] rd_addr, wr_addr;
  nstate_t rd_data, wr_data;
  logic wr_en;
  ed_state_mem #(.DEPTH(256)) dut (.*);
  nstate_t model [256];
  int checks = 0, failures = 0;
  initial begin
    wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = nstate_t'($urandom); model[i] = wr_data;
    end
    for (int k = 0; k < 2000; k++) begin
      nstate_t exp_d;
      @(negedge clk);
      rd_addr = 8'($urandom); wr_en = $urandom_range(1);
      wr_addr = (k % 7 == 0) ? rd_addr : 8'($urandom); wr_data = nstate_t'($urandom);
      exp_d = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0;
      checks++; if (rd_data !== exp_d) begin failures++; $display("FAIL read %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
