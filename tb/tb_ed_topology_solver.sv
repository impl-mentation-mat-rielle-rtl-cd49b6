// Self-checking test of the topology solver: 8-neighbour offsets after reset
// (row pitch 10), the SamePreAndPost flag, a rewritten table entry, the
// fully-connected mode, and the one-cycle latency.
module tb_ed_topology_solver;
  import ed_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic full_conn, lut_we, same;
  logic [SNW-1:0] syn_nbr;
  logic [IDW-1:0] pre_id, lut_data, post_id;
  logic [3:0] lut_addr;
  ed_topology_solver #(.NLUT(16), .ROW_PITCH(10)) dut (.*);
  int checks = 0, failures = 0;
  int offs [9] = '{0, -11, -10, -9, -1, 1, 9, 10, 11};
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    full_conn = 0; lut_we = 0; syn_nbr = 0; pre_id = 0; lut_data = 0; lut_addr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      int s, p;
      s = k % 9; p = $urandom_range(20, 60000);
      syn_nbr = SNW'(s); pre_id = IDW'(p);
      @(negedge clk);
      chk(post_id == IDW'(p + offs[s]), $sformatf("offset syn %0d", s));
      chk(same == (s == 0), "same flag");
    end
    // rewrite entry 3 to +100
    @(negedge clk); lut_we = 1; lut_addr = 3; lut_data = 16'd100;
    @(negedge clk); lut_we = 0; syn_nbr = 3; pre_id = 16'd500;
    @(negedge clk); chk(post_id == 16'd600 && !same, "rewritten entry");
    // fully connected
    full_conn = 1;
    for (int k = 0; k < 50; k++) begin
      int s; s = $urandom_range(65535);
      syn_nbr = SNW'(s); pre_id = (k % 5 == 0) ? IDW'(s) : IDW'(s ^ 1);
      @(negedge clk);
      chk(post_id == IDW'(s), "full connectivity id");
      chk(same == (k % 5 == 0), "full connectivity same");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
