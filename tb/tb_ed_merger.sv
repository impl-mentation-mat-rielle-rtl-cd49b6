// Self-checking test of the merger with three queues: the earliest root
// relative to the simulation time wins (with wrap-around), ties go to the
// lowest index, empty queues are skipped.
module tb_ed_merger;
  import ed_pkg::*;
  logic [12:0] now;
  logic q_valid [3];
  logic [15:0] q_id [3];
  logic [12:0] q_time [3];
  logic [7:0] q_pix [3];
  logic top_valid;
  logic [15:0] top_id;
  logic [12:0] top_time;
  logic [7:0] top_pix;
  logic [1:0] top_q;
  ed_merger #(.NQ(3)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 3000; k++) begin
      int best; logic any; int bk;
      now = 13'($urandom);
      any = 0; best = 0; bk = 0;
      for (int i = 0; i < 3; i++) begin
        q_valid[i] = ($urandom_range(3) != 0);
        q_time[i] = (k % 5 == 0) ? now + 13'd7 : now + 13'($urandom_range(8191));
        q_id[i] = 16'($urandom); q_pix[i] = 8'($urandom);
      end
      for (int i = 0; i < 3; i++) begin
        int key; key = int'(13'(q_time[i] - now));
        if (q_valid[i] && (!any || key < bk)) begin any = 1; best = i; bk = key; end
      end
      #1;
      checks++;
      if (top_valid != any || (any && (top_q != 2'(best) || top_id != q_id[best] ||
          top_time != q_time[best] || top_pix != q_pix[best]))) begin
        failures++; $display("FAIL case %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
