// Self-checking test of the processing element on a 16x16 grid (256 neurons,
// border inactive). Neurons are loaded through the host port; spikes of random
// interior neurons are applied as 9 back-to-back synapses (8 neighbours and
// the neuron itself). Each update must leave exactly 4 cycles after its
// synapse with the post-synaptic ID, activity, pixel and the new firing time of
// the reference model; the state memory must hold the same afterwards.
module tb_ed_pe;
  import ed_pkg::*;
  import tb_ed_ref_pkg::*;
  localparam int NN = 256, RP = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic full_conn = 0, in_valid, out_valid, out_active, ext_wr_en, ext_rd_en, lut_we = 0;
  logic [SNW-1:0] syn_nbr;
  logic [IDW-1:0] pre_id, out_id, ext_wr_addr, ext_rd_addr, lut_data = 0;
  logic [PIX_W-1:0] pre_pix, out_pix;
  logic [TIME_W-1:0] sim_time, out_time;
  nstate_t ext_wr_data, ext_rd_data;
  logic [3:0] lut_addr = 0;
  ed_pe #(.N_NEURONS(NN), .ROW_PITCH(RP)) dut (.*);

  int checks = 0, failures = 0, n_reset = 0, n_inactive = 0, n_fire_now = 0;
  nstate_t model [NN];
  int offs [9] = '{0, -RP-1, -RP, -RP+1, -1, 1, RP-1, RP, RP+1};
  int exp_id [$]; int exp_t [$]; int exp_cycle [$]; bit exp_act [$];
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    int id, t, c; bit a;
    chk(exp_id.size() > 0, "unexpected output");
    if (exp_id.size() > 0) begin
      id = exp_id.pop_front(); t = exp_t.pop_front(); c = exp_cycle.pop_front(); a = exp_act.pop_front();
      chk(out_id == IDW'(id), $sformatf("out id %0d exp %0d", out_id, id));
      chk(out_active == a, "out active");
      chk(cycle - c == 4, $sformatf("latency %0d", cycle - c));
      chk(out_pix == model[id].pix, "out pixel");
      if (a) chk(int'(out_time) == t, $sformatf("new time of %0d: %0d exp %0d", id, out_time, t));
    end
  end

  initial begin
    in_valid = 0; syn_nbr = 0; pre_id = 0; pre_pix = 0; sim_time = 0;
    ext_wr_en = 0; ext_rd_en = 0; ext_wr_addr = 0; ext_rd_addr = 0; ext_wr_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NN; i++) begin
      int r, c; r = i / RP; c = i % RP;
      model[i].active = !(r == 0 || c == 0 || r == RP - 1 || c == RP - 1);
      model[i].ftime = TIME_W'($urandom);
      model[i].pix = (c < 8) ? PIX_W'(40 + $urandom_range(3)) : PIX_W'(200 + $urandom_range(3));
      ext_wr_en = 1; ext_wr_addr = IDW'(i); ext_wr_data = model[i];
      @(negedge clk);
    end
    ext_wr_en = 0;
    for (int ev = 0; ev < 200; ev++) begin
      int pre, now;
      pre = RP * $urandom_range(1, RP - 2) + $urandom_range(1, RP - 2);
      now = (ev % 3 == 0) ? int'(model[pre].ftime) : int'(model[pre].ftime) - $urandom_range(30);
      now = now & 8191;
      for (int s = 0; s < 9; s++) begin
        int post, t;
        post = pre + offs[s];
        t = ref_update(model[post].ftime, model[post].pix, model[pre].pix, s == 0, now);
        exp_id.push_back(post); exp_t.push_back(t); exp_cycle.push_back(cycle); exp_act.push_back(model[post].active);
        if (s == 0) n_reset++;
        if (!model[post].active) n_inactive++;
        else if (s != 0 && t == now) n_fire_now++;
        in_valid = 1; syn_nbr = SNW'(s); pre_id = IDW'(pre); pre_pix = model[pre].pix; sim_time = TIME_W'(now);
        if (model[post].active) model[post].ftime = TIME_W'(t);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (6) @(negedge clk);
    end
    chk(exp_id.size() == 0, "all outputs seen");
    for (int i = 0; i < NN; i++) begin
      ext_rd_en = 1; ext_rd_addr = IDW'(i);
      @(negedge clk);
      ext_rd_en = 0;
      chk(ext_rd_data == model[i], $sformatf("state of %0d", i));
    end
    $display("resets=%0d inactive=%0d fire_now=%0d", n_reset, n_inactive, n_fire_now);
    chk(n_reset > 0 && n_inactive > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
