// Self-checking test of the structured heap event queue at 6 levels
// (32 neurons). A reference model keeps every neuron's firing time; random
// inserts, deletes, updates and reads are applied, and after each one the
// root must hold the earliest time, reads must return the model's time, and
// the operation must finish within its cycle bound (one tree level per
// 3-clock stage). The simulation time advances to the root now and then, as
// the network does, so times wrap around 2^13. A second phase streams
// requests back to back, so several operations are in the pipeline at once:
// reads must answer in order with the values of a one-after-another
// execution, and the final heap must match the model. Back-to-back updates
// must be accepted every 9 clocks. A final fill and drain checks the
// firing order.
module tb_ed_event_queue;
  import ed_pkg::*;

  localparam int unsigned LEVELS = 6;
  localparam int unsigned NEL    = 1 << (LEVELS - 1);

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [TIME_W-1:0] now;
  logic req_valid, req_ready, top_valid, top_stable, idle, rd_done, rd_found, overflow;
  q_op_e req_op;
  logic [IDW-1:0] req_id, top_id;
  logic [TIME_W-1:0] req_time, top_time, rd_time;
  logic [PIX_W-1:0] req_pix, top_pix;

  ed_event_queue #(.LEVELS(LEVELS)) dut (.*);

  int checks = 0, failures = 0;
  int n_ins = 0, n_del = 0, n_upd = 0, n_rd = 0, n_wrap = 0;
  logic              m_in   [NEL];
  logic [TIME_W-1:0] m_time [NEL];
  int cyc;
  int s_ins = 0, s_del = 0, s_upd = 0, s_rd = 0;
  logic [TIME_W:0] exp_q [$];

  // stream reads are answered in issue order
  bit streaming = 1'b0;
  always @(posedge clk) if (rd_done && streaming) begin
    logic [TIME_W:0] e;
    check(exp_q.size() > 0, "unexpected read result");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      check(rd_found && rd_time == e[TIME_W-1:0], $sformatf("stream read result found=%0d time=%0d exp %0d", rd_found, rd_time, e[TIME_W-1:0]));
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic do_op(input q_op_e op, input int id, input logic [TIME_W-1:0] t);
    @(negedge clk);
    req_valid = 1'b1; req_op = op; req_id = IDW'(id); req_time = t; req_pix = PIX_W'(id * 7);
    @(negedge clk);
    req_valid = 1'b0;
    cyc = 1;
    while (!idle) begin @(negedge clk); cyc++; end
    check(cyc <= 3 * (LEVELS + 3), $sformatf("op %0d took %0d cycles", op, cyc));
  endtask

  task automatic check_top();
    int best; logic any;
    any = 1'b0; best = 0;
    for (int i = 0; i < NEL; i++)
      if (m_in[i] && (!any || key_of(m_time[i], now) < key_of(m_time[best], now))) begin best = i; any = 1'b1; end
    check(top_valid == any, "top valid");
    if (any) begin
      check(key_of(top_time, now) == key_of(m_time[best], now), $sformatf("root time %0d exp %0d", top_time, m_time[best]));
      check(m_in[top_id[LEVELS-2:0]] && m_time[top_id[LEVELS-2:0]] == top_time, "root id/time pair");
      check(top_pix == PIX_W'(top_id * 7), "root pixel");
    end
  endtask

  initial begin
    req_valid = 0; req_op = Q_INSERT; req_id = 0; req_time = 0; req_pix = 0; now = 13'd8000;
    for (int i = 0; i < NEL; i++) begin m_in[i] = 0; m_time[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (req_ready);
    check(!top_valid, "empty after clear");
    check(top_stable && idle, "idle after clear");
    for (int it = 0; it < 3000; it++) begin
      int id, r;
      logic [TIME_W-1:0] t;
      id = $urandom_range(NEL - 1);
      t  = now + TIME_W'($urandom_range(8190));
      r  = $urandom_range(9);
      if (!m_in[id]) begin
        if (r < 8) begin
          do_op(Q_INSERT, id, t); m_in[id] = 1; m_time[id] = t; n_ins++;
        end else begin
          do_op(Q_DELETE, id, t); n_del++;        // deleting an absent ID is a no-op
        end
      end else if (r < 4) begin
        do_op(Q_UPDATE, id, t); m_time[id] = t; n_upd++;
      end else if (r < 6) begin
        do_op(Q_DELETE, id, t); m_in[id] = 0; n_del++;
      end else if (r < 8) begin
        do_op(Q_READ, id, t); n_rd++;
        check(rd_found && rd_time == m_time[id], "read of present element");
      end else begin
        // simulation time jumps to the next event
        if (top_valid) begin
          if (top_time < now) n_wrap++;
          now = top_time;
        end
      end
      check_top();
      check(!overflow, "no overflow");
    end
    // read an absent element
    for (int i = 0; i < NEL; i++) if (!m_in[i]) begin
      do_op(Q_READ, i, 0); check(!rd_found, "absent read"); break;
    end
    // streaming: requests back to back, one per accepted handshake; the
    // results must be those of running them one after another
    begin
      int t0, n_issue;
      t0 = 0; n_issue = 0;
      repeat (2) @(negedge clk);   // let the last read pulse pass
      streaming = 1'b1;
      for (int it = 0; it < 4000; it++) begin
        int id, r;
        logic [TIME_W-1:0] t;
        q_op_e op;
        id = $urandom_range(NEL - 1);
        t  = now + TIME_W'($urandom_range(8190));
        r  = $urandom_range(9);
        if (!m_in[id]) op = (r < 8) ? Q_INSERT : Q_DELETE;
        else if (r < 5) op = Q_UPDATE;
        else if (r < 7) op = Q_DELETE;
        else op = Q_READ;
        @(negedge clk);
        while (!req_ready) @(negedge clk);
        req_valid = 1'b1; req_op = op; req_id = IDW'(id); req_time = t; req_pix = PIX_W'(id * 7);
        if (it == 1000) t0 = int'($time / 10);
        unique case (op)
          Q_INSERT: begin m_in[id] = 1; m_time[id] = t; s_ins++; end
          Q_UPDATE: begin m_time[id] = t; s_upd++; end
          Q_DELETE: begin m_in[id] = 0; s_del++; end
          default:  begin exp_q.push_back({1'b1, m_time[id]}); s_rd++; end
        endcase
        @(negedge clk);
        req_valid = 1'b0;
      end
      while (!idle) @(negedge clk);
      check(exp_q.size() == 0, "all stream reads answered");
      streaming = 1'b0;
      check_top();
      check(!overflow, "no overflow in stream");
      $display("stream: insert=%0d delete=%0d update=%0d read=%0d, %0d clocks per op", s_ins, s_del, s_upd, s_rd,
               (int'($time / 10) - t0) / 3000);
      check(s_ins > 0 && s_del > 0 && s_upd > 0 && s_rd > 0, "stream mix");
    end
    // back-to-back updates: one every 9 clocks (three 3-clock stages)
    begin
      int t1, id;
      id = 0;
      while (!m_in[id]) id++;
      @(negedge clk);
      t1 = int'($time / 10);
      for (int k = 0; k < 50; k++) begin
        logic [TIME_W-1:0] t;
        t = now + TIME_W'($urandom_range(8190));
        while (!req_ready) @(negedge clk);
        req_valid = 1'b1; req_op = Q_UPDATE; req_id = IDW'(id); req_time = t; req_pix = PIX_W'(id * 7);
        m_time[id] = t;
        @(negedge clk);
        req_valid = 1'b0;
      end
      while (!req_ready) @(negedge clk);
      check(int'($time / 10) - t1 <= 50 * 9 + 9, $sformatf("50 updates accepted in %0d clocks", int'($time / 10) - t1));
      while (!idle) @(negedge clk);
      check_top();
    end
    // fill completely, then drain in firing order
    for (int i = 0; i < NEL; i++) if (!m_in[i]) begin
      logic [TIME_W-1:0] t; t = now + TIME_W'($urandom_range(8190));
      do_op(Q_INSERT, i, t); m_in[i] = 1; m_time[i] = t; n_ins++;
    end
    check_top();
    check(!overflow, "no overflow when full");
    for (int k = 0; k < NEL; k++) begin
      logic [TIME_W-1:0] prev; prev = top_time;
      check(key_of(top_time, now) >= key_of(prev, now), "drain order");
      m_in[top_id[LEVELS-2:0]] = 0;
      do_op(Q_DELETE, int'(top_id), 0); n_del++;
      check_top();
    end
    check(!top_valid, "empty after drain");
    $display("ops: insert=%0d delete=%0d update=%0d read=%0d wraps=%0d", n_ins, n_del, n_upd, n_rd, n_wrap);
    check(n_ins > 0 && n_del > 0 && n_upd > 0 && n_rd > 0 && n_wrap > 0, "every operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
