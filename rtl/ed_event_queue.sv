// Event queue of the event-driven network: a memory-optimized structured
// heap queue, pipelined one operation per tree level.
//
// Neurons are kept in a binary tree of nodes ordered by predicted firing time,
// earliest at the root (heap property: a node fires no later than its
// children; an empty node has only empty children). Unlike an ordinary heap,
// an element can only ever sit on one path from the root: at level l
// (1 = root) it may occupy node index ID >> (LEVELS-l), so the path is read
// off the ID bits, MSB first. That makes any element findable in at most
// LEVELS steps, so besides insert the queue supports deleting any element,
// reading it, and an update (delete followed by insert with a new time),
// which is how a neuron's firing time changes after it receives a spike.
//
// Memory optimisation: inside any 3-level sub-tree at most one of the bottom
// nodes can be occupied, so the last level has one node per 4 IDs (node
// index ID >> 2), shared by the two nodes above it. The tree has
// 2^(LEVELS-1)-1 + 2^(LEVELS-3) nodes for 2^(LEVELS-1) elements.
//
// Operations:
//   insert : walk down the element's path; at each occupied node the later of
//            the two elements is carried on down, the earlier one stays.
//   delete : walk the path until the ID is found (locate), then repeatedly
//            pull the earlier of the hole's two children up into the hole
//            (promotion) until the hole reaches a node with no children.
//   update : delete, then insert.   read : locate only.
//
// Pipelining: every level has its own memory (split in even / odd nodes so a
// pair of siblings is read at once) and its own operation context. All
// contexts advance one level per stage of three clocks: read (each level
// memory reads one word), compute (each context decides from what was read)
// and write (each level memory takes at most one write, and the contexts shift
// down one level). A delete at level l reads level l (locate) and the
// children at level l+1 in the same read phase, so it must run at least two
// levels behind the operation ahead of it; an insert or a read touches only
// its own level and may follow one level behind. With these distances every
// operation sees the tree exactly as if the operations ran one after another.
// An update enters as a delete and its insert follows one stage later, so
// back-to-back updates are accepted every 3 stages (9 clocks).
//
// Interface: a request is taken into a one-entry input register
// (req_ready = that register is empty and no read is in flight, so read
// results come back one at a time, in order) and enters the root level at the next
// write phase allowed by the distance rule. top_* always shows the root node;
// top_stable is high when no operation is waiting or working on the root
// level, so the root is final for all operations accepted so far. idle is high
// when no operation is waiting or in flight. Firing times are compared as
// (time - now) modulo 2^13, so the order survives wrap-around of the 13-bit
// time as long as every stored time lies within one period after `now`.
// After reset all level memories are cleared in parallel (one word per clock,
// 2^(LEVELS-3) clocks) before req_ready rises.
module ed_event_queue
  import ed_pkg::*;
#(
  parameter int unsigned LEVELS = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TIME_W-1:0] now,        // simulation time
  input  logic              req_valid,
  output logic              req_ready,
  input  q_op_e             req_op,
  input  logic [IDW-1:0]    req_id,
  input  logic [TIME_W-1:0] req_time,
  input  logic [PIX_W-1:0]  req_pix,
  output logic              top_valid,  // root node
  output logic [IDW-1:0]    top_id,
  output logic [TIME_W-1:0] top_time,
  output logic [PIX_W-1:0]  top_pix,
  output logic              top_stable, // root final for all accepted requests
  output logic              idle,       // nothing waiting or in flight
  output logic              rd_done,    // pulse: read finished
  output logic              rd_found,
  output logic [TIME_W-1:0] rd_time,
  output logic              overflow    // sticky: an insert found no free node
);

  localparam int unsigned PW  = LEVELS - 1;                   // path bits of an ID
  localparam int unsigned CLR = 1 << (LEVELS - 3);            // words of the widest level

  typedef enum logic [1:0] {K_INS, K_LOC, K_PROM, K_READ} kind_e;
  typedef struct packed {
    logic          v;
    kind_e         k;
    q_elem_t       e;      // element carried (insert) or ID looked for
    logic [PW-1:0] hj;     // hole index within the level (promotion)
  } ctx_t;

  // Index of the node of level l that ID `id` may occupy.
  function automatic logic [PW-1:0] node_idx(int l, logic [IDW-1:0] id);
    logic [PW-1:0] p;
    p = id[PW-1:0];
    if (l == LEVELS) return p >> 2;
    return p >> (LEVELS - l);
  endfunction

  // firing time a comes strictly before b
  function automatic logic earlier(logic [TIME_W-1:0] a, logic [TIME_W-1:0] b,
                                   logic [TIME_W-1:0] t0);
    return key_of(a, t0) < key_of(b, t0);
  endfunction

  logic [1:0]      ph;                      // 0 read, 1 compute, 2 write
  logic            clearing;
  logic [PW-1:0]   clr_cnt;
  ctx_t            ctx   [LEVELS+2];        // context working at level l
  ctx_t            nx    [LEVELS+2];        // its successor, computed in phase 1
  ctx_t            inbox, pend;             // accepted request / insert half of an update
  logic            inbox_upd;               // the accepted request is an update
  logic            rd_busy;                 // a read is in flight

  // per-level memory ports
  logic [PW-1:0]   raddr [LEVELS+1];
  q_elem_t         rd_e  [LEVELS+1];
  q_elem_t         rd_o  [LEVELS+1];
  logic            wv    [LEVELS+1];
  logic [PW-1:0]   wa    [LEVELS+1];
  logic            wodd  [LEVELS+1];
  q_elem_t         wd    [LEVELS+1];
  q_elem_t         root;

  // ---- read addresses (phase 0) -----------------------------------------
  always_comb begin
    for (int m = 1; m <= LEVELS; m++) begin
      logic [PW-1:0] j;
      j        = '0;
      raddr[m] = node_idx(m, ctx[m].e.id) >> 1;
      if (m > 1 && ctx[m-1].v && (ctx[m-1].k == K_LOC || ctx[m-1].k == K_PROM)) begin
        // children of the hole (or of the node on the path) one level up
        j = (ctx[m-1].k == K_LOC) ? node_idx(m - 1, ctx[m-1].e.id) : ctx[m-1].hj;
        raddr[m] = (m < LEVELS) ? j : (j >> 2);
      end
    end
  end

  // ---- per-level decisions (phase 1) -------------------------------------
  logic            c_wv   [LEVELS+1];
  logic [PW-1:0]   c_wj   [LEVELS+1];       // node index written
  q_elem_t         c_wd   [LEVELS+1];
  logic            c_rd, c_found, c_ovf;
  logic [TIME_W-1:0] c_rtime;

  always_comb begin
    c_rd = 1'b0; c_found = 1'b0; c_ovf = 1'b0; c_rtime = '0;
    for (int l = 0; l <= LEVELS + 1; l++) nx[l] = '0;
    for (int l = 1; l <= LEVELS; l++) begin
      ctx_t          c;
      q_elem_t       own, c0, c1;
      logic          c0ok, c1ok, promote;
      logic [PW-1:0] j, j0, j1, oj;
      c  = ctx[l];
      oj = node_idx(l, c.e.id);
      own = oj[0] ? rd_o[l] : rd_e[l];
      c_wv[l] = 1'b0; c_wj[l] = '0; c_wd[l] = '0;
      j = (c.k == K_LOC) ? oj : c.hj;
      c0 = '0; c1 = '0; c0ok = 1'b0; c1ok = 1'b0; j0 = '0; j1 = '0;
      if (l + 1 < LEVELS) begin
        c0 = rd_e[l+1]; c1 = rd_o[l+1];
        c0ok = c0.valid; c1ok = c1.valid;
        j0 = {j[PW-2:0], 1'b0}; j1 = {j[PW-2:0], 1'b1};
      end else if (l + 1 == LEVELS) begin
        // shared bottom node: only an element whose path runs through the hole
        c0 = j[1] ? rd_o[l+1] : rd_e[l+1];
        c0ok = c0.valid && ((c0.id[PW-1:0] >> 1) == j);
        j0 = j >> 1;
      end
      promote = 1'b0;
      if (c.v) begin
        unique case (c.k)
          K_READ: begin
            if (own.valid && own.id == c.e.id) begin
              c_rd = 1'b1; c_found = 1'b1; c_rtime = own.time_;
            end else if (!own.valid || l == LEVELS) begin
              c_rd = 1'b1;
            end else nx[l+1] = c;
          end
          K_INS: begin
            if (!own.valid) begin
              c_wv[l] = 1'b1; c_wj[l] = oj; c_wd[l] = c.e;
            end else if (l == LEVELS) begin
              c_ovf = 1'b1;
            end else begin
              nx[l+1] = c;
              if (earlier(c.e.time_, own.time_, now)) begin
                c_wv[l] = 1'b1; c_wj[l] = oj; c_wd[l] = c.e;
                nx[l+1].e = own;
              end
            end
          end
          K_LOC: begin
            if (own.valid && own.id == c.e.id) promote = 1'b1;
            else if (own.valid && l != LEVELS) nx[l+1] = c;
          end
          default: promote = 1'b1;           // K_PROM
        endcase
      end
      if (promote) begin
        c_wv[l] = 1'b1; c_wj[l] = j;
        if (c0ok && (!c1ok || !earlier(c1.time_, c0.time_, now))) begin
          c_wd[l] = c0;
          nx[l+1] = '{v: 1'b1, k: K_PROM, e: c.e, hj: j0};
        end else if (c1ok) begin
          c_wd[l] = c1;
          nx[l+1] = '{v: 1'b1, k: K_PROM, e: c.e, hj: j1};
        end
      end
    end
  end

  // ---- level memories ----------------------------------------------------
  for (genvar m = 1; m <= LEVELS; m++) begin : g_lvl
    localparam int unsigned NWD = (m == 1) ? 1 : ((m < LEVELS) ? (1 << (m - 2)) : (1 << (LEVELS - 4)));
    localparam int unsigned AWM = (NWD > 1) ? $clog2(NWD) : 1;
    q_elem_t me [1 << AWM];
    q_elem_t mo [1 << AWM];
    always_ff @(posedge clk) begin
      if (clearing) begin
        me[clr_cnt[AWM-1:0]] <= '0;
        mo[clr_cnt[AWM-1:0]] <= '0;
      end else if (ph == 2'd2 && wv[m]) begin
        if (wodd[m]) mo[wa[m][AWM-1:0]] <= wd[m];
        else         me[wa[m][AWM-1:0]] <= wd[m];
      end
      if (ph == 2'd0) begin
        rd_e[m] <= me[raddr[m][AWM-1:0]];
        rd_o[m] <= mo[raddr[m][AWM-1:0]];
      end
    end
    if (m == 1) begin : g_root
      assign root = me[0];
    end
  end

  // ---- control -------------------------------------------------------------
  logic ctx_any;
  always_comb begin
    ctx_any = 1'b0;
    for (int l = 1; l <= LEVELS; l++) ctx_any |= ctx[l].v;
  end

  assign req_ready  = !inbox.v && !rd_busy && !clearing;
  assign top_stable = !inbox.v && !pend.v && !ctx[1].v && !clearing;
  assign idle       = !inbox.v && !pend.v && !ctx_any && !clearing;
  assign top_valid  = root.valid;
  assign top_id     = root.id;
  assign top_time   = root.time_;
  assign top_pix    = root.pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= 2'd0;
      clearing <= 1'b1;
      clr_cnt  <= '0;
      inbox    <= '0;
      inbox_upd <= 1'b0;
      rd_busy  <= 1'b0;
      pend     <= '0;
      for (int l = 0; l <= LEVELS + 1; l++) ctx[l] <= '0;
      for (int l = 0; l <= LEVELS; l++) begin
        wv[l] <= 1'b0; wa[l] <= '0; wodd[l] <= 1'b0; wd[l] <= '0;
      end
      rd_done  <= 1'b0;
      rd_found <= 1'b0;
      rd_time  <= '0;
      overflow <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      if (req_valid && req_ready) begin
        inbox.v    <= 1'b1;
        inbox.k    <= (req_op == Q_INSERT) ? K_INS : ((req_op == Q_READ) ? K_READ : K_LOC);
        inbox.e    <= '{valid: 1'b1, id: req_id, time_: req_time, pix: req_pix};
        inbox.hj   <= '0;
        inbox_upd  <= (req_op == Q_UPDATE);
      end
      if (clearing) begin
        clr_cnt <= clr_cnt + 1'b1;
        if (clr_cnt == PW'(CLR - 1)) clearing <= 1'b0;
      end else begin
        ph <= (ph == 2'd2) ? 2'd0 : ph + 1'b1;
        if (ph == 2'd1) begin
          for (int l = 1; l <= LEVELS; l++) begin
            wv[l] <= c_wv[l]; wa[l] <= c_wj[l] >> 1; wodd[l] <= c_wj[l][0]; wd[l] <= c_wd[l];
          end
          for (int l = 2; l <= LEVELS; l++) ctx[l] <= nx[l];   // contexts move down
          if (c_rd) begin
            rd_done <= 1'b1; rd_found <= c_found; rd_time <= c_rtime;
            rd_busy <= 1'b0;
          end
          if (c_ovf) overflow <= 1'b1;
        end
        if (ph == 2'd2) begin
          if (pend.v) begin
            ctx[1] <= pend;
            pend.v <= 1'b0;
          end else if (inbox.v && (inbox.k == K_INS || inbox.k == K_READ || !ctx[1].v)) begin
            ctx[1]  <= inbox;
            inbox.v <= 1'b0;
            if (inbox.k == K_READ) rd_busy <= 1'b1;
            // the insert half of an update follows one stage behind
            pend    <= '{v: (inbox.k == K_LOC) && inbox_upd, k: K_INS, e: inbox.e, hj: '0};
          end else begin
            ctx[1] <= '0;
          end
        end
      end
    end
  end

endmodule
