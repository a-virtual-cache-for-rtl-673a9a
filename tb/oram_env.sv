// oram_env: traffic generator, ORAM tree model and checker for the ORAM
// controller, shared by the end-to-end testbenches.
//
// It plays the three parties around the controller: the core (requests to a
// small set of block addresses, with a position map that supplies each
// block's current leaf and records the new one), and the untrusted memory (a
// sparse model of the tree, one tag per bucket slot, answering read
// requests with Z tags per bucket and storing write requests). Ready and
// valid signals toggle at random.
//
// Checks, per access:
//  * a stash hit returns the block's unchanged leaf and touches no memory;
//    its latency is the same whether or not the block is held for the LPC;
//  * a miss on a block written before finds it on the path read;
//  * the reads are exactly the buckets of the path not shared with the last
//    path, root first; the writes are, from the leaf up, Z slots of every
//    write-through level of the path and Z slots of every write-back level
//    of the last path that the new path does not share; levels below
//    TREETOP are never read nor written;
//  * every real block written lies on its own path, carries its current
//    leaf, and no block is stored twice in the tree.
// It counts how often each mechanism occurred and fails a mechanism that
// never did. Results appear on the checks/failures outputs; `done` rises at
// the end.
module oram_env #(
  parameter int L          = 4,
  parameter int Z          = 2,
  parameter int STASH_SIZE = 32,
  parameter int THRESHOLD  = 2,
  parameter int TREETOP    = 0,           // top levels kept in the stash
  parameter int ADDR_W     = 8,
  parameter int NBLK       = 24,
  parameter int NACC       = 300,
  parameter bit EXPECT_LEFTOVER = 1'b1,   // expect blocks to stay behind in the stash
  parameter bit STREAM     = 1'b0,        // keep up to 4 requests outstanding
  parameter int HIT_LAT    = 3,           // request accept to hit answer, cycles
  parameter int LVL_W      = $clog2(L + 1),
  parameter int SLOT_W     = (Z > 1) ? $clog2(Z) : 1,
  parameter int IDX_W      = (STASH_SIZE > 1) ? $clog2(STASH_SIZE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  output logic [L-1:0]      req_leaf,
  input  logic              rsp_valid,
  output logic              rsp_ready,
  input  logic [ADDR_W-1:0] rsp_addr,
  input  logic              rsp_hit,
  input  logic              rsp_lpc,
  input  logic [L-1:0]      rsp_leaf,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [L-1:0]      rd_req_path,
  input  logic [LVL_W-1:0]  rd_req_level,
  output logic              rd_rsp_valid,
  input  logic              rd_rsp_ready,
  output logic              rd_rsp_real,
  output logic [ADDR_W-1:0] rd_rsp_addr,
  output logic [L-1:0]      rd_rsp_leaf,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [L-1:0]      wr_path,
  input  logic [LVL_W-1:0]  wr_level,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic              wr_real,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [L-1:0]      wr_leaf,
  input  logic              stash_overflow,
  input  logic [IDX_W:0]    stash_used,
  input  logic              idle,
  output logic              done,
  output int                checks,
  output int                failures
);

  typedef struct packed {
    logic              real_blk;
    logic [ADDR_W-1:0] addr;
    logic [L-1:0]      leaf;
  } tag_t;

  tag_t        tree [longint];      // key: node number * Z + slot
  logic [L-1:0] pos [int];          // position map of the core
  tag_t        rsp_q [$];
  int          seen_rd [int];       // real blocks read since the last answer
  int          recent [$];

  // per-access record
  logic [ADDR_W-1:0] cur_addr;
  logic [L-1:0]      cur_x, last_x;
  bit                last_valid, found;
  int                rd_cnt [L+1];
  int                rd_order_lvl, wr_order_lvl;
  int                old_wr [L+1];
  int                new_wr [L+1];
  longint            cycle;

  // mechanism counters
  int n_hit, n_lpc_hit, n_miss, n_new, n_found, n_skip, n_top, n_delay_real, n_delay_dummy,
      n_reuse_real, n_reuse_dummy;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic longint node_of(input logic [L-1:0] path, input int lvl);
    return (longint'(1) << lvl) + longint'(path >> (L - lvl));
  endfunction

  function automatic bit shares(input logic [L-1:0] a, input logic [L-1:0] b, input int lvl);
    return ((a ^ b) >> (L - lvl)) == '0;
  endfunction

  always @(posedge clk) cycle <= rst_n ? cycle + 1 : 0;

  // ---------------- memory side ----------------
  always @(posedge clk) begin
    if (rst_n && rd_req_valid && rd_req_ready) begin
      longint nd;
      if (!STREAM) begin
        check(rd_req_path == cur_x, "read request on the requested path");
        check(int'(rd_req_level) > rd_order_lvl, "path read goes from root to leaf");
      end
      rd_order_lvl = int'(rd_req_level);
      rd_cnt[rd_req_level]++;
      nd = node_of(rd_req_path, int'(rd_req_level));
      for (int s = 0; s < Z; s++) begin
        longint k;
        tag_t t;
        k = nd * Z + s;
        t = tree.exists(k) ? tree[k] : tag_t'(0);
        rsp_q.push_back(t);
        tree[k] = tag_t'(0);            // contents now belong to the stash
      end
    end
    if (rst_n && rd_rsp_valid && rd_rsp_ready) begin
      tag_t t;
      t = rsp_q.pop_front();
      if (t.real_blk && t.addr == cur_addr) found = 1'b1;
      if (t.real_blk) seen_rd[int'(t.addr)] = 1;
    end
    if (rst_n && wr_valid && wr_ready) begin
      int lv;
      tag_t t;
      lv = int'(wr_level);
      if (!STREAM) check(lv <= wr_order_lvl, "path write-back goes from leaf to root");
      wr_order_lvl = lv;
      if (lv < THRESHOLD) begin
        if (!STREAM)
          check(last_valid && wr_path == last_x && !shares(cur_x, last_x, lv),
                "write-back level written only for the non-shared bucket of the last path");
        old_wr[lv]++;
        if (wr_real) n_delay_real++; else n_delay_dummy++;
      end else begin
        if (!STREAM) check(wr_path == cur_x, "write-through level written on the current path");
        new_wr[lv]++;
        if (wr_real) n_reuse_real++; else n_reuse_dummy++;
      end
      if (wr_real) begin
        check(shares(wr_leaf, wr_path, lv), "block written on its own path");
        check(pos.exists(int'(wr_addr)) && pos[int'(wr_addr)] == wr_leaf,
              $sformatf("block %0d written with its current leaf", wr_addr));
      end
      t.real_blk = wr_real; t.addr = wr_real ? wr_addr : '0; t.leaf = wr_real ? wr_leaf : '0;
      tree[node_of(wr_path, lv) * Z + longint'(wr_slot)] = t;
    end
  end

  always @(negedge clk) begin
    rd_req_ready <= ($urandom_range(0, 9) < 7);
    wr_ready     <= ($urandom_range(0, 9) < 7);
    if (rsp_q.size() > 0 && $urandom_range(0, 9) < 7) begin
      rd_rsp_valid <= 1'b1;
      rd_rsp_real  <= rsp_q[0].real_blk;
      rd_rsp_addr  <= rsp_q[0].addr;
      rd_rsp_leaf  <= rsp_q[0].leaf;
    end else begin
      rd_rsp_valid <= 1'b0;
      rd_rsp_real  <= $urandom_range(0, 1) == 1;   // don't-care while not valid
      rd_rsp_addr  <= ADDR_W'($urandom);
      rd_rsp_leaf  <= L'($urandom);
    end
  end

  // ---------------- core side ----------------
  task automatic check_tree();
    int seen [int];
    foreach (tree[k]) begin
      if (tree[k].real_blk) begin
        int a = int'(tree[k].addr);
        check(!seen.exists(a), $sformatf("block %0d stored once in the tree", a));
        seen[a] = 1;
        check(pos.exists(a) && pos[a] == tree[k].leaf, "tree copy carries the current leaf");
      end
    end
  endtask


  // ---------------- streaming mode ----------------
  // Up to 4 requests to distinct blocks are outstanding; answers may come
  // back in any order. Checks per answer: it belongs to an outstanding
  // request; a hit keeps the leaf; a miss on a known block saw it read.
  int n_reordered;
  task automatic stream_run();
    int pend [$];
    int sent, answered;
    sent = 0; answered = 0; n_reordered = 0;
    fork
      begin : sender
        while (sent < NACC) begin
          int a;
          bit dup;
          @(negedge clk);
          do begin
            a = $urandom_range(0, NBLK - 1);
            dup = 0;
            foreach (pend[i]) if (pend[i] == a) dup = 1;
          end while (dup);
          if (pend.size() < 4) begin
            req_valid = 1'b1; req_addr = ADDR_W'(a);
            req_leaf  = pos.exists(a) ? pos[a] : L'($urandom);
            do @(posedge clk); while (!req_ready);
            pend.push_back(a);
            sent++;
            @(negedge clk); req_valid = 1'b0;
          end
        end
      end
      begin : receiver
        while (answered < NACC) begin
          int a, k;
          do @(posedge clk); while (!rsp_valid);
          a = int'(rsp_addr);
          k = -1;
          foreach (pend[i]) if (pend[i] == a && k < 0) k = i;
          check(k >= 0, "answer belongs to an outstanding request");
          if (k > 0) n_reordered++;
          if (k >= 0) pend.delete(k);
          if (rsp_hit) begin
            n_hit++;
            if (rsp_lpc) n_lpc_hit++;
            check(pos.exists(a) && rsp_leaf == pos[a], "hit keeps the block's leaf");
          end else begin
            n_miss++;
            if (pos.exists(a)) begin
              check(seen_rd.exists(a), $sformatf("block %0d found on its path", a));
              n_found++;
            end else n_new++;
            pos[a] = rsp_leaf;
          end
          seen_rd.delete();
          answered++;
        end
      end
    join
    do @(posedge clk); while (!idle);
    @(negedge clk);
    check(rsp_q.size() == 0, "all read responses consumed");
    check(!stash_overflow, "no stash overflow");
    check_tree();
    $display("mechanisms: reordered answers=%0d", n_reordered);
    check(n_reordered > 0, "requests were reordered");
    check(n_skip == 0, "no per-access pattern bookkeeping in streaming mode");
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    req_valid = 1'b0; req_addr = '0; req_leaf = '0; rsp_ready = 1'b1;
    rd_req_ready = 1'b0; wr_ready = 1'b0; rd_rsp_valid = 1'b0;
    rd_rsp_real = 1'b0; rd_rsp_addr = '0; rd_rsp_leaf = '0;
    last_valid = 1'b0; last_x = '0; cycle = 0;
    n_hit = 0; n_lpc_hit = 0; n_miss = 0; n_new = 0; n_found = 0; n_skip = 0; n_top = 0;
    n_delay_real = 0; n_delay_dummy = 0; n_reuse_real = 0; n_reuse_dummy = 0;
    @(posedge rst_n);
    if (STREAM) stream_run();
    else for (int n = 0; n < NACC; n++) begin
      int a;
      longint t0, lat;
      bit was_hit;
      if (recent.size() > 0 && $urandom_range(0, 9) < 4) a = recent[$urandom_range(0, recent.size() - 1)];
      else a = $urandom_range(0, NBLK - 1);
      recent.push_back(a);
      if (recent.size() > 3) void'(recent.pop_front());
      @(negedge clk);
      cur_addr = ADDR_W'(a);
      cur_x    = pos.exists(a) ? pos[a] : L'($urandom);
      found = 1'b0; rd_order_lvl = -1; wr_order_lvl = L;
      for (int l = 0; l <= L; l++) begin rd_cnt[l] = 0; old_wr[l] = 0; new_wr[l] = 0; end
      req_valid = 1'b1; req_addr = cur_addr; req_leaf = cur_x;
      do @(posedge clk); while (!req_ready);
      t0 = cycle;
      @(negedge clk); req_valid = 1'b0;
      do @(posedge clk); while (!rsp_valid);
      lat = cycle - t0;
      check(rsp_addr == cur_addr, "response address");
      was_hit = rsp_hit;
      if (was_hit) begin
        n_hit++;
        if (rsp_lpc) n_lpc_hit++;
        check(pos.exists(a) && rsp_leaf == pos[a], "hit keeps the block's leaf");
        check(lat == HIT_LAT, $sformatf("hit latency %0d cycles", lat));
      end else begin
        n_miss++;
        if (pos.exists(a)) begin
          check(found, $sformatf("block %0d found on its path %0h", a, cur_x));
          if (found) n_found++;
        end else n_new++;
        pos[a] = rsp_leaf;
      end
      // wait for the end of the access
      do @(posedge clk); while (!idle);
      @(negedge clk);
      if (was_hit) begin
        int tot;
        tot = 0;
        for (int l = 0; l <= L; l++) tot += rd_cnt[l] + old_wr[l] + new_wr[l];
        check(tot == 0, "stash hit causes no memory access");
      end else begin
        for (int l = 0; l <= L; l++) begin
          bit ov;
          ov = last_valid && shares(cur_x, last_x, l);
          if (ov) n_skip++;
          if (l < TREETOP) n_top++;
          check(rd_cnt[l] == ((ov || l < TREETOP) ? 0 : 1), $sformatf("reads at level %0d", l));
          check(old_wr[l] == ((l < THRESHOLD && l >= TREETOP && last_valid && !ov) ? Z : 0),
                $sformatf("write-back level %0d: %0d writes", l, old_wr[l]));
          check(new_wr[l] == ((l >= THRESHOLD && l >= TREETOP) ? Z : 0),
                $sformatf("write-through level %0d: %0d writes", l, new_wr[l]));
        end
        last_x = cur_x; last_valid = 1'b1;
      end
      check(rsp_q.size() == 0, "all read responses consumed");
      check(!stash_overflow && int'(stash_used) <= STASH_SIZE, "no stash overflow");
      check_tree();
    end
    if (!STREAM) check(n_skip > 0, "shared levels skipped on reads");
    $display("mechanisms: hits=%0d (left-behind %0d) lpc_hits=%0d misses=%0d found_on_path=%0d new_blocks=%0d skipped_reads=%0d",
             n_hit, n_hit - n_lpc_hit, n_lpc_hit, n_miss, n_found, n_new, n_skip);
    $display("            delay_writes real=%0d dummy=%0d  reuse_writes real=%0d dummy=%0d",
             n_delay_real, n_delay_dummy, n_reuse_real, n_reuse_dummy);
    check(n_hit > 0, "stash hit happened");
    if (EXPECT_LEFTOVER) check(n_hit > n_lpc_hit, "hit on a block left behind in the stash happened");
    check(n_lpc_hit > 0, "hit on an LPC-held block happened");
    check(n_found > 0, "miss served from the tree happened");
    check(n_new > 0, "new block created");
    if (TREETOP > 0) begin
      $display("            treetop levels left untouched: %0d", n_top);
      check(n_top > 0, "treetop levels skipped");
    end
    if (THRESHOLD > 0) check(n_delay_real > 0 && n_delay_dummy > 0, "delayed write-backs happened");
    if (THRESHOLD <= L) check(n_reuse_real > 0 && n_reuse_dummy > 0, "write-through writes happened");
    done = 1'b1;
  end

endmodule
