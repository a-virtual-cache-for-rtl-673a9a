// oram_controller: Path ORAM controller with last path caching.
//
// Path ORAM hides which memory block a processor touches: every block is
// mapped to a random leaf of a binary tree of buckets (L+1 levels, Z slots
// each) kept in untrusted memory, and each access reads the whole path from
// the root to that leaf into an on-chip stash, remaps the block to a new
// random leaf, and writes the path back, placing every stash block as deep
// as its own leaf allows. Two successive paths always share their top part,
// and writing that part back only to read it again at once is wasted
// traffic. The Last Path Cache (LPC) removes it: the blocks written to the
// last path stay valid in the stash, and a pointer array (module lpc)
// remembers which stash entries they are. Levels 0..THRESHOLD-1 of the cache
// are write-back ("Delay": a bucket reaches the tree only when the next path
// no longer covers it), levels THRESHOLD..L are write-through ("Reuse": every
// bucket is written to the tree, but shared buckets are not read again).
// THRESHOLD = 0 gives the pure Reuse scheme, THRESHOLD = L+1 pure Delay.
// What reaches memory depends only on the sequence of paths.
//
// Optional treetop caching (TREETOP = k > 0, at most L): levels 0..k-1 of
// the tree are never read or written; the blocks that would be placed there
// simply stay in the stash, which then has to hold up to (2^k - 1) * Z more
// blocks. The default is 0, as in the prototype; the evaluation combines the
// two caches with k = 1..3.
//
// Like the prototype it follows, the controller has no position map (the
// request carries the block's current leaf ID) and no tree storage: the tree
// is reached through three streams, read request, read response and write
// request. The stash holds tags only (address and leaf ID), no block data.
//
// One access (request for address A on leaf x):
//  1. LOOKUP   search the stash CAM; a hit (also on an LPC block) is answered
//              at once, leaf unchanged, and nothing reaches memory.
//  2. remap    on a miss, draw a new leaf from the Xorshift RNG for A.
//  3. PREP     levels shared with the last path: their LPC blocks become
//              ordinary stash blocks again (no tree read).
//     SCAN     every ordinary stash block is pushed into the min-heap with key
//              leaf XOR x.
//     RD_*     read requests for the levels not shared with the last path
//              (and below the treetop levels), root first; each returns Z tags, real ones take a free stash
//              entry and join the heap. A never-written block is created.
//     RESP     the request is answered (hit = 0, new leaf).
//  4. WB_*     from the leaf level up to the root (or level TREETOP), per level: the LPC entries
//              of the old, non-shared bucket leave the stash (a Delay level
//              first writes them, dummies included, to that old bucket); then
//              Z slots are filled from the heap head while its block fits the
//              level, the rest with "empty"; the LPC records the stash indices;
//              a Reuse level also writes the bucket (dummies included) to the
//              tree at path x.
//  5. FINISH   the LPC remembers x as the last path.
//
// Streams use valid/ready handshakes; a transfer happens when both are high.
// Read requests carry (path, level); a read response is Z beats, one tag per
// slot, in slot order. Write requests carry (path, level, slot, tag). The
// response stream is this design's own addition, so a position map can
// record the new leaf. idle is high between accesses. stash_overflow is sticky: a block that found no free
// stash entry was lost. Stash size and Z, L and threshold defaults follow the
// prototype and the evaluation; the stream formats, the heap rebuild at the
// start of each access, the creation of never-written blocks and the
// overflow flag are this design's own choices.
module oram_controller
  import oram_pkg::*;
#(
  parameter int unsigned L          = 23,
  parameter int unsigned Z          = 4,
  parameter int unsigned STASH_SIZE = 256,
  parameter int unsigned THRESHOLD  = 8,
  parameter int unsigned TREETOP    = 0,     // levels kept in the stash (treetop caching)
  parameter int unsigned ADDR_W     = 32,
  parameter logic [31:0] SEED       = 32'h2545_F491,
  localparam int unsigned LVL_W  = $clog2(L + 1),
  localparam int unsigned SLOT_W = (Z > 1) ? $clog2(Z) : 1,
  localparam int unsigned IDX_W  = (STASH_SIZE > 1) ? $clog2(STASH_SIZE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ORAM request from the core
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [L-1:0]      req_leaf,
  // answer to the core
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [ADDR_W-1:0] rsp_addr,
  output logic              rsp_hit,       // found in the stash, no path access
  output logic              rsp_lpc,       // ... on a block held for the LPC
  output logic [L-1:0]      rsp_leaf,      // leaf the block is now mapped to
  // read request to the ORAM tree
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [L-1:0]      rd_req_path,
  output logic [LVL_W-1:0]  rd_req_level,
  // read response from the ORAM tree (Z beats per request)
  input  logic              rd_rsp_valid,
  output logic              rd_rsp_ready,
  input  logic              rd_rsp_real,
  input  logic [ADDR_W-1:0] rd_rsp_addr,
  input  logic [L-1:0]      rd_rsp_leaf,
  // write request to the ORAM tree
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [L-1:0]      wr_path,
  output logic [LVL_W-1:0]  wr_level,
  output logic [SLOT_W-1:0] wr_slot,
  output logic              wr_real,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [L-1:0]      wr_leaf,
  // status
  output logic              stash_overflow,
  output logic [IDX_W:0]    stash_used,
  output logic              idle           // no access in progress
);

  localparam int unsigned TAG_W = ADDR_W + L;
  localparam int unsigned HPOS_W = $clog2(STASH_SIZE + 1) + 1;

  // ------------------------------------------------------------------
  // Sub-blocks
  // ------------------------------------------------------------------
  logic              cam_wr_en, cam_inv_en, cam_hit, cam_free_valid;
  logic [IDX_W-1:0]  cam_wr_idx, cam_inv_idx, cam_hit_idx, cam_free_idx;
  logic [ADDR_W-1:0] cam_wr_key;
  logic [STASH_SIZE-1:0] cam_valid;

  logic              ram_wr_en, ram_rd_en;
  logic [IDX_W-1:0]  ram_wr_idx, ram_rd_idx;
  logic [TAG_W-1:0]  ram_wr_data, ram_rd_data;
  logic [ADDR_W-1:0] ram_rd_addr;
  logic [L-1:0]      ram_rd_leaf;

  logic              heap_clear, heap_push, heap_push_ready, heap_pop, heap_pop_ready;
  logic              heap_head_valid, heap_busy;
  logic [L-1:0]      heap_push_key, heap_head_key;
  logic [IDX_W-1:0]  heap_push_val, heap_head_val;
  logic [HPOS_W-1:0] heap_count;

  logic              lpc_rd_valid, lpc_wr_en, lpc_wr_valid, lpc_set_path, lpc_path_valid, lpc_overlap;
  logic [IDX_W-1:0]  lpc_rd_ptr, lpc_wr_ptr;
  logic [L-1:0]      lpc_last_path;

  logic              rng_next;
  logic [31:0]       rng_value;

  // ------------------------------------------------------------------
  // Registers
  // ------------------------------------------------------------------
  ctrl_state_e       state_q, state_d;
  logic [ADDR_W-1:0] addr_q;
  logic [L-1:0]      path_q, new_leaf_q, new_leaf_d;
  logic [LVL_W-1:0]  lvl_q, lvl_d;
  logic [SLOT_W-1:0] slot_q, slot_d;
  logic [IDX_W-1:0]  scan_q, scan_d, ptr_q, ptr_d;
  logic              found_q, found_d, hit_lpc_q, hit_lpc_d;
  logic [L-1:0]      hit_leaf_q, hit_leaf_d;
  logic              overflow_q, overflow_set;
  logic [STASH_SIZE-1:0] held_q;   // entry holds a block of the LPC
  logic              held_set, held_clr;
  logic [IDX_W-1:0]  held_set_idx, held_clr_idx;

  stash_cam #(.ENTRIES(STASH_SIZE), .KEY_W(ADDR_W)) u_cam (
    .clk, .rst_n,
    .wr_en(cam_wr_en), .wr_idx(cam_wr_idx), .wr_key(cam_wr_key),
    .inv_en(cam_inv_en), .inv_idx(cam_inv_idx),
    .search_key(addr_q), .search_hit(cam_hit), .search_idx(cam_hit_idx),
    .free_valid(cam_free_valid), .free_idx(cam_free_idx), .used_count(stash_used),
    .valid(cam_valid)
  );

  stash_ram #(.ENTRIES(STASH_SIZE), .WIDTH(TAG_W)) u_ram (
    .clk,
    .wr_en(ram_wr_en), .wr_idx(ram_wr_idx), .wr_data(ram_wr_data),
    .rd_en(ram_rd_en), .rd_idx(ram_rd_idx), .rd_data(ram_rd_data)
  );
  assign {ram_rd_addr, ram_rd_leaf} = ram_rd_data;

  binary_heap #(.DEPTH(STASH_SIZE), .KEY_W(L), .VAL_W(IDX_W)) u_heap (
    .clk, .rst_n, .clear(heap_clear),
    .push_valid(heap_push), .push_ready(heap_push_ready),
    .push_key(heap_push_key), .push_val(heap_push_val),
    .pop_valid(heap_pop), .pop_ready(heap_pop_ready),
    .head_valid(heap_head_valid), .head_key(heap_head_key), .head_val(heap_head_val),
    .busy(heap_busy), .count(heap_count)
  );

  lpc #(.L(L), .Z(Z), .STASH_SIZE(STASH_SIZE)) u_lpc (
    .clk, .rst_n,
    .rd_level(lvl_q), .rd_slot(slot_q), .rd_valid(lpc_rd_valid), .rd_ptr(lpc_rd_ptr),
    .wr_en(lpc_wr_en), .wr_level(lvl_q), .wr_slot(slot_q), .wr_valid(lpc_wr_valid), .wr_ptr(lpc_wr_ptr),
    .set_path(lpc_set_path), .new_path(path_q), .path_valid(lpc_path_valid), .last_path(lpc_last_path),
    .cur_path(path_q), .q_level(lvl_q), .q_overlap(lpc_overlap)
  );

  xorshift_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .next(rng_next), .value(rng_value));

  // ------------------------------------------------------------------
  // Per-level facts
  // ------------------------------------------------------------------
  logic delay_lvl;      // this LPC level is write-back
  logic old_bucket;     // the LPC holds a bucket of the last path here that x does not share
  logic last_slot;
  logic head_fits;      // heap head may be placed at level lvl_q of path x
  logic top_lvl;        // level kept on chip by treetop caching
  logic wb_last_lvl;    // last level of the path write-back
  assign delay_lvl  = (int'(lvl_q) < int'(THRESHOLD));
  assign old_bucket = lpc_path_valid && !lpc_overlap;
  assign last_slot  = (int'(slot_q) == int'(Z) - 1);
  assign head_fits  = heap_head_valid && ((heap_head_key >> (L - int'(lvl_q))) == '0);
  assign top_lvl     = (int'(lvl_q) < int'(TREETOP));
  assign wb_last_lvl = (int'(lvl_q) <= int'(TREETOP));

  // leaf a block read from the tree is given: the requested block is remapped
  logic [L-1:0] rd_leaf_eff;
  assign rd_leaf_eff = (rd_rsp_addr == addr_q) ? new_leaf_q : rd_rsp_leaf;

  // ------------------------------------------------------------------
  // Control
  // ------------------------------------------------------------------
  always_comb begin
    state_d    = state_q;
    lvl_d      = lvl_q;
    slot_d     = slot_q;
    scan_d     = scan_q;
    ptr_d      = ptr_q;
    found_d    = found_q;
    new_leaf_d = new_leaf_q;
    hit_lpc_d  = hit_lpc_q;
    hit_leaf_d = hit_leaf_q;

    req_ready    = 1'b0;
    rsp_valid    = 1'b0;
    rsp_hit      = 1'b0;
    rsp_leaf     = new_leaf_q;
    rd_req_valid = 1'b0;
    rd_rsp_ready = 1'b0;
    wr_valid     = 1'b0;
    wr_path      = path_q;
    wr_real      = 1'b0;
    wr_addr      = '0;
    wr_leaf      = '0;

    cam_wr_en = 1'b0; cam_wr_idx = cam_free_idx; cam_wr_key = rd_rsp_addr;
    cam_inv_en = 1'b0; cam_inv_idx = lpc_rd_ptr;
    ram_wr_en = 1'b0; ram_wr_idx = cam_free_idx; ram_wr_data = {rd_rsp_addr, rd_leaf_eff};
    ram_rd_en = 1'b0; ram_rd_idx = scan_q;
    heap_clear = 1'b0; heap_push = 1'b0; heap_pop = 1'b0;
    heap_push_key = ram_rd_leaf ^ path_q; heap_push_val = scan_q;
    lpc_wr_en = 1'b0; lpc_wr_valid = 1'b0; lpc_wr_ptr = heap_head_val;
    lpc_set_path = 1'b0;
    rng_next = 1'b0;
    overflow_set = 1'b0;
    held_set = 1'b0; held_set_idx = heap_head_val;
    held_clr = 1'b0; held_clr_idx = lpc_rd_ptr;

    unique case (state_q)
      S_IDLE: begin
        req_ready = 1'b1;
        if (req_valid) state_d = S_LOOKUP;
      end

      S_LOOKUP: begin
        if (cam_hit) begin
          ram_rd_en  = 1'b1;
          ram_rd_idx = cam_hit_idx;
          hit_lpc_d  = held_q[cam_hit_idx];
          state_d    = S_HIT_RD;
        end else begin
          rng_next   = 1'b1;
          new_leaf_d = rng_value[L-1:0];
          found_d    = 1'b0;
          lvl_d      = '0;
          slot_d     = '0;
          state_d    = S_PREP;
        end
      end

      S_HIT_RD: begin
        hit_leaf_d = ram_rd_leaf;
        state_d    = S_RESP_HIT;
      end

      S_RESP_HIT: begin
        rsp_valid = 1'b1;
        rsp_hit   = 1'b1;
        rsp_leaf  = hit_leaf_q;
        if (rsp_ready) state_d = S_IDLE;
      end

      // Shared levels: the LPC's blocks there are simply kept in the stash.
      S_PREP: begin
        if (!lpc_overlap) begin
          scan_d  = '0;
          state_d = S_SCAN;
        end else begin
          if (lpc_rd_valid) begin
            held_clr  = 1'b1;
            lpc_wr_en = 1'b1;     // pointer invalid
          end
          slot_d = slot_q + 1'b1;
          if (last_slot) begin
            slot_d = '0;
            if (int'(lvl_q) == int'(L)) begin
              scan_d  = '0;
              state_d = S_SCAN;
            end else begin
              lvl_d = lvl_q + 1'b1;
            end
          end
        end
      end

      S_SCAN: begin
        if (cam_valid[scan_q] && !held_q[scan_q]) begin
          ram_rd_en  = 1'b1;
          ram_rd_idx = scan_q;
          state_d    = S_SCAN_PUSH;
        end else if (int'(scan_q) == int'(STASH_SIZE) - 1) begin
          lvl_d   = '0;
          state_d = S_RD_REQ;
        end else begin
          scan_d = scan_q + 1'b1;
        end
      end

      S_SCAN_PUSH: begin
        heap_push = 1'b1;
        if (heap_push_ready) begin
          if (int'(scan_q) == int'(STASH_SIZE) - 1) begin
            lvl_d   = '0;
            state_d = S_RD_REQ;
          end else begin
            scan_d  = scan_q + 1'b1;
            state_d = S_SCAN;
          end
        end
      end

      S_RD_REQ: begin
        if (lpc_overlap || top_lvl) begin
          if (int'(lvl_q) == int'(L)) state_d = S_RD_DONE;
          else                        lvl_d   = lvl_q + 1'b1;
        end else begin
          rd_req_valid = 1'b1;
          if (rd_req_ready) begin
            slot_d  = '0;
            state_d = S_RD_RSP;
          end
        end
      end

      S_RD_RSP: begin
        if (rd_rsp_real && cam_free_valid) begin
          rd_rsp_ready  = heap_push_ready;
          heap_push     = rd_rsp_valid;
          heap_push_key = rd_leaf_eff ^ path_q;
          heap_push_val = cam_free_idx;
        end else begin
          rd_rsp_ready = 1'b1;
        end
        if (rd_rsp_valid && rd_rsp_ready) begin
          if (rd_rsp_real) begin
            if (cam_free_valid) begin
              cam_wr_en    = 1'b1;
              ram_wr_en    = 1'b1;
              held_clr     = 1'b1;
              held_clr_idx = cam_free_idx;
              if (rd_rsp_addr == addr_q) found_d = 1'b1;
            end else begin
              overflow_set = 1'b1;
            end
          end
          slot_d = slot_q + 1'b1;
          if (last_slot) begin
            slot_d = '0;
            if (int'(lvl_q) == int'(L)) state_d = S_RD_DONE;
            else begin
              lvl_d   = lvl_q + 1'b1;
              state_d = S_RD_REQ;
            end
          end
        end
      end

      // The requested block was never written before: create its entry.
      S_RD_DONE: begin
        if (found_q) begin
          state_d = S_RESP_MISS;
        end else if (!cam_free_valid) begin
          overflow_set = 1'b1;
          state_d      = S_RESP_MISS;
        end else if (heap_push_ready) begin
          cam_wr_key    = addr_q;
          cam_wr_en     = 1'b1;
          ram_wr_en     = 1'b1;
          ram_wr_data   = {addr_q, new_leaf_q};
          held_clr      = 1'b1;
          held_clr_idx  = cam_free_idx;
          heap_push     = 1'b1;
          heap_push_key = new_leaf_q ^ path_q;
          heap_push_val = cam_free_idx;
          state_d       = S_RESP_MISS;
        end
      end

      S_RESP_MISS: begin
        rsp_valid = 1'b1;
        if (rsp_ready) begin
          lvl_d   = LVL_W'(L);
          slot_d  = '0;
          state_d = S_WB_OLD;
        end
      end

      // Retire the LPC bucket of the last path that x does not share.
      S_WB_OLD: begin
        wr_path = lpc_last_path;
        if (!old_bucket) begin
          slot_d  = '0;
          state_d = S_WB_NEW;
        end else if (lpc_rd_valid && delay_lvl) begin
          ram_rd_en  = 1'b1;
          ram_rd_idx = lpc_rd_ptr;
          ptr_d      = lpc_rd_ptr;
          state_d    = S_WB_OLD_WR;
        end else begin
          if (lpc_rd_valid) begin          // Reuse level: the tree has it already
            cam_inv_en = 1'b1;
            lpc_wr_en  = 1'b1;
          end
          wr_valid = delay_lvl;            // Delay level: dummy slot
          if (!delay_lvl || wr_ready) begin
            slot_d = slot_q + 1'b1;
            if (last_slot) begin
              slot_d  = '0;
              state_d = S_WB_NEW;
            end
          end
        end
      end

      S_WB_OLD_WR: begin
        wr_path  = lpc_last_path;
        wr_valid = 1'b1;
        wr_real  = 1'b1;
        wr_addr  = ram_rd_addr;
        wr_leaf  = ram_rd_leaf;
        if (wr_ready) begin
          cam_inv_en  = 1'b1;
          cam_inv_idx = ptr_q;
          lpc_wr_en   = 1'b1;
          slot_d      = slot_q + 1'b1;
          state_d     = S_WB_OLD;
          if (last_slot) begin
            slot_d  = '0;
            state_d = S_WB_NEW;
          end
        end
      end

      // Fill bucket (x, lvl) from the heap head.
      S_WB_NEW: begin
        if (!heap_busy) begin
          if (head_fits) begin
            heap_pop     = 1'b1;
            lpc_wr_en    = 1'b1;
            lpc_wr_valid = 1'b1;
            held_set     = 1'b1;
            if (!delay_lvl) begin
              ram_rd_en  = 1'b1;
              ram_rd_idx = heap_head_val;
              state_d    = S_WB_NEW_WR;
            end
          end else begin
            lpc_wr_en = 1'b1;            // empty slot
            wr_valid  = !delay_lvl;      // Reuse level: dummy write
          end
          if ((head_fits && delay_lvl) || (!head_fits && (delay_lvl || wr_ready))) begin
            slot_d = slot_q + 1'b1;
            if (last_slot) begin
              slot_d = '0;
              if (wb_last_lvl) state_d = S_FINISH;
              else begin
                lvl_d   = lvl_q - 1'b1;
                state_d = S_WB_OLD;
              end
            end
          end
        end
      end

      S_WB_NEW_WR: begin
        wr_valid = 1'b1;
        wr_real  = 1'b1;
        wr_addr  = ram_rd_addr;
        wr_leaf  = ram_rd_leaf;
        if (wr_ready) begin
          slot_d  = slot_q + 1'b1;
          state_d = S_WB_NEW;
          if (last_slot) begin
            slot_d = '0;
            if (wb_last_lvl) state_d = S_FINISH;
            else begin
              lvl_d   = lvl_q - 1'b1;
              state_d = S_WB_OLD;
            end
          end
        end
      end

      S_FINISH: begin
        lpc_set_path = 1'b1;
        heap_clear   = 1'b1;
        state_d      = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      path_q     <= '0;
      new_leaf_q <= '0;
      lvl_q      <= '0;
      slot_q     <= '0;
      scan_q     <= '0;
      ptr_q      <= '0;
      found_q    <= 1'b0;
      hit_lpc_q  <= 1'b0;
      hit_leaf_q <= '0;
      overflow_q <= 1'b0;
      held_q     <= '0;
    end else begin
      state_q    <= state_d;
      lvl_q      <= lvl_d;
      slot_q     <= slot_d;
      scan_q     <= scan_d;
      ptr_q      <= ptr_d;
      found_q    <= found_d;
      new_leaf_q <= new_leaf_d;
      hit_lpc_q  <= hit_lpc_d;
      hit_leaf_q <= hit_leaf_d;
      if (state_q == S_IDLE && req_valid) begin
        addr_q <= req_addr;
        path_q <= req_leaf;
      end
      if (overflow_set) overflow_q <= 1'b1;
      if (held_clr) held_q[held_clr_idx] <= 1'b0;
      if (held_set) held_q[held_set_idx] <= 1'b1;
    end
  end

  assign rsp_addr       = addr_q;
  assign rd_req_path    = path_q;
  assign rd_req_level   = lvl_q;
  assign wr_level       = lvl_q;
  assign wr_slot        = slot_q;
  assign rsp_lpc        = rsp_hit && hit_lpc_q;
  assign stash_overflow = overflow_q;
  assign idle           = (state_q == S_IDLE);

  // A request held on a stream must not change until it is taken.
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && !wr_ready |=> wr_valid && $stable({wr_path, wr_level, wr_slot, wr_real}));
  a_rd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable({rd_req_path, rd_req_level}));
  a_rsp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid);

  initial assert (TREETOP <= L) else $error("TREETOP must leave the leaf level in the tree");

endmodule
