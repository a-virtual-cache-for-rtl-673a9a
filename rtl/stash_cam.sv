// stash_cam: content-addressable memory of the stash.
//
// Holds, for every stash entry, a valid bit and the address of the block the
// entry tracks. A search compares search_key with every valid entry in
// parallel and reports, in the same cycle, whether one matches and its index;
// this is how step 1 of an ORAM access (and, because blocks of the last path
// cache stay valid in the stash, the search of that cache too) costs no
// extra cycle. The CAM also reports the lowest-numbered free entry, so the
// controller can place a block read from the tree, and the number of valid
// entries.
//
// Timing: wr_en sets entry wr_idx valid with key wr_key, inv_en clears entry
// inv_idx; both take effect at the clock edge. Search, free-entry and count
// outputs, and the vector of valid bits, are combinational on the current
// contents. An address must be held
// by one entry at most; the controller guarantees it.
// The CAM itself follows the prototype; the free-entry search and the
// priority order (lowest index first) are this design's own choices.
module stash_cam #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned KEY_W   = 32,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [KEY_W-1:0] wr_key,
  input  logic             inv_en,
  input  logic [IDX_W-1:0] inv_idx,
  input  logic [KEY_W-1:0] search_key,
  output logic             search_hit,
  output logic [IDX_W-1:0] search_idx,
  output logic             free_valid,
  output logic [IDX_W-1:0] free_idx,
  output logic [IDX_W:0]   used_count,
  output logic [ENTRIES-1:0] valid
);

  logic [ENTRIES-1:0] valid_q;
  logic [KEY_W-1:0]   key_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (inv_en) valid_q[inv_idx] <= 1'b0;
      if (wr_en)  valid_q[wr_idx]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) key_q[wr_idx] <= wr_key;
  end

  assign valid = valid_q;

  // Parallel match; with at most one match the OR of matching indices is the
  // index itself.
  always_comb begin
    search_hit = 1'b0;
    search_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && key_q[i] == search_key) begin
        search_hit = 1'b1;
        search_idx = search_idx | IDX_W'(i);
      end
    end
  end

  // Lowest free entry.
  always_comb begin
    free_valid = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        free_valid = 1'b1;
        free_idx   = IDX_W'(i);
      end
    end
  end

  always_comb begin
    used_count = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) used_count = used_count + (IDX_W+1)'(valid_q[i]);
  end

endmodule
