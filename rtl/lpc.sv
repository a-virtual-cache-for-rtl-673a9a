// lpc: the Last Path Cache, built as a pointer array.
//
// Instead of holding copies of blocks, the cache remembers which stash
// entries hold the blocks that were written to the last path: one pointer
// (stash index plus valid bit) per slot of each of the L+1 buckets on that
// path, (L+1)*Z pointers of log2(STASH_SIZE) bits in all. Those blocks stay
// valid in the stash, so a search of the stash also searches the cache. The
// module also keeps the ID of the last path and answers, for the path being
// accessed and a level, whether the bucket at that level is shared with the
// last path (the overlapped part). Before the first path has been recorded
// nothing overlaps.
//
// Timing: the pointer read port and the overlap test are combinational
// ("zero-cycle" reads); pointer writes and set_path take effect at the clock
// edge. Reset invalidates every pointer.
// The pointer array, its size and the zero-cycle read follow the prototype;
// the port layout and the overlap test placed in this module are this
// design's own choices.
module lpc #(
  parameter int unsigned L          = 23,
  parameter int unsigned Z          = 4,
  parameter int unsigned STASH_SIZE = 256,
  localparam int unsigned LVL_W  = $clog2(L + 1),
  localparam int unsigned SLOT_W = (Z > 1) ? $clog2(Z) : 1,
  localparam int unsigned IDX_W  = (STASH_SIZE > 1) ? $clog2(STASH_SIZE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // pointer read port (combinational)
  input  logic [LVL_W-1:0]  rd_level,
  input  logic [SLOT_W-1:0] rd_slot,
  output logic              rd_valid,
  output logic [IDX_W-1:0]  rd_ptr,
  // pointer write port
  input  logic              wr_en,
  input  logic [LVL_W-1:0]  wr_level,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic              wr_valid,
  input  logic [IDX_W-1:0]  wr_ptr,
  // last path register
  input  logic              set_path,
  input  logic [L-1:0]      new_path,
  output logic              path_valid,
  output logic [L-1:0]      last_path,
  // overlap test
  input  logic [L-1:0]      cur_path,
  input  logic [LVL_W-1:0]  q_level,
  output logic              q_overlap
);

  localparam int unsigned SLOTS = (L + 1) * Z;

  logic [SLOTS-1:0] vld_q;
  logic [IDX_W-1:0] ptr_q [SLOTS];

  function automatic int unsigned slot_index(input logic [LVL_W-1:0] lv, input logic [SLOT_W-1:0] s);
    return int'(lv) * Z + int'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q      <= '0;
      path_valid <= 1'b0;
      last_path  <= '0;
    end else begin
      if (wr_en) vld_q[slot_index(wr_level, wr_slot)] <= wr_valid;
      if (set_path) begin
        path_valid <= 1'b1;
        last_path  <= new_path;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) ptr_q[slot_index(wr_level, wr_slot)] <= wr_ptr;
  end

  assign rd_valid = vld_q[slot_index(rd_level, rd_slot)];
  assign rd_ptr   = ptr_q[slot_index(rd_level, rd_slot)];

  // Levels 0..q_level agree when the top q_level bits of the two IDs agree.
  logic [L-1:0] diff;
  assign diff      = (cur_path ^ last_path) >> (L - int'(q_level));
  assign q_overlap = path_valid && (diff == '0);

endmodule
