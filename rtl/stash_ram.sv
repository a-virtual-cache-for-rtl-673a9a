// stash_ram: tag RAM of the stash.
//
// One word per stash entry, holding the tag of the block the entry tracks:
// its block address and its leaf ID (the path it is mapped to). The stash of
// this controller keeps only tags, no block data. The RAM has one write port
// and one synchronous read port, as a block RAM has: the word addressed by
// rd_idx while rd_en is high appears on rd_data after the next clock edge and
// stays there until the next read. A read and a write of the same entry in one
// cycle return the old word. Using a block RAM for the stash tags follows the
// prototype; the word layout and the port timing are this design's choice.
module stash_ram #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned WIDTH   = 55,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_idx];
  end

endmodule
