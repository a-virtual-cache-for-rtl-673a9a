// oram_system: the ORAM controller with its request reordering window.
//
// Requests from the core first enter a window of WINDOW pending requests
// (module request_window), which hands the controller, each time it becomes
// free, the pending request whose path follows the last one most closely in
// leaf-ID order (wrapping around at the end). Consecutive paths then share
// more levels, so the Last Path Cache inside the controller saves more
// memory traffic. WINDOW = 0 leaves the window out and passes requests to
// the controller in arrival order.
//
// Ports are those of oram_controller (see there for the streams and their
// timing), with the request stream now entering the window: requests may be
// answered in a different order than they arrived, and rsp_addr tells which
// one an answer belongs to. A core must not have two requests for the same
// address pending at once. The window size of 8 follows the best evaluated
// configuration; WINDOW = 0 corresponds to the hardware prototype. TREETOP
// is passed to the controller (treetop caching, off by default).
module oram_system #(
  parameter int unsigned L          = 23,
  parameter int unsigned Z          = 4,
  parameter int unsigned STASH_SIZE = 256,
  parameter int unsigned THRESHOLD  = 8,
  parameter int unsigned TREETOP    = 0,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned WINDOW     = 8,
  parameter logic [31:0] SEED       = 32'h2545_F491,
  localparam int unsigned LVL_W  = $clog2(L + 1),
  localparam int unsigned SLOT_W = (Z > 1) ? $clog2(Z) : 1,
  localparam int unsigned IDX_W  = (STASH_SIZE > 1) ? $clog2(STASH_SIZE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [L-1:0]      req_leaf,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [ADDR_W-1:0] rsp_addr,
  output logic              rsp_hit,
  output logic              rsp_lpc,
  output logic [L-1:0]      rsp_leaf,
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [L-1:0]      rd_req_path,
  output logic [LVL_W-1:0]  rd_req_level,
  input  logic              rd_rsp_valid,
  output logic              rd_rsp_ready,
  input  logic              rd_rsp_real,
  input  logic [ADDR_W-1:0] rd_rsp_addr,
  input  logic [L-1:0]      rd_rsp_leaf,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [L-1:0]      wr_path,
  output logic [LVL_W-1:0]  wr_level,
  output logic [SLOT_W-1:0] wr_slot,
  output logic              wr_real,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [L-1:0]      wr_leaf,
  output logic              stash_overflow,
  output logic [IDX_W:0]    stash_used,
  output logic              idle
);

  logic              c_req_valid, c_req_ready;
  logic [ADDR_W-1:0] c_req_addr;
  logic [L-1:0]      c_req_leaf;

  if (WINDOW > 0) begin : g_window
    request_window #(.DEPTH(WINDOW), .L(L), .ADDR_W(ADDR_W)) u_window (
      .clk, .rst_n,
      .in_valid(req_valid), .in_ready(req_ready), .in_addr(req_addr), .in_leaf(req_leaf),
      .out_valid(c_req_valid), .out_ready(c_req_ready), .out_addr(c_req_addr), .out_leaf(c_req_leaf)
    );
  end else begin : g_direct
    assign c_req_valid = req_valid;
    assign req_ready   = c_req_ready;
    assign c_req_addr  = req_addr;
    assign c_req_leaf  = req_leaf;
  end

  oram_controller #(
    .L(L), .Z(Z), .STASH_SIZE(STASH_SIZE), .THRESHOLD(THRESHOLD), .TREETOP(TREETOP), .ADDR_W(ADDR_W), .SEED(SEED)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req_addr(c_req_addr), .req_leaf(c_req_leaf),
    .rsp_valid, .rsp_ready, .rsp_addr, .rsp_hit, .rsp_lpc, .rsp_leaf,
    .rd_req_valid, .rd_req_ready, .rd_req_path, .rd_req_level,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_real, .rd_rsp_addr, .rd_rsp_leaf,
    .wr_valid, .wr_ready, .wr_path, .wr_level, .wr_slot, .wr_real, .wr_addr, .wr_leaf,
    .stash_overflow, .stash_used, .idle
  );

endmodule
