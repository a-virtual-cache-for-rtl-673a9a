// request_window: reordering window for ORAM requests.
//
// Holds up to DEPTH pending requests and hands the controller, whenever it
// takes a new one, the request whose path lies nearest after the path
// accessed last: the one with the smallest leaf ID above the last issued
// leaf ID. If no pending request lies above it, the search wraps around and
// the request with the smallest leaf ID is taken. Paths thus sweep the tree
// in one direction, which makes successive paths share more of their top
// levels (more work for the Last Path Cache) while no request can starve.
// Before the first request is issued every leaf counts as "above".
//
// Interface: in_* (from the core) and out_* (to the controller) are
// valid/ready streams. A new request goes to the lowest-numbered free slot;
// out_valid is high whenever a request is pending, and out_addr/out_leaf
// show the selected one, combinationally. Among equal leaf IDs the lowest
// slot wins. A slot freed by an issue can be refilled from the next cycle.
// The window sizes 4 and 8 and the one-way selection rule follow the
// evaluation this design is based on; the slot structure and tie-breaking
// are this design's own choices.
module request_window #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned L      = 23,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [L-1:0]      in_leaf,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ADDR_W-1:0] out_addr,
  output logic [L-1:0]      out_leaf
);

  localparam int unsigned SW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0]  vld_q;
  logic [ADDR_W-1:0] addr_q [DEPTH];
  logic [L-1:0]      leaf_q [DEPTH];
  logic [L-1:0]      last_leaf_q;
  logic              last_valid_q;

  // selection: smallest leaf above the last one, else smallest overall
  logic          up_found, any_found;
  logic [SW-1:0] up_idx, any_idx, sel_idx;
  always_comb begin
    up_found  = 1'b0;
    any_found = 1'b0;
    up_idx    = '0;
    any_idx   = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (vld_q[i]) begin
        if (!any_found || leaf_q[i] < leaf_q[any_idx]) begin
          any_found = 1'b1;
          any_idx   = SW'(i);
        end
        if ((!last_valid_q || leaf_q[i] > last_leaf_q) &&
            (!up_found || leaf_q[i] < leaf_q[up_idx])) begin
          up_found = 1'b1;
          up_idx   = SW'(i);
        end
      end
    end
    sel_idx = up_found ? up_idx : any_idx;
  end

  assign out_valid = any_found;
  assign out_addr  = addr_q[sel_idx];
  assign out_leaf  = leaf_q[sel_idx];

  // lowest free slot
  logic          free_found;
  logic [SW-1:0] free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!vld_q[i]) begin
        free_found = 1'b1;
        free_idx   = SW'(i);
      end
    end
  end
  assign in_ready = free_found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q        <= '0;
      last_leaf_q  <= '0;
      last_valid_q <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        vld_q[sel_idx] <= 1'b0;
        last_leaf_q    <= leaf_q[sel_idx];
        last_valid_q   <= 1'b1;
      end
      if (in_valid && in_ready) vld_q[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      addr_q[free_idx] <= in_addr;
      leaf_q[free_idx] <= in_leaf;
    end
  end

endmodule
