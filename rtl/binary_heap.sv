// binary_heap: min-heap that orders stash entries for the path write-back.
//
// Each element is a stash index together with its sort key, the bitwise XOR
// of the block's leaf ID with the ID of the path being written back. The
// smaller the key, the deeper the block can be placed on that path, so the
// block to be written next is always at the head. The heap is an array in
// the usual layout (children of position p at 2p+1 and 2p+2). A push puts
// the element at the end and sifts it up, one level per cycle; a pop moves
// the last element to the head and sifts it down, one level per cycle.
//
// Interface: push_valid/push_ready and pop_valid/pop_ready are handshakes;
// an operation happens in the cycle both are high. While a sift is in
// progress (busy) the heap accepts nothing and head_valid is low. An
// operation therefore takes 1 + (number of swaps) cycles, at most
// 1 + floor(log2(DEPTH)). clear empties the heap at the next edge.
// The heap and its XOR key follow the design this controller is based on;
// the one-level-per-cycle sifting and the handshakes are this design's own.
module binary_heap #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned KEY_W = 23,
  parameter int unsigned VAL_W = 8,
  localparam int unsigned POS_W = $clog2(DEPTH + 1) + 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [KEY_W-1:0] push_key,
  input  logic [VAL_W-1:0] push_val,
  input  logic             pop_valid,
  output logic             pop_ready,
  output logic             head_valid,
  output logic [KEY_W-1:0] head_key,
  output logic [VAL_W-1:0] head_val,
  output logic             busy,
  output logic [POS_W-1:0] count
);

  typedef enum logic [1:0] {H_IDLE, H_UP, H_DOWN} heap_op_e;

  logic [KEY_W-1:0] key_q [DEPTH];
  logic [VAL_W-1:0] val_q [DEPTH];
  logic [POS_W-1:0] count_q, cur_q;
  heap_op_e         op_q;

  assign busy       = (op_q != H_IDLE);
  assign count      = count_q;
  assign push_ready = !busy && (count_q < POS_W'(DEPTH));
  assign pop_ready  = !busy && (count_q != '0);
  assign head_valid = pop_ready;
  assign head_key   = key_q[0];
  assign head_val   = val_q[0];

  logic [POS_W-1:0] parent, lchild, rchild, smaller;
  always_comb begin
    parent  = (cur_q - POS_W'(1)) >> 1;
    lchild  = (cur_q << 1) + POS_W'(1);
    rchild  = (cur_q << 1) + POS_W'(2);
    smaller = lchild;
    if (rchild < count_q && key_q[rchild[AW-1:0]] < key_q[lchild[AW-1:0]]) smaller = rchild;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      cur_q   <= '0;
      op_q    <= H_IDLE;
    end else if (clear) begin
      count_q <= '0;
      op_q    <= H_IDLE;
    end else begin
      case (op_q)
        H_IDLE: begin
          if (push_valid && push_ready) begin
            key_q[count_q[AW-1:0]] <= push_key;
            val_q[count_q[AW-1:0]] <= push_val;
            cur_q   <= count_q;
            count_q <= count_q + POS_W'(1);
            op_q    <= (count_q != '0) ? H_UP : H_IDLE;
          end else if (pop_valid && pop_ready) begin
            key_q[0] <= key_q[count_q[AW-1:0] - 1'b1];
            val_q[0] <= val_q[count_q[AW-1:0] - 1'b1];
            cur_q    <= '0;
            count_q  <= count_q - POS_W'(1);
            op_q     <= (count_q > POS_W'(2)) ? H_DOWN : H_IDLE;
          end
        end
        H_UP: begin
          if (key_q[parent[AW-1:0]] > key_q[cur_q[AW-1:0]]) begin
            key_q[parent[AW-1:0]] <= key_q[cur_q[AW-1:0]];
            val_q[parent[AW-1:0]] <= val_q[cur_q[AW-1:0]];
            key_q[cur_q[AW-1:0]]  <= key_q[parent[AW-1:0]];
            val_q[cur_q[AW-1:0]]  <= val_q[parent[AW-1:0]];
            cur_q <= parent;
            if (parent == '0) op_q <= H_IDLE;
          end else begin
            op_q <= H_IDLE;
          end
        end
        H_DOWN: begin
          if (lchild < count_q && key_q[smaller[AW-1:0]] < key_q[cur_q[AW-1:0]]) begin
            key_q[smaller[AW-1:0]] <= key_q[cur_q[AW-1:0]];
            val_q[smaller[AW-1:0]] <= val_q[cur_q[AW-1:0]];
            key_q[cur_q[AW-1:0]]   <= key_q[smaller[AW-1:0]];
            val_q[cur_q[AW-1:0]]   <= val_q[smaller[AW-1:0]];
            cur_q <= smaller;
          end else begin
            op_q <= H_IDLE;
          end
        end
        default: op_q <= H_IDLE;
      endcase
    end
  end

endmodule
