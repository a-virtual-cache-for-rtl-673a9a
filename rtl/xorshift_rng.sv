// xorshift_rng: 32-bit Xorshift pseudo-random number generator.
//
// Supplies the random leaf IDs to which a block is remapped after each ORAM
// access. It is Marsaglia's xorshift32 generator: x ^= x << 13; x ^= x >> 17;
// x ^= x << 5, one step per cycle in which `next` is high. The state is
// loaded with SEED at reset (SEED must be non-zero: zero is a fixed point).
//
// Interface: `value` is the current state, valid from the cycle after reset;
// asserting `next` for one cycle makes the following value appear on the
// next clock edge. The choice of Xorshift follows the prototype this design
// is based on; the 32-bit width, the shift triple (13, 17, 5) and the seed are
// this design's own choices.
module xorshift_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next,
  output logic [31:0] value
);

  logic [31:0] state_q;

  function automatic logic [31:0] step(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state_q <= SEED;
    else if (next)  state_q <= step(state_q);
  end

  assign value = state_q;

  initial begin
    assert (SEED != 32'd0) else $error("xorshift_rng: SEED must be non-zero");
  end

endmodule
