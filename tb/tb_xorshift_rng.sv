// tb_xorshift_rng: self-checking test of the Xorshift generator.
// Compares the first 1000 outputs with a reference computed here from the
// xorshift32 recurrence (shifts 13, 17, 5), checks that the state holds while
// `next` is low, that it returns to the seed on reset, and that the value
// never becomes zero.
module tb_xorshift_rng;
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  logic [31:0] value;
  int checks = 0, failures = 0;

  localparam logic [31:0] SEED = 32'h1234_5678;
  xorshift_rng #(.SEED(SEED)) dut (.clk, .rst_n, .next, .value);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_step(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    model = SEED;
    check(value == SEED, "seed after reset");
    for (int i = 0; i < 1000; i++) begin
      next = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (next) model = ref_step(model);
      check(value == model, $sformatf("step %0d: got %h exp %h", i, value, model));
      check(value != 32'd0, "value zero");
    end
    next = 1'b0;
    @(negedge clk); rst_n = 1'b0; #1;
    check(value == SEED, "seed after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
