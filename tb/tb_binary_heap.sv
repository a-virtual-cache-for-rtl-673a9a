// tb_binary_heap: self-checking test of the min-heap.
// Mixes random pushes and pops against a reference multiset (a sorted
// queue): every pop must return a key equal to the smallest one held, and
// the popped value must belong to an element with that key. It also fills
// the heap to DEPTH (push_ready must drop), drains it in sorted order, and
// checks the latency: an operation never keeps the heap busy for more than
// floor(log2(DEPTH)) cycles after it is accepted, and a clear empties it.
module tb_binary_heap;
  localparam int DEPTH = 64, KEY_W = 10, VAL_W = 6;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic push_valid = 1'b0, push_ready, pop_valid = 1'b0, pop_ready;
  logic [KEY_W-1:0] push_key = '0, head_key;
  logic [VAL_W-1:0] push_val = '0, head_val;
  logic head_valid, busy;
  logic [7:0] count;
  int checks = 0, failures = 0, max_busy = 0, busy_run = 0;
  typedef struct { logic [KEY_W-1:0] k; logic [VAL_W-1:0] v; } elem_t;
  elem_t model [$];

  binary_heap #(.DEPTH(DEPTH), .KEY_W(KEY_W), .VAL_W(VAL_W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (busy) busy_run++;
    else      busy_run = 0;
    if (busy_run > max_busy) max_busy = busy_run;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_idle();
    while (busy) @(negedge clk);
  endtask

  task automatic do_push(input logic [KEY_W-1:0] k, input logic [VAL_W-1:0] v);
    elem_t e;
    wait_idle();
    push_valid = 1'b1; push_key = k; push_val = v;
    @(posedge clk); #1;
    push_valid = 1'b0;
    e.k = k; e.v = v;
    model.push_back(e);
    @(negedge clk);
  endtask

  task automatic do_pop();
    int best, found;
    wait_idle();
    check(head_valid, "head valid");
    best = 1 << KEY_W;
    foreach (model[i]) if (int'(model[i].k) < best) best = int'(model[i].k);
    check(int'(head_key) == best, $sformatf("head key %0d exp %0d", head_key, best));
    found = -1;
    foreach (model[i]) if (model[i].k == head_key && model[i].v == head_val && found < 0) found = i;
    check(found >= 0, "head value belongs to head key");
    if (found >= 0) model.delete(found);
    pop_valid = 1'b1;
    @(posedge clk); #1;
    pop_valid = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!head_valid && push_ready && !pop_ready, "empty after reset");
    // random mix
    for (int n = 0; n < 1500; n++) begin
      if (model.size() == 0 || (model.size() < DEPTH && $urandom_range(0, 2) != 0))
        do_push(KEY_W'($urandom_range(0, 60)), VAL_W'($urandom));
      else
        do_pop();
      wait_idle();
      check(int'(count) == model.size(), "count");
    end
    while (model.size() > 0) do_pop();
    // fill completely, then drain in order
    for (int i = 0; i < DEPTH; i++) do_push(KEY_W'($urandom), VAL_W'(i));
    wait_idle();
    check(!push_ready && int'(count) == DEPTH, "full heap refuses pushes");
    while (model.size() > 0) do_pop();
    check(!head_valid, "drained");
    // clear
    for (int i = 0; i < 5; i++) do_push(KEY_W'(i), VAL_W'(i));
    wait_idle();
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(count == '0 && !head_valid, "clear empties the heap");
    model.delete();
    check(max_busy <= $clog2(DEPTH), $sformatf("sift latency %0d cycles", max_busy));
    check(max_busy >= 3, "sifts of several levels happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
