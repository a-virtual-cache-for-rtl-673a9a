// tb_request_window: self-checking test of the request reordering window.
// Random arrivals and random controller readiness; a model of the pending
// set computes the expected pick at every issue (smallest leaf above the
// last issued leaf, else the smallest leaf; lowest slot on ties cannot be
// told apart here, so ties are checked by leaf only) and checks that every
// request is issued exactly once, that in_ready drops when DEPTH requests
// wait, and that both the forward pick and the wrap-around happen.
module tb_request_window;
  localparam int DEPTH = 4, L = 6, AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [AW-1:0] in_addr = '0, out_addr;
  logic [L-1:0]  in_leaf = '0, out_leaf;
  int checks = 0, failures = 0, n_sent = 0, n_fwd = 0, n_wrap = 0, n_full = 0, n_issued = 0;
  typedef struct { logic [AW-1:0] a; logic [L-1:0] l; } req_t;
  req_t pend [$];
  logic [L-1:0] last_leaf;
  bit last_valid;

  request_window #(.DEPTH(DEPTH), .L(L), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] next_addr;
    next_addr = '0; last_valid = 0; last_leaf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < 6);
      in_addr   = next_addr;
      in_leaf   = L'($urandom);
      out_ready = ($urandom_range(0, 9) < ((n < 1500) ? 3 : 6));
      #1;
      check(out_valid == (pend.size() > 0), "out_valid iff requests pending");
      check(in_ready == (pend.size() < DEPTH), "in_ready iff a slot is free");
      if (!in_ready) n_full++;
      if (out_valid) begin
        int best_up, best_any, k;
        best_up = -1; best_any = -1;
        foreach (pend[i]) begin
          if (best_any < 0 || pend[i].l < pend[best_any].l) best_any = i;
          if ((!last_valid || pend[i].l > last_leaf) && (best_up < 0 || pend[i].l < pend[best_up].l)) best_up = i;
        end
        k = (best_up >= 0) ? best_up : best_any;
        check(out_leaf == pend[k].l, $sformatf("picked leaf %0d exp %0d", out_leaf, pend[k].l));
      end
      @(posedge clk);
      if (out_valid && out_ready) begin
        int k;
        k = -1;
        foreach (pend[i]) if (pend[i].a == out_addr && pend[i].l == out_leaf) k = i;
        check(k >= 0, "issued request was pending");
        if (k >= 0) pend.delete(k);
        if (last_valid && out_leaf > last_leaf) n_fwd++;
        if (last_valid && out_leaf <= last_leaf) n_wrap++;
        last_leaf = out_leaf; last_valid = 1;
        n_issued++;
      end
      if (in_valid && in_ready) begin
        req_t r;
        r.a = in_addr; r.l = in_leaf;
        pend.push_back(r);
        next_addr++;
        n_sent++;
      end
    end
    check(n_fwd > 50 && n_wrap > 10 && n_full > 10, $sformatf("forward %0d wrap %0d full %0d", n_fwd, n_wrap, n_full));
    check(n_issued + pend.size() == n_sent, "every request issued once or still pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
