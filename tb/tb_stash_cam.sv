// tb_stash_cam: self-checking test of the stash CAM.
// Runs random inserts (always into the reported free entry, with addresses
// unique among valid entries), invalidations and searches against a model of
// valid bits and keys. Each cycle it checks the same-cycle search result, the
// lowest free entry and the count of valid entries; it also fills the CAM
// completely to see free_valid drop.
module tb_stash_cam;
  localparam int ENTRIES = 32, KEY_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, inv_en = 1'b0;
  logic [4:0] wr_idx = '0, inv_idx = '0, search_idx, free_idx;
  logic [KEY_W-1:0] wr_key = '0, search_key = '0;
  logic search_hit, free_valid;
  logic [5:0] used_count;
  logic [ENTRIES-1:0] valid;
  bit   mv [ENTRIES];
  logic [KEY_W-1:0] mk [ENTRIES];
  int checks = 0, failures = 0;
  int n_hits = 0, n_full = 0;

  stash_cam #(.ENTRIES(ENTRIES), .KEY_W(KEY_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit key_used(input logic [KEY_W-1:0] k);
    for (int i = 0; i < ENTRIES; i++) if (mv[i] && mk[i] == k) return 1'b1;
    return 1'b0;
  endfunction

  task automatic compare();
    int exp_idx, exp_free, cnt;
    bit exp_hit, exp_fv;
    exp_hit = 0; exp_idx = 0; exp_fv = 0; exp_free = 0; cnt = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (mv[i] && mk[i] == search_key) begin exp_hit = 1; exp_idx = i; end
      if (!mv[i] && !exp_fv) begin exp_fv = 1; exp_free = i; end
      if (mv[i]) cnt++;
    end
    check(search_hit == exp_hit, "search hit");
    if (exp_hit) begin
      check(search_idx == 5'(exp_idx), "search index");
      n_hits++;
    end
    check(free_valid == exp_fv, "free valid");
    if (exp_fv) check(free_idx == 5'(exp_free), $sformatf("free idx %0d exp %0d", free_idx, exp_free));
    else n_full++;
    check(int'(used_count) == cnt, "used count");
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ENTRIES; i++) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // search for a stored key half of the time
      search_key = KEY_W'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        search_key = mk[$urandom_range(0, ENTRIES - 1)];
      end
      #1 compare();
      // phase 1 (n < 1500) favours inserts so the CAM fills up
      wr_en  = free_valid && ($urandom_range(0, 9) < ((n < 1500) ? 8 : 4));
      wr_idx = free_idx;
      do wr_key = KEY_W'($urandom); while (key_used(wr_key));
      inv_en  = ($urandom_range(0, 9) < ((n < 1500) ? 1 : 5));
      inv_idx = 5'($urandom);
      if (inv_en && wr_en && inv_idx == wr_idx) inv_en = 1'b0;
      @(posedge clk);
      if (inv_en) mv[inv_idx] = 0;
      if (wr_en) begin mv[wr_idx] = 1; mk[wr_idx] = wr_key; end
    end
    check(n_hits > 100, "searches that hit");
    check(n_full > 0, "CAM filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
