// tb_lpc: self-checking test of the Last Path Cache pointer array.
// Checks that every pointer is invalid after reset, that nothing overlaps
// before a path is recorded, random pointer writes against a model with
// same-cycle (combinational) reads, and the overlap test for random path
// pairs against a bitwise reference: level l is shared when the l most
// significant leaf-ID bits agree.
module tb_lpc;
  localparam int L = 6, Z = 3, S = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] rd_level = '0, wr_level = '0, q_level = '0;
  logic [1:0] rd_slot = '0, wr_slot = '0;
  logic rd_valid, wr_en = 1'b0, wr_valid = 1'b0, set_path = 1'b0, path_valid, q_overlap;
  logic [4:0] rd_ptr, wr_ptr = '0;
  logic [L-1:0] new_path = '0, last_path, cur_path = '0;
  bit        mv [L+1][Z];
  logic [4:0] mp [L+1][Z];
  int checks = 0, failures = 0, n_overlap = 0, n_valid = 0;

  lpc #(.L(L), .Z(Z), .STASH_SIZE(S)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit ref_overlap(input logic [L-1:0] a, input logic [L-1:0] b, input int lv);
    for (int i = 0; i < lv; i++) if (a[L-1-i] != b[L-1-i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int lv = 0; lv <= L; lv++) for (int s = 0; s < Z; s++) begin
      rd_level = 3'(lv); rd_slot = 2'(s); #1;
      check(!rd_valid, "invalid after reset");
      mv[lv][s] = 0;
    end
    q_level = 3'd0; #1;
    check(!q_overlap && !path_valid, "no overlap before a path is recorded");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = 1'($urandom_range(0, 1));
      wr_level = 3'($urandom_range(0, L)); wr_slot = 2'($urandom_range(0, Z - 1));
      wr_valid = 1'($urandom_range(0, 1)); wr_ptr = 5'($urandom);
      set_path = ($urandom_range(0, 7) == 0);
      new_path = L'($urandom);
      rd_level = 3'($urandom_range(0, L)); rd_slot = 2'($urandom_range(0, Z - 1));
      cur_path = L'($urandom);
      if ($urandom_range(0, 1) == 1) cur_path = last_path ^ L'(1 << $urandom_range(0, L - 1));
      q_level  = 3'($urandom_range(0, L));
      #1;
      check(rd_valid == mv[rd_level][rd_slot], "pointer valid");
      if (mv[rd_level][rd_slot]) begin
        check(rd_ptr == mp[rd_level][rd_slot], "pointer value");
        n_valid++;
      end
      if (path_valid) begin
        check(q_overlap == ref_overlap(cur_path, last_path, int'(q_level)),
              $sformatf("overlap cur=%b last=%b lv=%0d", cur_path, last_path, q_level));
        if (q_overlap) n_overlap++;
      end
      @(posedge clk);
      if (wr_en) begin mv[wr_level][wr_slot] = wr_valid; mp[wr_level][wr_slot] = wr_ptr; end
      #1;
      if (set_path) check(path_valid && last_path == new_path, "last path recorded");
    end
    check(n_overlap > 50 && n_valid > 50, "overlaps and valid pointers were seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
