// tb_oram_system: the reordering window in front of the controller, at a
// reduced size (L = 5, Z = 2, 32-entry stash, threshold 3, window of 4).
// oram_env streams 600 requests to 20 blocks with up to four outstanding, so
// the window has a choice; it checks that every request is answered once,
// that misses on known blocks find them on their path, that the tree stays
// consistent, and that answers did come back out of arrival order.
module tb_oram_system;
  import oram_pkg::*;
  localparam int L = 5, Z = 2, S = 32, T = 3, AW = 8;
  localparam int LVL_W = $clog2(L + 1), SLOT_W = (Z > 1) ? $clog2(Z) : 1, IDX_W = $clog2(S);

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, rsp_valid, rsp_ready, rsp_hit, rsp_lpc;
  logic [AW-1:0] req_addr, rsp_addr, rd_rsp_addr, wr_addr;
  logic [L-1:0] req_leaf, rsp_leaf, rd_req_path, rd_rsp_leaf, wr_path, wr_leaf;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, rd_rsp_real;
  logic wr_valid, wr_ready, wr_real, stash_overflow;
  logic [LVL_W-1:0] rd_req_level, wr_level;
  logic [SLOT_W-1:0] wr_slot;
  logic [IDX_W:0] stash_used;
  logic done, idle;
  int checks, failures;

  always #5 clk = ~clk;
  initial begin repeat (3) @(posedge clk); rst_n = 1'b1; end

  oram_system #(.L(L), .Z(Z), .STASH_SIZE(S), .THRESHOLD(T), .ADDR_W(AW), .WINDOW(4)) dut (.*);

  oram_env #(.L(L), .Z(Z), .STASH_SIZE(S), .THRESHOLD(T), .ADDR_W(AW), .NBLK(20), .NACC(600), .STREAM(1'b1)) env (.*);

  int extra_checks = 0, extra_failures = 0;
  bit extra_done = 1'b1;
  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (done === 1'b1 && extra_done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
