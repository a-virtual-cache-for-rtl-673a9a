// tb_oram_controller: end-to-end test of the ORAM controller at a reduced
// size (L = 4, Z = 2, 32-entry stash, threshold 2, so both write-back and
// write-through levels exist), driven by oram_env with 400 random accesses to
// 24 blocks. A second, tiny controller (8-entry stash) is fed buckets full of
// real blocks to make the stash overflow flag rise, which the main instance
// must never show. A third controller (L = 5, threshold 3, two treetop
// levels) runs under its own oram_env with 300 accesses.
module tb_oram_controller;
  import oram_pkg::*;
  localparam int L = 4, Z = 2, S = 32, T = 2, AW = 8;
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

  oram_controller #(.L(L), .Z(Z), .STASH_SIZE(S), .THRESHOLD(T), .ADDR_W(AW)) dut (.*);

  oram_env #(.L(L), .Z(Z), .STASH_SIZE(S), .THRESHOLD(T), .ADDR_W(AW), .NBLK(24), .NACC(400)) env (.*);

  // ---- treetop instance: levels 0 and 1 stay in the stash ----
  localparam int TL = 5, TLVL_W = $clog2(TL + 1);
  logic t_req_valid, t_req_ready, t_rsp_valid, t_rsp_ready, t_rsp_hit, t_rsp_lpc;
  logic [AW-1:0] t_req_addr, t_rsp_addr, t_rd_rsp_addr, t_wr_addr;
  logic [TL-1:0] t_req_leaf, t_rsp_leaf, t_rd_req_path, t_rd_rsp_leaf, t_wr_path, t_wr_leaf;
  logic t_rd_req_valid, t_rd_req_ready, t_rd_rsp_valid, t_rd_rsp_ready, t_rd_rsp_real;
  logic t_wr_valid, t_wr_ready, t_wr_real, t_overflow, t_done, t_idle;
  logic [TLVL_W-1:0] t_rd_req_level, t_wr_level;
  logic [SLOT_W-1:0] t_wr_slot;
  logic [IDX_W:0] t_used;
  int t_checks, t_failures;

  oram_controller #(.L(TL), .Z(Z), .STASH_SIZE(S), .THRESHOLD(3), .TREETOP(2), .ADDR_W(AW)) dut_top (
    .clk, .rst_n,
    .req_valid(t_req_valid), .req_ready(t_req_ready), .req_addr(t_req_addr), .req_leaf(t_req_leaf),
    .rsp_valid(t_rsp_valid), .rsp_ready(t_rsp_ready), .rsp_addr(t_rsp_addr), .rsp_hit(t_rsp_hit),
    .rsp_lpc(t_rsp_lpc), .rsp_leaf(t_rsp_leaf),
    .rd_req_valid(t_rd_req_valid), .rd_req_ready(t_rd_req_ready), .rd_req_path(t_rd_req_path),
    .rd_req_level(t_rd_req_level),
    .rd_rsp_valid(t_rd_rsp_valid), .rd_rsp_ready(t_rd_rsp_ready), .rd_rsp_real(t_rd_rsp_real),
    .rd_rsp_addr(t_rd_rsp_addr), .rd_rsp_leaf(t_rd_rsp_leaf),
    .wr_valid(t_wr_valid), .wr_ready(t_wr_ready), .wr_path(t_wr_path), .wr_level(t_wr_level),
    .wr_slot(t_wr_slot), .wr_real(t_wr_real), .wr_addr(t_wr_addr), .wr_leaf(t_wr_leaf),
    .stash_overflow(t_overflow), .stash_used(t_used), .idle(t_idle)
  );

  oram_env #(.L(TL), .Z(Z), .STASH_SIZE(S), .THRESHOLD(3), .TREETOP(2), .ADDR_W(AW),
             .NBLK(20), .NACC(300)) env_top (
    .clk, .rst_n,
    .req_valid(t_req_valid), .req_ready(t_req_ready), .req_addr(t_req_addr), .req_leaf(t_req_leaf),
    .rsp_valid(t_rsp_valid), .rsp_ready(t_rsp_ready), .rsp_addr(t_rsp_addr), .rsp_hit(t_rsp_hit),
    .rsp_lpc(t_rsp_lpc), .rsp_leaf(t_rsp_leaf),
    .rd_req_valid(t_rd_req_valid), .rd_req_ready(t_rd_req_ready), .rd_req_path(t_rd_req_path),
    .rd_req_level(t_rd_req_level),
    .rd_rsp_valid(t_rd_rsp_valid), .rd_rsp_ready(t_rd_rsp_ready), .rd_rsp_real(t_rd_rsp_real),
    .rd_rsp_addr(t_rd_rsp_addr), .rd_rsp_leaf(t_rd_rsp_leaf),
    .wr_valid(t_wr_valid), .wr_ready(t_wr_ready), .wr_path(t_wr_path), .wr_level(t_wr_level),
    .wr_slot(t_wr_slot), .wr_real(t_wr_real), .wr_addr(t_wr_addr), .wr_leaf(t_wr_leaf),
    .stash_overflow(t_overflow), .stash_used(t_used), .idle(t_idle),
    .done(t_done), .checks(t_checks), .failures(t_failures)
  );

  // ---- overflow instance: every bucket read returns Z real, new blocks ----
  int extra_checks = 0, extra_failures = 0;
  bit extra_done = 1'b0;
  logic o_req_valid, o_req_ready, o_rsp_valid, o_rsp_hit, o_rsp_lpc;
  logic [AW-1:0] o_rsp_addr, o_wr_addr;
  logic [L-1:0] o_rsp_leaf, o_rd_req_path, o_wr_path, o_wr_leaf;
  logic o_rd_req_valid, o_rd_rsp_valid, o_rd_rsp_ready, o_wr_valid, o_wr_real, o_overflow;
  logic [LVL_W-1:0] o_rd_req_level, o_wr_level;
  logic [SLOT_W-1:0] o_wr_slot;
  logic [3:0] o_used;
  logic [AW-1:0] o_next_addr;
  int o_beats;

  oram_controller #(.L(L), .Z(Z), .STASH_SIZE(8), .THRESHOLD(T), .ADDR_W(AW)) dut_small (
    .clk, .rst_n,
    .req_valid(o_req_valid), .req_ready(o_req_ready), .req_addr(AW'(200)), .req_leaf(L'(0)),
    .rsp_valid(o_rsp_valid), .rsp_ready(1'b1), .rsp_addr(o_rsp_addr), .rsp_hit(o_rsp_hit),
    .rsp_lpc(o_rsp_lpc), .rsp_leaf(o_rsp_leaf),
    .rd_req_valid(o_rd_req_valid), .rd_req_ready(1'b1), .rd_req_path(o_rd_req_path),
    .rd_req_level(o_rd_req_level),
    .rd_rsp_valid(o_rd_rsp_valid), .rd_rsp_ready(o_rd_rsp_ready), .rd_rsp_real(1'b1),
    .rd_rsp_addr(o_next_addr), .rd_rsp_leaf(L'(o_next_addr)),
    .wr_valid(o_wr_valid), .wr_ready(1'b1), .wr_path(o_wr_path), .wr_level(o_wr_level),
    .wr_slot(o_wr_slot), .wr_real(o_wr_real), .wr_addr(o_wr_addr), .wr_leaf(o_wr_leaf),
    .stash_overflow(o_overflow), .stash_used(o_used), .idle()
  );

  always @(posedge clk) begin
    if (!rst_n) begin o_beats <= 0; o_next_addr <= AW'(0); end
    else begin
      if (o_rd_req_valid) o_beats <= o_beats + Z;
      else if (o_rd_rsp_valid && o_rd_rsp_ready) begin
        o_beats <= o_beats - 1;
        o_next_addr <= o_next_addr + 1'b1;
      end
    end
  end
  assign o_rd_rsp_valid = (o_beats > 0);

  initial begin
    o_req_valid = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    extra_checks++;
    if (o_overflow) extra_failures++;
    o_req_valid = 1'b1;
    do @(posedge clk); while (!o_req_ready);
    @(negedge clk); o_req_valid = 1'b0;
    do @(posedge clk); while (!o_rsp_valid);
    extra_checks++;
    if (!o_overflow) begin extra_failures++; $display("FAIL: stash overflow not flagged"); end
    else $display("mechanisms: stash overflow flagged with %0d of 8 entries used", o_used);
    extra_done = 1'b1;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + t_checks + extra_checks, failures + t_failures + extra_failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (done === 1'b1 && t_done === 1'b1 && extra_done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + t_checks + extra_checks, failures + t_failures + extra_failures);
    $finish;
  end
endmodule
