// tb_oram_sizes: the whole design (oram_system, window of 8, threshold 8,
// Z = 4, 256-entry stash) at the three smaller tree heights of the hardware
// evaluation, L = 14, 17 and 20, side by side. Each copy is driven by its own
// oram_env through 600 random accesses to 40 blocks, with the same per-access
// checks as the full-size test (L = 23, tb_oram_full): hit behaviour, path
// traffic level by level, block placement and no lost or doubled blocks.
// The result is the sum over the three copies.
module tb_oram_sizes;
  import oram_pkg::*;
  localparam int NSIZE = 3;
  localparam int LS [NSIZE] = '{14, 17, 20};
  localparam int Z = 4, S = 256, T = 8, AW = 32;
  localparam int SLOT_W = $clog2(Z), IDX_W = $clog2(S);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  initial begin repeat (3) @(posedge clk); rst_n = 1'b1; end

  int sum_checks [NSIZE], sum_failures [NSIZE];
  logic [NSIZE-1:0] all_done;

  for (genvar g = 0; g < NSIZE; g++) begin : g_size
    localparam int L = LS[g];
    localparam int LVL_W = $clog2(L + 1);
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

    oram_system #(.L(L)) dut (
      .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_leaf,
      .rsp_valid, .rsp_ready, .rsp_addr, .rsp_hit, .rsp_lpc, .rsp_leaf,
      .rd_req_valid, .rd_req_ready, .rd_req_path, .rd_req_level,
      .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_real, .rd_rsp_addr, .rd_rsp_leaf,
      .wr_valid, .wr_ready, .wr_path, .wr_level, .wr_slot, .wr_real, .wr_addr, .wr_leaf,
      .stash_overflow, .stash_used, .idle);

    oram_env #(.L(L), .Z(Z), .STASH_SIZE(S), .THRESHOLD(T), .ADDR_W(AW), .NBLK(40), .NACC(600),
               .EXPECT_LEFTOVER(1'b0), .HIT_LAT(4)) env (
      .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_leaf,
      .rsp_valid, .rsp_ready, .rsp_addr, .rsp_hit, .rsp_lpc, .rsp_leaf,
      .rd_req_valid, .rd_req_ready, .rd_req_path, .rd_req_level,
      .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_real, .rd_rsp_addr, .rd_rsp_leaf,
      .wr_valid, .wr_ready, .wr_path, .wr_level, .wr_slot, .wr_real, .wr_addr, .wr_leaf,
      .stash_overflow, .stash_used, .idle, .done, .checks, .failures);

    assign all_done[g] = (done === 1'b1);
    always_comb begin
      sum_checks[g]   = checks;
      sum_failures[g] = failures;
    end
  end

  function automatic int total(input int v [NSIZE]);
    int t;
    t = 0;
    for (int i = 0; i < NSIZE; i++) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(sum_checks), total(sum_failures) + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (&all_done);
    @(posedge clk);
    for (int i = 0; i < NSIZE; i++)
      $display("L = %0d: checks %0d failures %0d", LS[i], sum_checks[i], sum_failures[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total(sum_checks), total(sum_failures));
    $finish;
  end
endmodule
