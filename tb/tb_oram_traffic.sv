// tb_oram_traffic: memory traffic of the three last-path-caching schemes at
// full tree size (L = 23, Z = 4, 256-entry stash), against plain Path ORAM.
//
// Three controllers run side by side on streams of 3000 misses to fresh
// blocks on random paths: THRESHOLD = 0 (pure Reuse), 8 (Delay/Reuse hybrid)
// and 24 (pure Delay). A fourth, oram_system with a window of 8, is kept fed
// with 8 pending requests so that it can sweep the leaves in order. A fifth
// runs the hybrid with 3 treetop levels kept in the stash, and two more
// controllers have THRESHOLD = 2 and 4 for the threshold sweep. Memory
// answers every bucket with dummies and is always ready.
//
// Plain Path ORAM moves 2*(L+1)*Z = 192 slots per access. Two random paths
// share the root plus on average sum(2^-i) ~ 1 further level, about 2 of 24
// levels, so the expected savings in slot transfers are
//   Reuse  : the shared reads only        2/48 ~ 4.2 %
//   Delay  : shared reads and writes      4/48 ~ 8.3 %
//   hybrid : same as Delay while the shared part stays above level 8
//   Dt/R(24-t): the Delay levels also save the write of shared levels
//            below t, sum(2^-i, i < t): (2 + 1.5)/48 ~ 7.3 % for t = 2,
//            (2 + 1.875)/48 ~ 8.1 % for t = 4, close to the limit by t = 8
//   hybrid + treetop 3 : levels 0..2 are never touched, and paths share
//            on average sum(2^-i, i >= 3) = 0.25 more: 6.5/48 ~ 13.5 %
// The test checks each measured saving to within 0.6 percentage points,
// checks reads against writes per scheme, checks that the window raises
// the saving clearly above the unordered hybrid, and that treetop caching
// fills the stash further.
module tb_oram_traffic;
  localparam int L = 23, Z = 4, S = 256, AW = 32, N = 3000;
  localparam int LVL_W = $clog2(L + 1), SLOT_W = $clog2(Z), IDX_W = $clog2(S);
  localparam int NCFG = 7;
  localparam int TH [NCFG] = '{0, 8, 24, 8, 8, 2, 4};
  localparam int TT [NCFG] = '{0, 0, 0, 0, 3, 0, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  initial begin repeat (3) @(posedge clk); rst_n = 1'b1; end

  int checks = 0, failures = 0;
  longint rd_beats [NCFG], wr_slots [NCFG];
  int answered [NCFG], peak [NCFG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic req_valid, req_ready, rsp_valid, rsp_hit, rsp_lpc, idle;
    logic [AW-1:0] req_addr, rsp_addr, wr_addr;
    logic [L-1:0] req_leaf, rsp_leaf, rd_req_path, wr_path, wr_leaf;
    logic rd_req_valid, rd_rsp_valid, rd_rsp_ready, wr_valid, wr_real, overflow;
    logic [LVL_W-1:0] rd_req_level, wr_level;
    logic [SLOT_W-1:0] wr_slot;
    logic [IDX_W:0] used;
    int beats;

    if (g != 3) begin : g_ctrl
      oram_controller #(.THRESHOLD(TH[g]), .TREETOP(TT[g])) dut (
        .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_leaf,
        .rsp_valid, .rsp_ready(1'b1), .rsp_addr, .rsp_hit, .rsp_lpc, .rsp_leaf,
        .rd_req_valid, .rd_req_ready(1'b1), .rd_req_path, .rd_req_level,
        .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_real(1'b0), .rd_rsp_addr('0), .rd_rsp_leaf('0),
        .wr_valid, .wr_ready(1'b1), .wr_path, .wr_level, .wr_slot, .wr_real, .wr_addr, .wr_leaf,
        .stash_overflow(overflow), .stash_used(used), .idle);
    end else begin : g_sys
      oram_system #(.THRESHOLD(TH[g]), .WINDOW(8)) dut (
        .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_leaf,
        .rsp_valid, .rsp_ready(1'b1), .rsp_addr, .rsp_hit, .rsp_lpc, .rsp_leaf,
        .rd_req_valid, .rd_req_ready(1'b1), .rd_req_path, .rd_req_level,
        .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_real(1'b0), .rd_rsp_addr('0), .rd_rsp_leaf('0),
        .wr_valid, .wr_ready(1'b1), .wr_path, .wr_level, .wr_slot, .wr_real, .wr_addr, .wr_leaf,
        .stash_overflow(overflow), .stash_used(used), .idle);
    end

    // memory: Z dummy beats per bucket read
    always @(posedge clk) begin
      if (!rst_n) beats <= 0;
      else begin
        beats <= beats + (rd_req_valid ? Z : 0) - ((rd_rsp_valid && rd_rsp_ready) ? 1 : 0);
        if (rd_rsp_valid && rd_rsp_ready) rd_beats[g]++;
        if (wr_valid) wr_slots[g]++;
        if (rsp_valid) answered[g]++;
        if (int'(used) > peak[g]) peak[g] = int'(used);
      end
    end
    assign rd_rsp_valid = (beats > 0);

    // core: fresh addresses on random leaves, as fast as they are taken
    initial begin
      rd_beats[g] = 0; wr_slots[g] = 0; answered[g] = 0; peak[g] = 0;
      req_valid = 1'b0; req_addr = '0; req_leaf = '0;
      @(posedge rst_n);
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        req_valid = 1'b1; req_addr = AW'(n); req_leaf = L'($urandom);
        do @(posedge clk); while (!req_ready);
      end
      @(negedge clk); req_valid = 1'b0;
    end
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real saving [NCFG];
    real expect_s [NCFG];
    string name [NCFG];
    name = '{"Reuse (R24)", "Delay/Reuse (D8/R16)", "Delay (D24)", "D8/R16 + window 8", "D8/R16 + treetop 3",
             "Delay/Reuse (D2/R22)", "Delay/Reuse (D4/R20)"};
    expect_s = '{4.17, 8.33, 8.33, 0.0, 13.54, 7.29, 8.07};
    @(posedge rst_n);
    wait (answered[0] == N && answered[1] == N && answered[2] == N && answered[3] == N &&
          answered[4] == N && answered[5] == N && answered[6] == N);
    wait (g_cfg[0].idle && g_cfg[1].idle && g_cfg[2].idle && g_cfg[3].idle &&
          g_cfg[4].idle && g_cfg[5].idle && g_cfg[6].idle);
    @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      real base;
      base = real'(N) * 2.0 * real'((L + 1) * Z);
      saving[g] = 100.0 * (1.0 - real'(rd_beats[g] + wr_slots[g]) / base);
      $display("%-22s reads %0d writes %0d slots per access %0.2f (plain 192) saving %0.2f %% peak stash %0d",
               name[g], rd_beats[g], wr_slots[g], real'(rd_beats[g] + wr_slots[g]) / real'(N), saving[g], peak[g]);
      check(!(g_cfg[0].overflow || g_cfg[1].overflow || g_cfg[2].overflow || g_cfg[3].overflow ||
              g_cfg[4].overflow || g_cfg[5].overflow || g_cfg[6].overflow), "no stash overflow");
      if (g != 3) begin
        check(saving[g] > expect_s[g] - 0.6 && saving[g] < expect_s[g] + 0.6,
              $sformatf("%s saving %0.2f %% expected about %0.2f %%", name[g], saving[g], expect_s[g]));
      end
    end
    // Reuse writes every level; Delay writes exactly what it reads, except
    // for the last path still held at the end
    check(wr_slots[0] == longint'(N) * (L + 1) * Z, "Reuse writes every bucket");
    check(rd_beats[2] - wr_slots[2] == longint'((L + 1) * Z),
          "Delay writes back what it read, less the last path still held");
    // eight sorted leaves lie about 2^20 apart, so neighbours share about
    // three more levels: the saving roughly doubles
    check(saving[3] > saving[1] + 5.0, "reordering window raises the saving");
    // threshold sweep: the saving rises with t and is close to its limit at 8
    check(saving[0] < saving[5] && saving[5] < saving[6] && saving[6] < saving[1] + 0.3,
          "saving grows with the threshold");
    check(saving[2] - saving[1] < 0.5, "D8/R16 is within half a point of pure Delay");
    // the treetop blocks stay in the stash: its peak fill grows
    check(peak[4] > peak[1], "treetop caching holds more blocks in the stash");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
