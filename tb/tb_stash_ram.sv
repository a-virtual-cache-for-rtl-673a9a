// tb_stash_ram: self-checking test of the stash tag RAM.
// Writes random words to random entries while reading random entries, and
// checks each read against a model array one cycle later (synchronous read,
// old data on a same-cycle read and write), and that rd_data holds while
// rd_en is low.
module tb_stash_ram;
  localparam int ENTRIES = 64, WIDTH = 40;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_idx = '0, rd_idx = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  stash_ram #(.ENTRIES(ENTRIES), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    logic             pending;
    // fill every entry first
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_idx = 6'(i); wr_data = WIDTH'({$urandom, $urandom});
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    pending = 1'b0;
    expect_q = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("FAIL: read got %h exp %h", rd_data, expect_q);
        end
      end
      rd_en  = 1'($urandom_range(0, 1));
      rd_idx = 6'($urandom);
      wr_en  = 1'($urandom_range(0, 1));
      wr_idx = 6'($urandom);
      wr_data = WIDTH'({$urandom, $urandom});
      if (rd_en) begin expect_q = model[rd_idx]; pending = 1'b1; end
      @(posedge clk);
      if (wr_en) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
