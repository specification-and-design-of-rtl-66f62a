// tb_dip_ctlb_in: checks the input corner-turn line buffer.
//
// Streams three image columns (16 words each) with the column mask walking
// from column 0 (auto mode), then one line broadcast to the columns of a
// fixed mask. A shadow model of the array's bit RAM records every plane the
// buffer writes; each pixel bit must land at row r, its column, address
// base+k (base 0 for the walking lines, 16 for the broadcast one). The
// array clock runs at twice the word (system) clock, as in the described
// chip. With input always valid, the double buffer must accept the three
// lines back to back in 48 system cycles, and the last line must be
// reported drained after its 16 array cycles plus the synchronizer delays
// (two to three cycles of each clock).
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns; a watchdog ends the run after 5000 system cycles.
// Corner turning and column select follow the description; the mask
// rotation, the double buffer and the latencies checked are this design's.
module tb_dip_ctlb_in;
  import dip_pkg::*;
  localparam int ROWS = 16, COLS = 16, WORD = 16;

  logic clk = 1'b0, sys_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #10 sys_clk = ~sys_clk;
  logic              cfg_we, cfg_auto, mask_we, in_valid, in_ready, arr_we;
  logic [ADDR_W-1:0] cfg_base, arr_addr;
  logic [COLS-1:0]   mask_in, arr_col_en;
  logic [15:0]       lines_done;
  logic [WORD-1:0]   in_data;
  logic [ROWS-1:0]   arr_plane;
  int checks = 0, failures = 0;

  dip_ctlb_in dut (.*);

  logic [31:0] shadow [ROWS][COLS];
  always_ff @(posedge clk) begin
    if (arr_we)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (arr_col_en[c]) shadow[r][c][arr_addr] <= arr_plane[r];
  end

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] img [4][ROWS];

  initial begin
    int t0, n;
    cfg_we = 0; cfg_auto = 0; mask_we = 0; in_valid = 0; cfg_base = 0; mask_in = 0; in_data = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) shadow[r][c] = '0;
    for (int l = 0; l < 4; l++) for (int r = 0; r < ROWS; r++) img[l][r] = 16'($urandom);
    repeat (2) @(posedge sys_clk);
    #1 rst_n = 1'b1;
    cfg_we = 1; cfg_base = 5'd0; cfg_auto = 1; mask_we = 1; mask_in = 16'h0001;
    @(posedge sys_clk); #1 cfg_we = 0; mask_we = 0;
    t0 = $time;
    n = 0;
    in_valid = 1'b1;
    while (n < 3 * ROWS) begin
      in_data = img[n / ROWS][n % ROWS];
      @(posedge sys_clk);
      if (in_ready) n++;
      #1;
    end
    in_valid = 1'b0;
    check("48 words accepted back to back", ($time - t0) / 20, 48);
    while (lines_done != 16'd3) begin @(posedge sys_clk); #1; end
    t0 = $time - t0 - 48 * 20;
    checks++;
    if (t0 < 16 * 10 + 2 * 10 + 2 * 20 || t0 > 16 * 10 + 3 * 10 + 4 * 20) begin
      failures++; $display("FAIL last line reported drained %0d ns after its last word", t0);
    end
    // broadcast one line to a fixed mask
    cfg_we = 1; cfg_base = 5'd16; cfg_auto = 0; mask_we = 1; mask_in = 16'hA0A0;
    @(posedge sys_clk); #1 cfg_we = 0; mask_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      in_valid = 1; in_data = img[3][r];
      @(posedge sys_clk);
      while (!in_ready) @(posedge sys_clk);
      #1;
    end
    in_valid = 0;
    while (lines_done != 16'd4) @(posedge sys_clk);
    @(posedge sys_clk); #1;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < 3; c++) check($sformatf("pixel r%0d c%0d", r, c), shadow[r][c][15:0], img[c][r]);
      for (int c = 0; c < COLS; c++)
        check($sformatf("bcast r%0d c%0d", r, c), shadow[r][c][31:16], mask_in[c] ? img[3][r] : 16'h0);
      check($sformatf("untouched r%0d c3", r), shadow[r][3][15:0], 16'h0);
    end
    check("lines done", lines_done, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
