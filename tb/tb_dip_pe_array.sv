// tb_dip_pe_array: checks the 16x16 PE array, its mesh and its buses.
//
// Writes a random 16-bit image into register A over bus A (one column at a
// time) and a control image into B over bus B in which only row 8 and
// column 8 hold a one. After swapping banks it loads each PE's flag from that
// B bit, then, for every bit k, latches A[k] into the neighbour register and
// stores the north neighbour's bit in C[k] and the east neighbour's bit in
// C[16+k]. Back on the buses, register C of every PE is read out over bus C
// (column select) and bus D (row select) and compared with the shifted image
// the bench computes: zero past the edge and in every PE whose flag is set.
//
// Interface: none; a top-level bench. Timing: one clock, period 10 ns; a
// watchdog ends the run after 20000 cycles. The four-neighbour mesh, the
// column-selected buses A/B/C and the row-selected bus D follow the
// description; reading zero past the edge is this design's choice.
module tb_dip_pe_array;
  import dip_pkg::*;
  import dip_asm_pkg::*;
  localparam int ROWS = 16, COLS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  micro_t            row_instr [ROWS];
  logic              pingpong, a_we, b_we;
  logic [ADDR_W-1:0] a_addr, b_addr, c_addr, d_addr;
  logic [ROWS-1:0]   a_plane, b_plane, c_plane;
  logic [COLS-1:0]   a_col_en, b_col_en, d_plane;
  logic [3:0]        c_col, d_row;
  int checks = 0, failures = 0;

  dip_pe_array dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic all_rows(input micro_t m);
    for (int r = 0; r < ROWS; r++) row_instr[r] = m;
    @(posedge clk);
    #1 for (int r = 0; r < ROWS; r++) row_instr[r] = MICRO_NOP;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] img [ROWS][COLS];
  logic        flg [ROWS][COLS];

  initial begin
    logic [31:0] exp, got_c, got_d;
    for (int r = 0; r < ROWS; r++) row_instr[r] = MICRO_NOP;
    pingpong = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; c_addr = 0; d_addr = 0;
    a_plane = 0; b_plane = 0; a_col_en = 0; b_col_en = 0; c_col = 0; d_row = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = 16'($urandom);
        flg[r][c] = (r == 8) || (c == 8);
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // bus A: one column at a time, 16 planes each; bus B: flag bit at B[0]
    for (int c = 0; c < COLS; c++)
      for (int k = 0; k < 16; k++) begin
        a_we = 1; a_addr = ADDR_W'(k); a_col_en = 16'(1 << c);
        for (int r = 0; r < ROWS; r++) a_plane[r] = img[r][c][k];
        b_we = (k == 0); b_addr = '0; b_col_en = 16'(1 << c);
        for (int r = 0; r < ROWS; r++) b_plane[r] = flg[r][c];
        @(posedge clk); #1;
      end
    a_we = 0; b_we = 0;
    pingpong = 1;
    all_rows(ALU(S0_ZERO, S1_RAM_B, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_FLAG, 0));
    for (int k = 0; k < 16; k++) begin
      all_rows(ALU(S0_RAM_A, S1_ZERO, S2_ZERO, 1'b0, 1'b0, k, 0, 0, DST_NONE, 0, 1'b1));
      all_rows(ALU(S0_NORTH, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, k));
      all_rows(ALU(S0_EAST, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, 16 + k));
    end
    pingpong = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        exp[15:0]  = (r > 0 && !flg[r][c]) ? img[r-1][c] : 16'h0;
        exp[31:16] = (c < COLS - 1 && !flg[r][c]) ? img[r][c+1] : 16'h0;
        c_col = 4'(c); d_row = 4'(r);
        for (int k = 0; k < 32; k++) begin
          c_addr = ADDR_W'(k); d_addr = ADDR_W'(k);
          #1 got_c[k] = c_plane[r];
          got_d[k] = d_plane[c];
        end
        check($sformatf("bus C r%0d c%0d", r, c), got_c, exp);
        check($sformatf("bus D r%0d c%0d", r, c), got_d, exp);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
