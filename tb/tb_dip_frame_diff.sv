// tb_dip_frame_diff: interframe differencing on the DIP chip.
//
// A 2-D stream in, 2-D stream out job in broadcast mode: every PE computes
// the difference of two 16-bit frames at once. Frame 1 enters over bus A
// (DMA channel 0), frame 2 over bus B (DMA channel 1). The array program is
// one LOOP word over a two-word body (difference bit, borrow bit) run 16
// times, then the final borrow as bit 16. Register C of the whole array
// (the low 16 bits of frame1 - frame2) leaves over bus C and DMA channel 2;
// the RISC also reads row 5 bits 16..1 over the row bus to check the sign
// bits. The bench checks every pixel and the array program's cycle count.
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns; a watchdog ends the run after 40000 system cycles.
// Interframe differencing as a 2-D stream in, 2-D stream out job in
// broadcast mode is the description's example; the program and the data
// layout are this design's own.
module tb_dip_frame_diff;
  import dip_pkg::*;
  import dip_asm_pkg::*;
  localparam int ROWS = 16, COLS = 16;

  logic clk = 1'b0, sys_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;          // array clock
  always #10 sys_clk = ~sys_clk; // system clock, half the array rate

  logic        risc_il_we, risc_run, risc_halted, arr_il_we;
  logic [7:0]  risc_il_addr, arr_il_addr;
  logic [15:0] risc_il_data, stream_out, stream_in, out_data;
  cword_t      arr_il_data;
  logic        stream_out_valid, out_valid, out_ready;
  logic [15:0] desc_data [3];
  logic [2:0]  desc_valid, desc_ready;
  logic [15:0] in_data [2];
  logic [1:0]  in_valid, in_ready;
  int checks = 0, failures = 0;

  dip_chip dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (40000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] f1 [ROWS][COLS];
  logic [15:0] f2 [ROWS][COLS];
  logic [16:0] diff [ROWS][COLS];

  logic [15:0] stream_got [$];
  logic [15:0] out_got [$];
  int in_sent [2];

  always_ff @(posedge sys_clk) begin
    if (rst_n) begin
      if (stream_out_valid) stream_got.push_back(stream_out);
      if (out_valid && out_ready) out_got.push_back(out_data);
      for (int ch = 0; ch < 2; ch++) if (in_valid[ch] && in_ready[ch]) in_sent[ch]++;
    end
  end

  always_comb begin
    for (int ch = 0; ch < 2; ch++) begin
      int n;
      n = in_sent[ch];
      if (n < ROWS * COLS) in_data[ch] = (ch == 0) ? f1[n % ROWS][n / ROWS] : f2[n % ROWS][n / ROWS];
      else in_data[ch] = 16'h0;
    end
  end

  always @(negedge sys_clk) begin
    desc_ready <= 3'b111;
    out_ready  <= ($urandom % 3) != 0;
    for (int ch = 0; ch < 2; ch++) in_valid[ch] <= (in_sent[ch] < ROWS * COLS) && (($urandom % 4) != 0);
  end

  cword_t      aprog [$];
  logic [15:0] rprog [$];
  function automatic void emit(input logic [15:0] w); rprog.push_back(w); endfunction
  function automatic void wait_eq(input int port, input int value);
    emit(IN(4, port)); emit(ADDI(4, 4, -value)); emit(BNEZ(4, -3));
  endfunction
  function automatic void wait_zero(input int port);
    emit(IN(4, port)); emit(BNEZ(4, -2));
  endfunction
  function automatic void dma_setup(input int ch, input int count);
    int base;
    base = P_DMA_BASE + 8 * ch;
    for (int i = 0; i < 4; i++) emit(OUT(base + i, 0));
    emit(LDI(3, count)); emit(OUT(base + DMA_COUNT, 3)); emit(OUT(base + DMA_GO, 0));
  endfunction

  initial begin
    int t_start, ncyc;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        f1[r][c] = 16'($urandom);
        f2[r][c] = (c % 3 == 0) ? f1[r][c] : 16'($urandom);   // some pixels unchanged
        diff[r][c] = {1'b0, f1[r][c]} - {1'b0, f2[r][c]};
      end

    // array program (broadcast): C[16:0] = A - B
    aprog.push_back(CW(ALU(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, 31)));
    aprog.push_back(LOOP(16, 2));
    aprog.push_back(CW(ALU(S0_RAM_A, S1_RAM_B, S2_RAM_C, 1'b1, 1'b0, 0, 0, 31, DST_C, 0),
                       '{a: 1'b1, b: 1'b1, c: 1'b0, d: 1'b1}));
    aprog.push_back(CW(ALU(S0_RAM_A, S1_RAM_B, S2_RAM_C, 1'b1, 1'b1, 0, 0, 31, DST_C, 31),
                       '{a: 1'b1, b: 1'b1, c: 1'b0, d: 1'b0}));
    aprog.push_back(CW(ALU(S0_ZERO, S1_ZERO, S2_RAM_C, 1'b1, 1'b0, 0, 0, 31, DST_C, 16)));
    aprog.push_back(AHALT());

    emit(LDI(1, 6'h20)); emit(OUT(P_CTA_CFG, 1)); emit(OUT(P_CTB_CFG, 1));
    emit(LDI(1, 1));     emit(OUT(P_CTA_MASK, 1)); emit(OUT(P_CTB_MASK, 1));
    dma_setup(0, ROWS * COLS);
    dma_setup(1, ROWS * COLS);
    wait_eq(P_CTA_CFG, COLS);
    wait_eq(P_CTB_CFG, COLS);
    emit(LDI(1, 1)); emit(OUT(P_ARR_MODE, 1));
    emit(OUT(P_ARR_START, 0)); wait_zero(P_ARR_START);
    emit(OUT(P_ARR_MODE, 0));
    // sign bits: row 5, bits 16..1
    emit(LDI(1, 1)); emit(OUT(P_CTD_CFG, 1));
    emit(LDI(1, 5)); emit(OUT(P_CTD_SEL, 1));
    emit(LDI(1, 1)); emit(OUT(P_CTD_START, 1));
    emit(LDI(6, COLS));
    emit(IN(4, P_CTD_AVAIL)); emit(BEQZ(4, -2)); emit(IN(4, P_CTD_POP));
    emit(OUT(P_STREAM, 4)); emit(ADDI(6, 6, -1)); emit(BNEZ(6, -6));
    // whole difference image out over bus C
    emit(LDI(1, 6'h20)); emit(OUT(P_CTC_CFG, 1)); emit(OUT(P_CTC_SEL, 0));
    dma_setup(2, ROWS * COLS);
    emit(LDI(1, COLS)); emit(OUT(P_CTC_START, 1));
    wait_zero(P_DMA_BASE + 16 + DMA_GO);
    emit(HALT());

    risc_il_we = 0; risc_run = 0; arr_il_we = 0; risc_il_addr = 0; arr_il_addr = 0;
    risc_il_data = 0; arr_il_data = '0; stream_in = 16'h0;
    in_sent[0] = 0; in_sent[1] = 0;
    repeat (3) @(posedge sys_clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < aprog.size(); i++) begin
      arr_il_we = 1; arr_il_addr = 8'(i); arr_il_data = aprog[i];
      @(posedge sys_clk); #1;
    end
    arr_il_we = 0;
    for (int i = 0; i < rprog.size(); i++) begin
      risc_il_we = 1; risc_il_addr = 8'(i); risc_il_data = rprog[i];
      @(posedge sys_clk); #1;
    end
    risc_il_we = 0;
    risc_run = 1;
    @(posedge sys_clk); #1 risc_run = 0;
    // array program time, seen from the chip's pins: the RISC polls busy, so
    // measure from the last input word to the first sign word instead
    wait (in_sent[0] == ROWS * COLS && in_sent[1] == ROWS * COLS);
    t_start = $time;
    wait (stream_got.size() > 0);
    ncyc = ($time - t_start) / 10;   // array cycles
    // 1 + LOOP + 32 + 1 + HALT issue cycles + 1 drain = 37; the rest is
    // line-buffer drain, RISC polling and the row-bus read
    check("array program within budget", ncyc < 37 + 200, 1);
    wait (risc_halted);
    repeat (4) @(posedge sys_clk);
    check("sign words", stream_got.size(), COLS);
    for (int c = 0; c < COLS && c < stream_got.size(); c++)
      check($sformatf("row 5 col %0d bits 16..1", c), stream_got[c], diff[5][c][16:1]);
    check("output words", out_got.size(), ROWS * COLS);
    for (int i = 0; i < out_got.size() && i < ROWS * COLS; i++)
      check($sformatf("diff r%0d c%0d", i % ROWS, i / ROWS), out_got[i], diff[i % ROWS][i / ROWS][15:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
