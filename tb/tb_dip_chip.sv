// tb_dip_chip: end-to-end test of the DIP chip at its default size.
//
// The bench plays the off-chip side: it loads an array program and a RISC
// program over the two instruction buses, answers the three DMA channels'
// descriptor words, streams a random 16x16 image of 8-bit pixels into bus A
// and a control image into bus B, and drains the output channel, all with
// random stalls. The RISC program
//   1. sets up the two input corner-turn buffers and DMA channels 0 and 1
//      and waits until all 16 columns of both images are in the array;
//   2. swaps the banks and runs a broadcast-mode program that loads each
//      PE's flag from B[0] (set in row 8 only) and clears the carry bits;
//   3. switches to pipelined mode and runs a bit-serial column accumulation
//      (two LOOP words, 20 result bits), in which the flag of row 8 breaks
//      the column into two 8-row halves;
//   4. swaps the banks back, reads rows 7 and 15 (the two half-column sums)
//      over the row bus into the RISC, sends each word on its 1-D stream,
//      adds each run of 8 words into one of four 8x8 block sums and all of
//      them into a total (the final summation), and sends the block sums
//      and the total;
//   5. sends register C of the whole array out over bus C and DMA channel 2.
// Everything is checked against sums the bench computes, and the bench
// counts how often each mechanism was used (pipelined and broadcast
// issue, flag inhibit, bank swaps, loops, corner turns, DMA descriptors,
// back-pressure); one that never happened is a failure. The array clock
// runs at twice the system clock, as in the described chip (40 and 20 MHz);
// the off-chip side works on the system clock, and the array programs are
// timed in array cycles.
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns; a watchdog ends the run after 40000 system cycles.
// The flow (images in over DMA and corner-turn buffers, pipelined column
// accumulation, flag-broken 8x8 sub-arrays, final summation on the RISC)
// follows the description; the programs, port numbers and cycle counts
// are this design's own.
module tb_dip_chip;
  import dip_pkg::*;
  import dip_asm_pkg::*;
  localparam int ROWS = 16, COLS = 16;

  logic clk = 1'b0, sys_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #10 sys_clk = ~sys_clk;

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

  // ---------------- stimulus data and reference model ----------------
  logic [15:0] img [ROWS][COLS];
  logic [15:0] psum [ROWS][COLS];   // partial column sums with the break at row 8
  logic [15:0] total;

  // ---------------- off-chip side ----------------
  logic [15:0] desc_got [3][$];
  logic [15:0] stream_got [$];
  logic [15:0] out_got [$];
  int in_sent [2];
  int n_stall_out, n_stall_in, n_pipe_cycles, n_bcast_cycles, n_swaps, n_dbuf_overlap;
  logic last_pp;

  always_ff @(posedge sys_clk) begin
    if (rst_n) begin
      for (int ch = 0; ch < 3; ch++)
        if (desc_valid[ch] && desc_ready[ch]) desc_got[ch].push_back(desc_data[ch]);
      if (stream_out_valid) stream_got.push_back(stream_out);
      if (out_valid && out_ready) out_got.push_back(out_data);
      if (out_valid && !out_ready) n_stall_out++;
      for (int ch = 0; ch < 2; ch++) begin
        if (in_valid[ch] && in_ready[ch]) in_sent[ch]++;
        if (in_valid[ch] && !in_ready[ch]) n_stall_in++;
      end
    end
  end

  // mechanisms observed inside the chip, on the array clock
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.state != dut.u_ctrl.IDLE && dut.pipe_mode) n_pipe_cycles++;
      if (dut.u_ctrl.state != dut.u_ctrl.IDLE && !dut.pipe_mode) n_bcast_cycles++;
      if (dut.pingpong != last_pp) n_swaps++;
      last_pp <= dut.pingpong;
      if (dut.u_cta.arr_we && dut.u_cta.in_ready && dut.u_cta.in_valid) n_dbuf_overlap++;
    end
  end

  always_comb begin
    for (int ch = 0; ch < 2; ch++) begin
      int n;
      n = in_sent[ch];
      if (n < ROWS * COLS) begin
        if (ch == 0) in_data[ch] = img[n % ROWS][n / ROWS];
        else         in_data[ch] = {15'd0, (n % ROWS) == 8};
      end else in_data[ch] = 16'h0;
    end
  end

  always @(negedge sys_clk) begin
    desc_ready <= 3'($urandom);
    out_ready  <= ($urandom % 4) != 0;
    for (int ch = 0; ch < 2; ch++) in_valid[ch] <= (in_sent[ch] < ROWS * COLS) && (($urandom % 5) != 0);
  end

  // ---------------- programs ----------------
  cword_t      aprog [$];
  logic [15:0] rprog [$];

  function automatic void emit(input logic [15:0] w); rprog.push_back(w); endfunction
  function automatic void wait_eq(input int port, input int value);
    emit(IN(4, port)); emit(ADDI(4, 4, -value)); emit(BNEZ(4, -3));
  endfunction
  function automatic void wait_zero(input int port);
    emit(IN(4, port)); emit(BNEZ(4, -2));
  endfunction
  function automatic void read_row(input int row);
    emit(LDI(1, row)); emit(OUT(P_CTD_SEL, 1));
    emit(LDI(1, 1));   emit(OUT(P_CTD_START, 1));
    for (int half = 0; half < 2; half++) begin
      emit(LDI(6, COLS / 2)); emit(LDI(7, 0));
      emit(IN(4, P_CTD_AVAIL)); emit(BEQZ(4, -2)); emit(IN(4, P_CTD_POP));
      emit(OUT(P_STREAM, 4)); emit(ADD(7, 7, 4)); emit(ADDI(6, 6, -1)); emit(BNEZ(6, -7));
      emit(ADD(5, 5, 7)); emit(SW(7, 0, 2 * (row / 8) + half));     // 8x8 block sum
    end
  endfunction
  function automatic void dma_setup(input int ch, input int count);
    int base;
    base = P_DMA_BASE + 8 * ch;
    for (int i = 0; i < 4; i++) begin emit(LDI(2, 16 * ch + i + 1)); emit(OUT(base + i, 2)); end
    emit(LDI(3, count)); emit(OUT(base + DMA_COUNT, 3)); emit(OUT(base + DMA_GO, 0));
  endfunction

  initial begin
    total = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = 16'($urandom % 256);
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        psum[r][c] = ((r == 0 || r == 8) ? 16'd0 : psum[r-1][c]) + img[r][c];
        total += img[r][c];
      end

    // array program 1 (broadcast): flag <- B[0]; C[31] <- 0; news <- 0
    aprog.push_back(CW(ALU(S0_ZERO, S1_RAM_B, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_FLAG, 0)));
    aprog.push_back(CW(ALU(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, 31, 1'b1)));
    aprog.push_back(AHALT());
    // array program 2 at 8 (pipelined): C[19:0] = north partial sum + A, per bit
    while (aprog.size() < 8) aprog.push_back(AHALT());
    aprog.push_back(LOOP(16, 2));
    aprog.push_back(CW(ALU(S0_NORTH, S1_RAM_A, S2_RAM_C, 1'b0, 1'b0, 0, 0, 31, DST_C, 0, 1'b1),
                       '{a: 1'b1, b: 1'b0, c: 1'b0, d: 1'b1}));
    aprog.push_back(CW(ALU(S0_NORTH, S1_RAM_A, S2_RAM_C, 1'b0, 1'b1, 0, 0, 31, DST_C, 31),
                       '{a: 1'b1, b: 1'b0, c: 1'b0, d: 1'b0}));
    aprog.push_back(LOOP(4, 2));
    aprog.push_back(CW(ALU(S0_NORTH, S1_ZERO, S2_RAM_C, 1'b0, 1'b0, 0, 0, 31, DST_C, 16, 1'b1),
                       '{a: 1'b0, b: 1'b0, c: 1'b0, d: 1'b1}));
    aprog.push_back(CW(ALU(S0_NORTH, S1_ZERO, S2_RAM_C, 1'b0, 1'b1, 0, 0, 31, DST_C, 31)));
    aprog.push_back(AHALT());

    // RISC program
    emit(LDI(1, 6'h20)); emit(OUT(P_CTA_CFG, 1)); emit(OUT(P_CTB_CFG, 1));   // auto, base 0
    emit(LDI(1, 1));     emit(OUT(P_CTA_MASK, 1)); emit(OUT(P_CTB_MASK, 1)); // start at column 0
    dma_setup(0, ROWS * COLS);
    dma_setup(1, ROWS * COLS);
    wait_eq(P_CTA_CFG, COLS);
    wait_eq(P_CTB_CFG, COLS);
    emit(LDI(1, 1)); emit(OUT(P_ARR_MODE, 1));                    // swap banks, broadcast
    emit(OUT(P_ARR_START, 0)); wait_zero(P_ARR_START);
    emit(LDI(1, 3)); emit(OUT(P_ARR_MODE, 1));                    // pipelined rows
    emit(LDI(1, 8)); emit(OUT(P_ARR_START, 1)); wait_zero(P_ARR_START);
    emit(OUT(P_ARR_MODE, 0));                                     // swap back
    emit(OUT(P_CTD_CFG, 0));
    emit(LDI(5, 0));
    read_row(7);
    read_row(15);
    for (int b = 0; b < 4; b++) begin emit(LW(7, 0, b)); emit(OUT(P_STREAM, 7)); end
    emit(OUT(P_STREAM, 5));
    emit(LDI(1, 6'h20)); emit(OUT(P_CTC_CFG, 1)); emit(OUT(P_CTC_SEL, 0));
    dma_setup(2, ROWS * COLS);
    emit(LDI(1, COLS)); emit(OUT(P_CTC_START, 1));
    wait_zero(P_DMA_BASE + 16 + DMA_GO);
    emit(IN(7, P_LOOPS)); emit(OUT(P_STREAM, 7));
    emit(HALT());

    risc_il_we = 0; risc_run = 0; arr_il_we = 0; risc_il_addr = 0; arr_il_addr = 0;
    risc_il_data = 0; arr_il_data = '0; stream_in = 16'h0;
    in_sent[0] = 0; in_sent[1] = 0; last_pp = 0;
    n_stall_out = 0; n_stall_in = 0; n_pipe_cycles = 0; n_bcast_cycles = 0; n_swaps = 0; n_dbuf_overlap = 0;
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
    check("program fits", rprog.size() <= 256, 1);
    risc_run = 1;
    @(posedge sys_clk); #1 risc_run = 0;

    wait (risc_halted);
    repeat (4) @(posedge sys_clk);

    // results on the RISC's stream: row 7, row 15, total, loop count
    check("stream words", stream_got.size(), 2 * COLS + 6);
    for (int c = 0; c < COLS && 2 * COLS < stream_got.size(); c++) begin
      check($sformatf("row 7 col %0d (sum rows 0-7)", c), stream_got[c], psum[7][c]);
      check($sformatf("row 15 col %0d (sum rows 8-15)", c), stream_got[COLS + c], psum[15][c]);
    end
    if (stream_got.size() >= 2 * COLS + 6) begin
      for (int b = 0; b < 4; b++) begin
        logic [15:0] bs;
        bs = '0;
        for (int r = 8 * (b / 2); r < 8 * (b / 2) + 8; r++)
          for (int c = 8 * (b % 2); c < 8 * (b % 2) + 8; c++) bs += img[r][c];
        check($sformatf("8x8 block %0d sum", b), stream_got[2 * COLS + b], bs);
      end
      check("final summation", stream_got[2 * COLS + 4], total);
      check("loops run", stream_got[2 * COLS + 5], 2);
    end
    // output image over bus C: column by column, row 0 first
    check("output words", out_got.size(), ROWS * COLS);
    for (int i = 0; i < out_got.size() && i < ROWS * COLS; i++)
      check($sformatf("out r%0d c%0d", i % ROWS, i / ROWS), out_got[i], psum[i % ROWS][i / ROWS]);
    // descriptors
    for (int ch = 0; ch < 3; ch++) begin
      check($sformatf("desc count ch%0d", ch), desc_got[ch].size(), 4);
      for (int i = 0; i < 4 && i < desc_got[ch].size(); i++)
        check($sformatf("desc ch%0d w%0d", ch, i), desc_got[ch][i], 16'(16 * ch + i + 1));
    end

    // mechanisms
    $display("mechanisms: pipelined-issue cycles=%0d broadcast-issue cycles=%0d bank swaps=%0d",
             n_pipe_cycles, n_bcast_cycles, n_swaps);
    $display("            input stalls=%0d output stalls=%0d ctlb fill-while-drain=%0d",
             n_stall_in, n_stall_out, n_dbuf_overlap);
    // LOOP + 32 + LOOP + 8 + HALT issue cycles, then ROWS cycles of drain
    check("pipelined accumulation array cycles", n_pipe_cycles, 1 + 32 + 1 + 8 + 1 + ROWS);
    // two words + HALT, then one cycle of drain
    check("broadcast program array cycles", n_bcast_cycles, 3 + 1);
    check("banks swapped twice", n_swaps, 2);
    check("input back-pressure seen", n_stall_in > 0, 1);
    check("output back-pressure seen", n_stall_out > 0, 1);
    check("double-buffered line fill during drain", n_dbuf_overlap > 0, 1);
    check("flag inhibit used (row 8 flag)", dut.u_array.g_row[8].g_col[3].u_pe.flag, 1);
    check("flag clear elsewhere", dut.u_array.g_row[7].g_col[3].u_pe.flag, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
