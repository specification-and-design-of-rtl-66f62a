// tb_dip_stream_rate: streaming frames through the DIP chip with input,
// output and computation overlapped.
//
// The two register banks of every PE let the buses work on one bank while
// the array computes on the other. The RISC program runs STEPS steps. In
// each it arms DMA channels 0 and 1 to load the next pair of 16x16 frames
// into the I/O bank over buses A and B, arms DMA channel 2 and the bus C
// buffer to send out register C of the I/O bank (the result of two steps
// back), starts the interframe-difference program on the compute bank, waits
// for all of it and swaps the banks. Frame pair s goes in during step s, is
// differenced in step s+1 and comes out in step s+2. The off-chip side never
// stalls, so the step time shows the sustained rate of the chip's buses.
// The bench checks every output pixel of the frames that made the round
// trip, that input, output and computation really overlapped, and that a
// step in the steady state takes at most STEP_MAX system cycles; it prints
// the measured step time and rate.
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns (the 40 and 20 MHz of the described chip); a watchdog
// ends the run after 20000 system cycles. Overlapping I/O with computation
// and the banked registers follow the description; the program, the step
// structure and the STEP_MAX bound are this design's own.
module tb_dip_stream_rate;
  import dip_pkg::*;
  import dip_asm_pkg::*;
  localparam int ROWS = 16, COLS = 16, N = ROWS * COLS;
  localparam int STEPS = 6;
  localparam int STEP_MAX = 320;   // 256 words per bus plus the RISC's per-step set-up

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
    repeat (20000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pixel p (column-major: row p % 16, column p / 16) of frame f on bus ch
  function automatic logic [15:0] pix(input int ch, input int f, input int p);
    logic [31:0] h;
    h = 32'(f * 40503 + p * 2654435 + ch * 97 + 12345);
    h = h ^ (h >> 13);
    h = h * 32'd1103515245;
    return h[23:8];
  endfunction

  logic [15:0] out_got [$];
  int          in_sent [2] = '{0, 0};
  int          cyc = 0, overlap = 0;
  int          step_at [$];

  always_ff @(posedge sys_clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (stream_out_valid) step_at.push_back(cyc);
      if (out_valid && out_ready) out_got.push_back(out_data);
      for (int ch = 0; ch < 2; ch++) if (in_valid[ch] && in_ready[ch]) in_sent[ch] <= in_sent[ch] + 1;
      if (in_valid[0] && in_ready[0] && in_valid[1] && in_ready[1] && out_valid && out_ready &&
          dut.u_ctrl.busy) overlap++;
    end
  end

  always_comb begin
    for (int ch = 0; ch < 2; ch++) in_data[ch] = pix(ch, in_sent[ch] / N, in_sent[ch] % N);
    for (int ch = 0; ch < 2; ch++) in_valid[ch] = in_sent[ch] < STEPS * N;
  end
  assign desc_ready = 3'b111;
  assign out_ready  = 1'b1;

  cword_t      aprog [$];
  logic [15:0] rprog [$];
  function automatic void emit(input logic [15:0] w); rprog.push_back(w); endfunction
  function automatic void wait_zero(input int port);
    emit(IN(4, port)); emit(BNEZ(4, -2));
  endfunction
  function automatic void wait_reg(input int port, input int r);
    emit(IN(4, port)); emit(SUB(4, 4, r)); emit(BNEZ(4, -3));
  endfunction
  function automatic void dma_setup(input int ch, input int count);
    int base;
    base = P_DMA_BASE + 8 * ch;
    for (int i = 0; i < 4; i++) emit(OUT(base + i, 0));
    emit(LDI(3, count)); emit(OUT(base + DMA_COUNT, 3)); emit(OUT(base + DMA_GO, 0));
  endfunction

  initial begin
    int loop_at, t, worst;

    // array program (broadcast): C[16:0] = A - B
    aprog.push_back(CW(ALU(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, 31)));
    aprog.push_back(LOOP(16, 2));
    aprog.push_back(CW(ALU(S0_RAM_A, S1_RAM_B, S2_RAM_C, 1'b1, 1'b0, 0, 0, 31, DST_C, 0),
                       '{a: 1'b1, b: 1'b1, c: 1'b0, d: 1'b1}));
    aprog.push_back(CW(ALU(S0_RAM_A, S1_RAM_B, S2_RAM_C, 1'b1, 1'b1, 0, 0, 31, DST_C, 31),
                       '{a: 1'b1, b: 1'b1, c: 1'b0, d: 1'b0}));
    aprog.push_back(CW(ALU(S0_ZERO, S1_ZERO, S2_RAM_C, 1'b1, 1'b0, 0, 0, 31, DST_C, 16)));
    aprog.push_back(AHALT());

    // RISC program
    emit(LDI(1, 6'h20)); emit(OUT(P_CTA_CFG, 1)); emit(OUT(P_CTB_CFG, 1));  // auto, base 0
    emit(LDI(1, 1));     emit(OUT(P_CTA_MASK, 1)); emit(OUT(P_CTB_MASK, 1));
    emit(LDI(1, 6'h20)); emit(OUT(P_CTC_CFG, 1)); emit(OUT(P_CTC_SEL, 0));
    emit(LDI(5, 0));                                  // lines expected so far
    emit(LDI(6, 0));                                  // mode register value
    emit(LDI(7, STEPS));                              // steps left
    loop_at = rprog.size();
    emit(OUT(P_STREAM, 7));                           // step marker
    dma_setup(0, N);
    dma_setup(1, N);
    dma_setup(2, N);
    emit(LDI(1, COLS)); emit(OUT(P_CTC_START, 1));
    emit(OUT(P_ARR_START, 0));
    wait_zero(P_ARR_START);
    wait_zero(P_DMA_BASE + DMA_GO);
    wait_zero(P_DMA_BASE + 8 + DMA_GO);
    wait_zero(P_DMA_BASE + 16 + DMA_GO);
    emit(ADDI(5, 5, COLS));
    wait_reg(P_CTA_CFG, 5);
    wait_reg(P_CTB_CFG, 5);
    emit(LDI(1, 1)); emit(XOR_(6, 6, 1)); emit(OUT(P_ARR_MODE, 6));   // swap banks
    emit(ADDI(7, 7, -1));
    emit(BNEZ(7, loop_at - (rprog.size() + 1)));
    emit(OUT(P_STREAM, 7));                           // end marker
    emit(HALT());

    risc_il_we = 0; risc_run = 0; arr_il_we = 0; risc_il_addr = 0; arr_il_addr = 0;
    risc_il_data = 0; arr_il_data = '0; stream_in = 16'h0;
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

    check("step markers", step_at.size(), STEPS + 1);
    check("output words", out_got.size(), STEPS * N);
    // frame pair f comes out in step f + 2
    for (int i = 2 * N; i < out_got.size(); i++) begin
      int f, p;
      f = i / N - 2; p = i % N;
      check($sformatf("frame %0d r%0d c%0d", f, p % ROWS, p / ROWS), out_got[i],
            16'(pix(0, f, p) - pix(1, f, p)));
    end
    worst = 0;
    for (int s = 2; s + 1 < step_at.size(); s++) begin
      t = step_at[s + 1] - step_at[s];
      $display("step %0d: %0d system cycles", s, t);
      if (t > worst) worst = t;
    end
    $display("steady step %0d system cycles for 3 x %0d words: %0d Mbit/s at 20 MHz",
             worst, N, 3 * N * 16 * 20 / worst);
    check("steady-state step within bound", worst <= STEP_MAX, 1);
    check("input, output and computation overlapped", overlap > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
