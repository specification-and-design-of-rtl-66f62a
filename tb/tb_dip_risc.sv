// tb_dip_risc: checks the 16-bit RISC core.
//
// Loads a program over the instruction bus that exercises every
// instruction: a counted loop (sum 10..1), data memory store and load,
// LHI, shifts, the four logic/arithmetic register operations, IN from a
// port that advances on each read, a taken BEQZ that skips an OUT, and the
// hard-wired zero register. The bench logs every OUT and compares it with
// values it works out itself, and checks that the program takes one cycle
// per executed instruction.
//
// Interface: none; a top-level bench. Timing: one clock, period 10 ns; a
// watchdog ends the run after 5000 cycles. A 16-bit RISC with separate
// instruction and data memories follows the description; the instruction
// set tested is this design's own.
module tb_dip_risc;
  import dip_pkg::*;
  import dip_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        il_we, run, halted, io_we, io_re;
  logic [7:0]  il_addr, io_addr;
  logic [15:0] il_data, io_wdata, io_rdata;
  int checks = 0, failures = 0;

  dip_risc dut (.*);

  logic [15:0] in_port = 16'h1234;
  assign io_rdata = (io_addr == 8'h37) ? in_port : 16'hDEAD;
  always_ff @(posedge clk) if (io_re && io_addr == 8'h37) in_port <= in_port + 1'b1;

  logic [15:0] outs [256];
  logic        seen [256];
  initial for (int i = 0; i < 256; i++) seen[i] = 1'b0;
  always_ff @(posedge clk) if (io_we) begin outs[io_addr] <= io_wdata; seen[io_addr] <= 1'b1; end

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prog [$];
    logic [15:0] r2, r3, r5;
    int cyc;
    prog = '{LDI(1, 10), LDI(2, 0), ADD(2, 2, 1), ADDI(1, 1, -1), BNEZ(1, -3),
             OUT(8'h40, 2), SW(2, 0, 5), LW(3, 0, 5), LHI(3, 8'hAB), OUT(8'h41, 3),
             LDI(4, 3), SHL(5, 3, 4), OUT(8'h42, 5), SHR(5, 3, 4), OUT(8'h43, 5),
             SUB(6, 2, 3), OUT(8'h44, 6), AND_(6, 2, 3), OUT(8'h45, 6),
             OR_(6, 2, 3), OUT(8'h46, 6), XOR_(6, 2, 3), OUT(8'h47, 6),
             IN(7, 8'h37), IN(1, 8'h37), SUB(7, 1, 7), OUT(8'h48, 7),
             BEQZ(0, 1), OUT(8'h49, 2), LDI(0, 5), OUT(8'h4A, 0), HALT()};
    il_we = 0; il_addr = 0; il_data = 0; run = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < prog.size(); i++) begin
      il_we = 1; il_addr = 8'(i); il_data = prog[i];
      @(posedge clk); #1;
    end
    il_we = 0;
    check("halted before run", halted, 1);
    run = 1;
    @(posedge clk); #1 run = 0;
    cyc = 0;
    while (!halted) begin @(posedge clk); #1 cyc++; end
    r2 = 16'd55;
    r3 = 16'hAB37;
    check("loop sum", outs[8'h40], r2);
    check("LW/LHI", outs[8'h41], r3);
    check("SHL", outs[8'h42], 16'(r3 << 3));
    check("SHR", outs[8'h43], r3 >> 3);
    check("SUB", outs[8'h44], 16'(r2 - r3));
    check("AND", outs[8'h45], r2 & r3);
    check("OR", outs[8'h46], r2 | r3);
    check("XOR", outs[8'h47], r2 ^ r3);
    check("IN advances", outs[8'h48], 1);
    check("BEQZ skipped", seen[8'h49], 0);
    check("r0 stays zero", outs[8'h4A], 0);
    // 2 + 3*10 + 23 (pc 5..27) + 2 (pc 29,30) + HALT
    check("cycles", cyc, 58);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
