// tb_dip_ctlb_out: checks the output corner-turn line buffer.
//
// A behavioural array model holds a random 32-bit register C for every
// (line, select) pair and answers plane reads combinationally. The buffer is
// asked for three lines starting at select 5 (auto step), bit addresses
// base..base+15 with base 8, while the word consumer stalls at random. Each
// emitted word must equal bits [base+15:base] of one line's register, in
// order, and each line must be gathered as 16 plane reads at consecutive
// bit addresses in 16 consecutive array cycles. A second run with the
// consumer always ready must stream four lines at one word per system
// cycle, which needs the double buffer. The array clock
// runs at twice the word (system) clock, as in the described chip; the
// configuration, start and word handshake use the system clock.
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns; a watchdog ends the run after 5000 system cycles.
// Corner turning out of one selected column follows the description; the
// start/count interface and the auto step checked are this design's.
module tb_dip_ctlb_out;
  import dip_pkg::*;
  localparam int LINES = 16, SEL_N = 16, WORD = 16;

  logic clk = 1'b0, sys_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #10 sys_clk = ~sys_clk;

  // runs of consecutive plane addresses on consecutive array cycles
  int run = 0, runs [$];
  logic [ADDR_W-1:0] prev_addr = '0;
  always @(posedge clk) begin
    if (rst_n && rd_addr == prev_addr + 1'b1) run++;
    else begin
      if (run > 0) runs.push_back(run);
      run = 0;
    end
    prev_addr = rd_addr;
  end
  logic              cfg_we, cfg_auto, sel_we, start, busy, out_valid, out_ready;
  logic [ADDR_W-1:0] cfg_base, rd_addr;
  logic [3:0]        sel_in, rd_sel;
  logic [7:0]        n_lines;
  logic [LINES-1:0]  rd_plane;
  logic [WORD-1:0]   out_data;
  int checks = 0, failures = 0;

  dip_ctlb_out dut (.*);

  logic [31:0] creg [LINES][SEL_N];
  always_comb for (int i = 0; i < LINES; i++) rd_plane[i] = creg[i][rd_sel][rd_addr];

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

  initial begin
    int n, t0;
    cfg_we = 0; cfg_auto = 0; sel_we = 0; start = 0; out_ready = 0; cfg_base = 0; sel_in = 0; n_lines = 0;
    for (int i = 0; i < LINES; i++) for (int s = 0; s < SEL_N; s++) creg[i][s] = $urandom;
    repeat (2) @(posedge sys_clk);
    #1 rst_n = 1'b1;
    cfg_we = 1; cfg_base = 5'd8; cfg_auto = 1; sel_we = 1; sel_in = 4'd5;
    @(posedge sys_clk); #1 cfg_we = 0; sel_we = 0;
    start = 1; n_lines = 8'd3;
    @(posedge sys_clk); #1 start = 0;
    check("busy", busy, 1);
    n = 0;
    while (n < 3 * LINES) begin
      out_ready = ($urandom % 3) != 0;
      @(posedge sys_clk);
      if (out_valid && out_ready) begin
        check($sformatf("word %0d", n), out_data, creg[n % LINES][5 + n / LINES][23:8]);
        n++;
      end
      #1;
    end
    repeat (2) @(posedge clk);
    check("gathered lines", runs.size(), 3);
    foreach (runs[i]) check($sformatf("line %0d read in consecutive cycles", i), runs[i], WORD - 1);
    #1 check("idle after last word", busy, 0);
    // second run, consumer always ready: the double buffer must hide every
    // gather after the first, so four lines leave at one word per cycle
    cfg_we = 1; cfg_base = 5'd0; cfg_auto = 1; sel_we = 1; sel_in = 4'd2;
    @(posedge sys_clk); #1 cfg_we = 0; sel_we = 0;
    start = 1; n_lines = 8'd4; out_ready = 1'b1;
    @(posedge sys_clk); #1 start = 0;
    n = 0;
    while (!out_valid) begin @(posedge sys_clk); #1; end
    t0 = $time;
    while (n < 4 * LINES) begin
      @(posedge sys_clk);
      if (out_valid) begin
        check($sformatf("streamed word %0d", n), out_data, creg[n % LINES][2 + n / LINES][15:0]);
        n++;
      end
      #1;
    end
    check("four lines streamed back to back", ($time - t0) / 20, 4 * LINES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
