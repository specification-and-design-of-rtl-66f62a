// tb_dip_array_ctrl: checks the array instruction memory and sequencer.
//
// Loads a program over the instruction bus: two plain micro-instructions, a
// LOOP of COUNT=5 over a two-word body whose addresses step with the
// iteration, one more word and HALT. It then records every issued
// micro-instruction and compares the sequence, including the stepped
// addresses, with the expected one, checks that the words are issued on
// consecutive array cycles apart from the one spent on the LOOP word, that
// busy seen on the system clock covers the program plus the drain time
// (ROWS array cycles in pipelined mode, 1 in broadcast mode) and falls
// within the synchronizer delays after it, and that the loop counter
// advanced. The array clock runs at twice the system
// clock, as in the described chip; loading and start use the system clock.
//
// Interface: none; a top-level bench. Timing: array clock period 10 ns,
// system clock 20 ns; a watchdog ends the run after 5000 system cycles.
// That loops of length M are one instruction follows the description; the
// program, the word format and the cycle counts checked are this design's.
module tb_dip_array_ctrl;
  import dip_pkg::*;
  localparam int DEPTH = 256, ROWS = 16;

  logic        clk = 1'b0, sys_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #10 sys_clk = ~sys_clk;
  logic        ld_we, start, pipe_mode, busy;
  logic [7:0]  ld_addr, start_addr;
  cword_t      ld_data;
  micro_t      micro_out;
  logic [15:0] loops_run;
  int checks = 0, failures = 0;

  dip_array_ctrl dut (.*);

  function automatic micro_t mk(input int tag);
    micro_t m = MICRO_NOP;
    m.dst = DST_C; m.d_addr = ADDR_W'(tag); m.a_addr = ADDR_W'(tag + 1);
    m.b_addr = ADDR_W'(tag + 2); m.c_addr = ADDR_W'(tag + 3);
    return m;
  endfunction

  task automatic put(input int addr, input cword_t w);
    ld_we = 1'b1; ld_addr = 8'(addr); ld_data = w;
    @(posedge sys_clk); #1 ld_we = 1'b0;
  endtask

  task automatic check(input string what, input logic [63:0] got, exp);
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

  // array-clock side: record issued words and count active sequencer cycles
  micro_t got_q [$];
  int     acyc = 0, first_at = 0, last_at = 0;
  always @(posedge clk) begin
    if (micro_out != MICRO_NOP) begin
      if (got_q.size() == 0) first_at = acyc;
      last_at = acyc;
      got_q.push_back(micro_out);
    end
    acyc++;
  end

  initial begin
    micro_t exp_q [$];
    cword_t w;
    int cyc, act;
    ld_we = 0; start = 0; pipe_mode = 0; ld_addr = 0; start_addr = 0; ld_data = '0;
    repeat (2) @(posedge sys_clk);
    #1 rst_n = 1'b1;
    check("idle after reset", busy, 0);
    // program at address 10
    w = '0; w.kind = CW_MICRO; w.micro = mk(1); put(10, w);
    w.micro = mk(2); w.inc = '{a: 1'b1, b: 1'b0, c: 1'b0, d: 1'b1}; put(11, w);   // inc ignored outside loops
    w = '0; w.kind = CW_LOOP; w.micro[15:8] = 8'd4; w.micro[7:0] = 8'd1; put(12, w);
    w = '0; w.kind = CW_MICRO; w.micro = mk(3); w.inc = '{a: 1'b1, b: 1'b0, c: 1'b0, d: 1'b1}; put(13, w);
    w = '0; w.kind = CW_MICRO; w.micro = mk(8); w.inc = '{a: 1'b0, b: 1'b1, c: 1'b1, d: 1'b0}; put(14, w);
    w = '0; w.kind = CW_MICRO; w.micro = mk(20); put(15, w);
    w = '0; w.kind = CW_HALT; put(16, w);

    exp_q.push_back(mk(1));
    exp_q.push_back(mk(2));
    for (int i = 0; i < 5; i++) begin
      micro_t m;
      m = mk(3); m.a_addr += ADDR_W'(i); m.d_addr += ADDR_W'(i); exp_q.push_back(m);
      m = mk(8); m.b_addr += ADDR_W'(i); m.c_addr += ADDR_W'(i); exp_q.push_back(m);
    end
    exp_q.push_back(mk(20));

    for (int mode = 0; mode < 2; mode++) begin
      got_q.delete();
      pipe_mode = mode[0];
      start_addr = 8'd10; start = 1'b1;
      @(posedge sys_clk); #1 start = 1'b0;
      check("busy after start", busy, 1);
      cyc = 0;
      while (busy && cyc < 200) begin
        @(posedge sys_clk); #1 cyc++;
      end
      check("issued count", got_q.size(), exp_q.size());
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
        check($sformatf("issued word %0d", i), 64'(got_q[i]), 64'(exp_q[i]));
      // 2 words + loop word + 10 loop words + 1 word + halt = 15 cycles, then drain
      // 13 words issued over 14 cycles, one of them spent on the LOOP word
      check("issue span in array cycles", last_at - first_at, 13);
      act = 15 + (mode ? ROWS : 1);
      // busy spans request sync (2-3 array cycles), the active time and the
      // done sync (2-3 system cycles)
      checks++;
      if (2 * cyc < act + 2 || 2 * cyc > act + 4 + 8) begin
        failures++; $display("FAIL busy span %0d system cycles for %0d active", cyc, act);
      end
      check("loops run", loops_run, 16'(mode + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
