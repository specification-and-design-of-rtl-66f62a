// tb_dip_row_delay: checks the per-row instruction delay chain.
//
// Feeds a new random micro-instruction every cycle. In pipelined mode row r
// must see the instruction issued r+1 cycles earlier; in broadcast mode every
// row must see the one issued one cycle earlier. The bench keeps its own
// history of issued instructions to compare against.
//
// Interface: none; a top-level bench. Timing: one clock, period 10 ns; a
// watchdog ends the run after 5000 cycles. The per-row pipelined and
// broadcast issue follow the description; the one-cycle register in front
// of row 0 is this design's choice.
module tb_dip_row_delay;
  import dip_pkg::*;
  localparam int ROWS = 16;

  logic   clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  micro_t instr_in;
  logic   pipe_mode;
  micro_t row_instr [ROWS];
  micro_t hist [$];
  int checks = 0, failures = 0;

  dip_row_delay dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_in = MICRO_NOP; pipe_mode = 1'b1;
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (row_instr[r] != MICRO_NOP) begin failures++; $display("FAIL reset row %0d", r); end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      micro_t m;
      m = micro_t'({$urandom, $urandom});
      pipe_mode = (t >= 100 && t < 150);
      instr_in = m;
      hist.push_front(m);
      @(posedge clk); #1;
      if (t >= ROWS) begin
        for (int r = 0; r < ROWS; r++) begin
          micro_t exp;
          exp = pipe_mode ? hist[r] : hist[0];
          checks++;
          if (row_instr[r] != exp) begin
            failures++;
            $display("FAIL t=%0d row %0d mode %0b", t, r, pipe_mode);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
