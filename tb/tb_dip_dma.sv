// tb_dip_dma: checks one DMA channel.
//
// Writes four random descriptor words and a count, starts the channel and
// checks that the descriptor words come out in order under a stalling
// receiver, that exactly COUNT data words pass from source to destination
// unchanged while both sides stall at random, and that no word passes
// before GO or after the count is reached.
//
// Interface: none; a top-level bench. Timing: one clock, period 10 ns; a
// watchdog ends the run after 20000 cycles. The four user-defined
// descriptor words follow the description; the word count, the register
// layout and the handshakes are this design's own.
module tb_dip_dma;
  import dip_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        reg_we, busy, desc_valid, desc_ready, src_valid, src_ready, dst_valid, dst_ready;
  logic [2:0]  reg_addr;
  logic [15:0] reg_wdata, desc_data, src_data, dst_data;
  int checks = 0, failures = 0;

  dip_dma dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic wreg(input logic [2:0] a, input logic [15:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1 reg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] desc [4];
    logic [15:0] stream [$];
    int nd, nsrc, ndst, count;
    reg_we = 0; reg_addr = 0; reg_wdata = 0; desc_ready = 0; src_valid = 0; src_data = 0; dst_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      count = 20 + run * 37;
      for (int i = 0; i < 4; i++) begin desc[i] = 16'($urandom); wreg(3'(i), desc[i]); end
      wreg(DMA_COUNT, 16'(count));
      // nothing moves before GO
      src_valid = 1; dst_ready = 1;
      @(posedge clk); #1;
      check("no transfer before GO", src_ready | dst_valid | desc_valid, 0);
      src_valid = 0;
      wreg(DMA_GO, 16'd0);
      check("busy", busy, 1);
      nd = 0; nsrc = 0; ndst = 0;
      stream.delete();
      while (busy) begin
        desc_ready = $urandom % 2;
        src_valid = ($urandom % 3) != 0;
        src_data = 16'($urandom);
        dst_ready = ($urandom % 3) != 0;
        @(posedge clk);
        if (desc_valid && desc_ready) begin
          check($sformatf("desc %0d", nd), desc_data, desc[nd]);
          nd++;
        end
        if (src_valid && src_ready) begin stream.push_back(src_data); nsrc++; end
        if (dst_valid && dst_ready) begin
          check("data word", dst_data, stream.size() ? stream[stream.size() - 1] : 16'hx);
          ndst++;
        end
        #1;
      end
      check("descriptor words", nd, 4);
      check("words moved", ndst, count);
      check("words taken", nsrc, count);
      src_valid = 1; dst_ready = 1;
      @(posedge clk); #1;
      check("no transfer after count", src_ready | dst_valid, 0);
      src_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
