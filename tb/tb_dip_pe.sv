// tb_dip_pe: self-checking test of one processing element.
//
// Loads two 16-bit operands through bus A and bus B into the I/O bank,
// swaps banks, adds and subtracts them bit-serially (one instruction for the
// sum bit and one for the carry bit of each position, the carry kept in
// C[31]), swaps back and reads the result out over bus C and bus D. Also
// checks the neighbour inputs, the neighbour register and the flag, which
// must block neighbour inputs. Expected values are computed in the bench.
//
// Interface: none; a top-level bench. Timing: one clock, period 10 ns; a
// watchdog ends the run after 20000 cycles. Bit-serial add/subtract with a
// sum-or-carry output, two banks and the flag follow the description; the
// operand sources and micro-instruction fields are this design's own.
module tb_dip_pe;
  import dip_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  micro_t            instr;
  logic              pingpong, n_in, s_in, e_in, w_in, news_out, flag;
  logic              a_we, a_bit, b_we, b_bit, c_rd_bit, d_rd_bit;
  logic [ADDR_W-1:0] a_addr, b_addr, c_rd_addr, d_rd_addr;
  int checks = 0, failures = 0;

  dip_pe dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(input micro_t m);
    instr = m;
    @(posedge clk);
    #1 instr = MICRO_NOP;
  endtask

  function automatic micro_t alu(input src0_e s0, src1_e s1, src2_e s2, input logic sub, carry,
                                 input int aa, ba, ca, input dst_e d, input int da, input logic nw = 1'b0);
    micro_t m = MICRO_NOP;
    m.src0 = s0; m.src1 = s1; m.src2 = s2; m.sub = sub; m.carry = carry;
    m.a_addr = ADDR_W'(aa); m.b_addr = ADDR_W'(ba); m.c_addr = ADDR_W'(ca);
    m.dst = d; m.d_addr = ADDR_W'(da); m.news_we = nw;
    return m;
  endfunction

  task automatic load_ab(input logic [15:0] a, b);
    for (int k = 0; k < 16; k++) begin
      a_we = 1'b1; a_addr = ADDR_W'(k); a_bit = a[k];
      b_we = 1'b1; b_addr = ADDR_W'(k); b_bit = b[k];
      @(posedge clk); #1;
    end
    a_we = 1'b0; b_we = 1'b0;
  endtask

  // compute bank: C[0..16] = A +/- B over 16 bits, carry/borrow in C[31]
  task automatic serial_op(input logic sub);
    run(alu(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_C, 31));
    for (int k = 0; k < 16; k++) begin
      run(alu(S0_RAM_A, S1_RAM_B, S2_RAM_C, sub, 1'b0, k, k, 31, DST_C, k));
      run(alu(S0_RAM_A, S1_RAM_B, S2_RAM_C, sub, 1'b1, k, k, 31, DST_C, 31));
    end
    // bit 16 = final carry / borrow
    run(alu(S0_ZERO, S1_ZERO, S2_RAM_C, 1'b0, 1'b0, 0, 0, 31, DST_C, 16));
  endtask

  task automatic read_c(input bit via_d, output logic [16:0] v);
    for (int k = 0; k < 17; k++) begin
      c_rd_addr = ADDR_W'(k); d_rd_addr = ADDR_W'(k);
      #1 v[k] = via_d ? d_rd_bit : c_rd_bit;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b;
    logic [16:0] rc, rd, exp;
    int t0;
    instr = MICRO_NOP; pingpong = 1'b0;
    {n_in, s_in, e_in, w_in} = '0;
    {a_we, a_bit, b_we, b_bit} = '0;
    a_addr = '0; b_addr = '0; c_rd_addr = '0; d_rd_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("flag after reset", flag, 0);
    check("news after reset", news_out, 0);

    for (int t = 0; t < 12; t++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (t == 0) begin a = 16'hFFFF; b = 16'h0001; end
      pingpong = 1'b0;
      load_ab(a, b);
      pingpong = 1'b1;   // loaded bank becomes the compute bank
      t0 = $time;
      serial_op(t[0]);
      check("serial op cycles (2 per bit + 2)", ($time - t0) / 10, 34);
      pingpong = 1'b0;   // result bank back on the buses
      read_c(0, rc);
      read_c(1, rd);
      exp = t[0] ? {1'b0, a} - {1'b0, b} : {1'b0, a} + {1'b0, b};
      check("A op B via bus C", rc, exp);
      check("A op B via bus D", rd, exp);
    end

    // neighbours: each direction copied through the neighbour register
    for (int dir = 0; dir < 4; dir++) begin
      src0_e s;
      s = src0_e'(S0_NORTH + dir);
      {n_in, s_in, e_in, w_in} = 4'b1000 >> dir;
      run(alu(s, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b1));
      check("neighbour to news", news_out, 1);
      {n_in, s_in, e_in, w_in} = 4'b1111 ^ (4'b1000 >> dir);
      run(alu(s, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b1));
      check("other neighbours ignored", news_out, 0);
    end
    // flag set: neighbours read as zero
    {n_in, s_in, e_in, w_in} = 4'b1111;
    run(alu(S0_ONE, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_FLAG, 0));
    check("flag set", flag, 1);
    run(alu(S0_NORTH, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b1));
    check("flag blocks north", news_out, 0);
    run(alu(S0_EAST, S1_ZERO, S2_ONE, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b1));
    check("flag blocks east (0+0+1)", news_out, 1);
    run(alu(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_FLAG, 0));
    run(alu(S0_WEST, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b1));
    check("flag cleared, west passes", news_out, 1);
    // news_we = 0 keeps the register
    run(alu(S0_ZERO, S1_ZERO, S2_ZERO, 1'b0, 1'b0, 0, 0, 0, DST_NONE, 0, 1'b0));
    check("news held", news_out, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
