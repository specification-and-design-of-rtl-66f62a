// dip_asm_pkg: instruction encoders for the DIP RISC and the array
// controller, used by the testbenches to build programs.
//
// It has no timing of its own: each function returns one encoded word
// (a 16-bit RISC instruction or an array control word). Interface: RISC
// encoders ADD .. HALT, IN/OUT with an 8-bit port number, and array
// encoders ALU, CW, LOOP, AHALT. The encodings are this design's own; the
// document gives no instruction format.
package dip_asm_pkg;
  import dip_pkg::*;

  function automatic logic [15:0] r3(input logic [3:0] op, input int rd, rs, rt);
    return {op, 3'(rd), 3'(rs), 3'(rt), 3'd0};
  endfunction
  function automatic logic [15:0] ADD (input int rd, rs, rt); return r3(4'h1, rd, rs, rt); endfunction
  function automatic logic [15:0] SUB (input int rd, rs, rt); return r3(4'h2, rd, rs, rt); endfunction
  function automatic logic [15:0] AND_(input int rd, rs, rt); return r3(4'h3, rd, rs, rt); endfunction
  function automatic logic [15:0] OR_ (input int rd, rs, rt); return r3(4'h4, rd, rs, rt); endfunction
  function automatic logic [15:0] XOR_(input int rd, rs, rt); return r3(4'h5, rd, rs, rt); endfunction
  function automatic logic [15:0] SHL (input int rd, rs, rt); return r3(4'h6, rd, rs, rt); endfunction
  function automatic logic [15:0] SHR (input int rd, rs, rt); return r3(4'h7, rd, rs, rt); endfunction
  function automatic logic [15:0] ADDI(input int rd, rs, imm); return {4'h8, 3'(rd), 3'(rs), 6'(imm)}; endfunction
  function automatic logic [15:0] LDI (input int rd, imm);     return {4'h9, 3'(rd), 9'(imm)}; endfunction
  function automatic logic [15:0] LHI (input int rd, imm);     return {4'hA, 3'(rd), 1'b0, 8'(imm)}; endfunction
  function automatic logic [15:0] LW  (input int rd, rs, imm); return {4'hB, 3'(rd), 3'(rs), 6'(imm)}; endfunction
  function automatic logic [15:0] SW  (input int rd, rs, imm); return {4'hC, 3'(rd), 3'(rs), 6'(imm)}; endfunction
  function automatic logic [15:0] BEQZ(input int rd, off);     return {4'hD, 3'(rd), 9'(off)}; endfunction
  function automatic logic [15:0] BNEZ(input int rd, off);     return {4'hE, 3'(rd), 9'(off)}; endfunction
  function automatic logic [15:0] IN  (input int rd, port);    return {4'hF, 3'(rd), 1'b0, 8'(port)}; endfunction
  function automatic logic [15:0] OUT (input int port, rd);    return {4'hF, 3'(rd), 1'b1, 8'(port)}; endfunction
  function automatic logic [15:0] HALT();                      return 16'h0000; endfunction

  // array control words
  function automatic cword_t CW(input micro_t m, input inc_t inc = '0);
    cword_t w = '0;
    w.kind = CW_MICRO; w.micro = m; w.inc = inc;
    return w;
  endfunction
  function automatic cword_t LOOP(input int count, len);
    cword_t w = '0;
    w.kind = CW_LOOP; w.micro[15:8] = 8'(count - 1); w.micro[7:0] = 8'(len - 1);
    return w;
  endfunction
  function automatic cword_t AHALT();
    cword_t w = '0;
    w.kind = CW_HALT;
    return w;
  endfunction
  function automatic micro_t ALU(input src0_e s0, src1_e s1, src2_e s2, input logic sub, carry,
                                 input int aa, ba, ca, input dst_e d, input int da,
                                 input logic nw = 1'b0);
    micro_t m = MICRO_NOP;
    m.src0 = s0; m.src1 = s1; m.src2 = s2; m.sub = sub; m.carry = carry;
    m.a_addr = ADDR_W'(aa); m.b_addr = ADDR_W'(ba); m.c_addr = ADDR_W'(ca);
    m.dst = d; m.d_addr = ADDR_W'(da); m.news_we = nw;
    return m;
  endfunction
endpackage
