// dip_pe: one 1-bit processing element of the DIP array.
//
// Each PE owns two banks of bit-addressable RAM, each holding registers
// A (16 bits), B (32 bits) and C (32 bits): 160 bits in all. The global
// pingpong bit picks which bank is the compute bank; the other is the I/O
// bank. The ALU reads one bit from A, B and C of the compute bank (or a
// neighbour bit or a constant in their place), forms their sum or
// difference, and writes either the sum/difference bit or the carry/borrow
// bit back into the compute bank, into the flag register, and/or into the
// neighbour register that the four nearest neighbours read. Meanwhile the
// image buses write A and B of the I/O bank and read C of the I/O bank, so
// image transfer overlaps computation.
//
// The bank structure, the two-bank pingpong scheme, the 1-bit add/subtract
// ALU with a sum-or-carry output mux, the four-way neighbour links and the
// flag that inhibits communication follow the description. The operand
// selection, the neighbour register and the flag semantics (a set flag makes
// the PE read zero from all neighbours) are this design's choices.
//
// Timing: the ALU path is combinational; RAM, flag and neighbour register
// update on the rising clock edge. Bus writes also take effect on the edge;
// bus reads (c_rd_bit, d_rd_bit) are combinational. RAM is not reset.
module dip_pe
  import dip_pkg::*;
#(
  parameter int unsigned A_BITS = 16,
  parameter int unsigned B_BITS = 32,
  parameter int unsigned C_BITS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  micro_t            instr,
  input  logic              pingpong,   // compute bank index
  input  logic              n_in,       // neighbour register of the PE to the north
  input  logic              s_in,
  input  logic              e_in,
  input  logic              w_in,
  output logic              news_out,
  output logic              flag,
  // I/O bank access from the image buses
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic              a_bit,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic              b_bit,
  input  logic [ADDR_W-1:0] c_rd_addr,  // column bus C read
  output logic              c_rd_bit,
  input  logic [ADDR_W-1:0] d_rd_addr,  // row bus D read
  output logic              d_rd_bit
);

  localparam int unsigned AA = $clog2(A_BITS);
  localparam int unsigned BA = $clog2(B_BITS);
  localparam int unsigned CA = $clog2(C_BITS);

  logic [A_BITS-1:0] ram_a [2];
  logic [B_BITS-1:0] ram_b [2];
  logic [C_BITS-1:0] ram_c [2];

  logic cb, iob;   // compute bank, I/O bank
  assign cb  = pingpong;
  assign iob = ~pingpong;

  logic op0, op1, op2, sum, cy, alu;

  always_comb begin
    unique case (instr.src0)
      S0_RAM_A: op0 = ram_a[cb][instr.a_addr[AA-1:0]];
      S0_NORTH: op0 = n_in & ~flag;
      S0_SOUTH: op0 = s_in & ~flag;
      S0_EAST:  op0 = e_in & ~flag;
      S0_WEST:  op0 = w_in & ~flag;
      S0_ONE:   op0 = 1'b1;
      default:  op0 = 1'b0;
    endcase
    unique case (instr.src1)
      S1_RAM_B: op1 = ram_b[cb][instr.b_addr[BA-1:0]];
      S1_RAM_A: op1 = ram_a[cb][instr.a_addr[AA-1:0]];
      default:  op1 = 1'b0;
    endcase
    unique case (instr.src2)
      S2_RAM_C: op2 = ram_c[cb][instr.c_addr[CA-1:0]];
      S2_ONE:   op2 = 1'b1;
      default:  op2 = 1'b0;
    endcase
    // op0 + op1 + op2, or op0 - op1 - op2 (op2 is the borrow in)
    sum = op0 ^ op1 ^ op2;
    if (instr.sub) cy = (~op0 & op1) | (~op0 & op2) | (op1 & op2);
    else           cy = (op0 & op1) | (op0 & op2) | (op1 & op2);
    alu = instr.carry ? cy : sum;
  end

  always_ff @(posedge clk) begin
    unique case (instr.dst)
      DST_A: ram_a[cb][instr.d_addr[AA-1:0]] <= alu;
      DST_B: ram_b[cb][instr.d_addr[BA-1:0]] <= alu;
      DST_C: ram_c[cb][instr.d_addr[CA-1:0]] <= alu;
      default: ;
    endcase
    if (a_we && a_addr < ADDR_W'(A_BITS)) ram_a[iob][a_addr[AA-1:0]] <= a_bit;   // A has only A_BITS bits
    if (b_we) ram_b[iob][b_addr[BA-1:0]] <= b_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag     <= 1'b0;
      news_out <= 1'b0;
    end else begin
      if (instr.dst == DST_FLAG) flag <= alu;
      if (instr.news_we) news_out <= alu;
    end
  end

  assign c_rd_bit = ram_c[iob][c_rd_addr[CA-1:0]];
  assign d_rd_bit = ram_c[iob][d_rd_addr[CA-1:0]];

endmodule
