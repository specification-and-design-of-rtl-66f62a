// dip_risc: the chip's 16-bit RISC controller.
//
// The RISC runs the chip: it starts array programs, sets the array mode,
// programs the DMA channels and corner-turn buffers, and does the
// calculations that cannot be done in parallel, such as the final sum of
// the partial sums the array delivers on the row bus. It has separate
// instruction and data memories (a Harvard machine); the instruction memory
// is filled over the external instruction bus while the core is held.
//
// Word width, the separate instruction and data memories and the role follow
// the description; the instruction set is this design's own. Each
// instruction takes one cycle:
//   [15:12] op  [11:9] rd  [8:6] rs  [5:3] rt   (r0 reads as zero)
//   0 HALT            1 ADD  rd=rs+rt   2 SUB rd=rs-rt   3 AND   4 OR   5 XOR
//   6 SHL rd=rs<<rt   7 SHR rd=rs>>rt   8 ADDI rd=rs+sext(imm6)
//   9 LDI rd=imm9     A LHI rd={imm8,rd[7:0]}
//   B LW rd=dmem[rs+sext(imm6)]         C SW dmem[rs+sext(imm6)]=rd
//   D BEQZ rd,off9    E BNEZ rd,off9    (target = pc+1+sext(off9))
//   F IO: [8]=0 IN rd=port[7:0]; [8]=1 OUT port[7:0]=rd
// I/O reads are combinational; io_re marks the cycle of an IN so a port can
// pop a queue. While halted, a cycle with run high starts the core at
// address 0 with the register file kept.
module dip_risc
  import dip_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // external instruction bus
  input  logic                          il_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] il_addr,
  input  logic [15:0]                   il_data,
  input  logic                          run,
  output logic                          halted,
  // I/O ports
  output logic [7:0]                    io_addr,
  output logic [15:0]                   io_wdata,
  output logic                          io_we,
  output logic                          io_re,
  input  logic [15:0]                   io_rdata
);

  localparam int unsigned IA = $clog2(IMEM_DEPTH);
  localparam int unsigned DA = $clog2(DMEM_DEPTH);

  typedef enum logic [3:0] {
    OP_HALT = 4'h0, OP_ADD = 4'h1, OP_SUB = 4'h2, OP_AND = 4'h3,
    OP_OR   = 4'h4, OP_XOR = 4'h5, OP_SHL = 4'h6, OP_SHR = 4'h7,
    OP_ADDI = 4'h8, OP_LDI = 4'h9, OP_LHI = 4'hA, OP_LW  = 4'hB,
    OP_SW   = 4'hC, OP_BEQZ = 4'hD, OP_BNEZ = 4'hE, OP_IO = 4'hF
  } op_e;

  logic [15:0]   imem [IMEM_DEPTH];
  logic [15:0]   dmem [DMEM_DEPTH];
  logic [15:0]   regs [8];
  logic [IA-1:0] pc;
  logic          running;

  logic [15:0] ir;
  op_e         op;
  logic [2:0]  rd, rs, rt;
  logic [15:0] vd, vs, vt, simm6, ea, result;
  logic [IA-1:0] boff;
  logic        wr_rd, take;

  assign ir    = imem[pc];
  assign op    = op_e'(ir[15:12]);
  assign rd    = ir[11:9];
  assign rs    = ir[8:6];
  assign rt    = ir[5:3];
  assign vd    = (rd == 3'd0) ? 16'd0 : regs[rd];
  assign vs    = (rs == 3'd0) ? 16'd0 : regs[rs];
  assign vt    = (rt == 3'd0) ? 16'd0 : regs[rt];
  assign simm6 = {{10{ir[5]}}, ir[5:0]};
  assign boff  = IA'($signed(ir[8:0]));   // branch offset, sign-extended or cut to the pc width
  assign ea    = vs + simm6;

  assign io_addr  = ir[7:0];
  assign io_wdata = vd;
  assign io_we    = running && op == OP_IO &&  ir[8];
  assign io_re    = running && op == OP_IO && !ir[8];
  assign halted   = !running;

  always_comb begin
    result = '0;
    wr_rd  = 1'b1;
    take   = 1'b0;
    unique case (op)
      OP_ADD:  result = vs + vt;
      OP_SUB:  result = vs - vt;
      OP_AND:  result = vs & vt;
      OP_OR:   result = vs | vt;
      OP_XOR:  result = vs ^ vt;
      OP_SHL:  result = vs << vt[3:0];
      OP_SHR:  result = vs >> vt[3:0];
      OP_ADDI: result = ea;
      OP_LDI:  result = {7'd0, ir[8:0]};
      OP_LHI:  result = {ir[7:0], vd[7:0]};
      OP_LW:   result = dmem[ea[DA-1:0]];
      OP_IO:   begin result = io_rdata; wr_rd = !ir[8]; end
      OP_BEQZ: begin wr_rd = 1'b0; take = (vd == 16'd0); end
      OP_BNEZ: begin wr_rd = 1'b0; take = (vd != 16'd0); end
      default: wr_rd = 1'b0;   // HALT, SW
    endcase
  end

  always_ff @(posedge clk) begin
    if (il_we) imem[il_addr] <= il_data;
    if (running && op == OP_SW) dmem[ea[DA-1:0]] <= vd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (!running) begin
      if (run) begin
        running <= 1'b1;
        pc      <= '0;
      end
    end else begin
      if (op == OP_HALT) running <= 1'b0;
      else begin
        if (wr_rd && rd != 3'd0) regs[rd] <= result;
        pc <= take ? pc + 1'b1 + boff : pc + 1'b1;
      end
    end
  end

endmodule
