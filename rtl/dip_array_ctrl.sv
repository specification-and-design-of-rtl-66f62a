// dip_array_ctrl: array instruction memory and sequencer.
//
// The array program lives in an on-chip instruction memory that is filled
// over the external instruction bus (ld_*). The RISC starts a program by
// giving its start address; the sequencer then issues one micro-instruction
// per cycle until it reaches a HALT word. Bit-serial programs are mostly
// short loops run once per bit of an M-bit number, so a LOOP word repeats the
// next LEN words COUNT times, and each micro-instruction may ask for the loop
// iteration number to be added to any of its RAM addresses. One LOOP word
// thus encodes an M-bit operation and saves instruction bandwidth.
//
// After HALT the controller stays busy while the instruction delay chain
// drains (ROWS cycles in pipelined mode, one in broadcast mode), so "not
// busy" means every row has executed the whole program.
//
// The sequencer runs on the array clock (clk). The instruction bus and the
// RISC's start and busy are on the system clock (sys_clk): the memory is
// written on sys_clk and read on clk, a start flips a request toggle that
// the array side sees through a synchronizer, and the array side flips a
// done toggle when the program has drained. busy, seen from sys_clk, is
// high from the start until the done toggle has come back.
//
// That the array has its own instruction memory fed by an instruction bus,
// and that M-bit loops are encoded as single instructions, follows the
// description. Memory depth, word format, the single (non-nested) loop level
// and the address-increment scheme are this design's choices.
// Timing: the first word is issued three to four array cycles after the
// sys_clk edge that takes start; busy falls two to three sys_clk edges after
// the last drain cycle. A start while busy is ignored.
module dip_array_ctrl
  import dip_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned ROWS  = 16
) (
  input  logic                     clk,       // array clock
  input  logic                     sys_clk,   // instruction bus and RISC side
  input  logic                     rst_n,
  // external instruction bus (sys_clk)
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  cword_t                   ld_data,
  // from the RISC (sys_clk)
  input  logic                     start,
  input  logic [$clog2(DEPTH)-1:0] start_addr,
  input  logic                     pipe_mode,   // clk domain
  output logic                     busy,        // sys_clk domain
  // to the delay chain
  output micro_t                   micro_out,
  output logic [15:0]              loops_run    // LOOP words executed since reset (clk)
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned DW = $clog2(ROWS + 1);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_e;

  cword_t          mem [DEPTH];
  state_e          state;
  logic [PW-1:0]   pc, loop_start, loop_end;
  logic [7:0]      iter, loop_last;
  logic            in_loop;
  logic [DW-1:0]   drain_cnt;
  cword_t          cw;

  always_ff @(posedge sys_clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  // start / done toggle handshake
  logic          req_tog, done_tog, req_a, req_seen, done_s;
  logic [PW-1:0] start_h;

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      req_tog <= 1'b0;
      start_h <= '0;
    end else if (start && !busy) begin
      req_tog <= ~req_tog;
      start_h <= start_addr;
    end
  end

  dip_sync #(.WIDTH(1)) u_sync_req  (.clk, .rst_n, .d(req_tog), .q(req_a));
  dip_sync #(.WIDTH(1)) u_sync_done (.clk(sys_clk), .rst_n, .d(done_tog), .q(done_s));

  assign busy = (req_tog != done_s);

  assign cw = mem[pc];

  always_comb begin
    micro_out = MICRO_NOP;
    if (state == RUN && cw.kind == CW_MICRO) begin
      micro_out = cw.micro;
      if (in_loop) begin
        if (cw.inc.a) micro_out.a_addr = cw.micro.a_addr + iter[ADDR_W-1:0];
        if (cw.inc.b) micro_out.b_addr = cw.micro.b_addr + iter[ADDR_W-1:0];
        if (cw.inc.c) micro_out.c_addr = cw.micro.c_addr + iter[ADDR_W-1:0];
        if (cw.inc.d) micro_out.d_addr = cw.micro.d_addr + iter[ADDR_W-1:0];
      end
    end
  end

  logic [15:0] lw;
  assign lw = cw.micro[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      pc         <= '0;
      loop_start <= '0;
      loop_end   <= '0;
      iter       <= '0;
      loop_last  <= '0;
      in_loop    <= 1'b0;
      drain_cnt  <= '0;
      loops_run  <= '0;
      req_seen   <= 1'b0;
      done_tog   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (req_a != req_seen) begin
          req_seen <= req_a;
          pc      <= start_h;
          in_loop <= 1'b0;
          state   <= RUN;
        end
        RUN: begin
          unique case (cw.kind)
            CW_LOOP: begin
              loop_start <= pc + 1'b1;
              loop_end   <= pc + PW'(lw[7:0]) + 1'b1;
              loop_last  <= lw[15:8];
              iter       <= '0;
              in_loop    <= 1'b1;
              loops_run  <= loops_run + 1'b1;
              pc         <= pc + 1'b1;
            end
            CW_MICRO: begin
              if (in_loop && pc == loop_end) begin
                if (iter == loop_last) begin
                  in_loop <= 1'b0;
                  pc      <= pc + 1'b1;
                end else begin
                  iter <= iter + 1'b1;
                  pc   <= loop_start;
                end
              end else begin
                pc <= pc + 1'b1;
              end
            end
            default: begin   // HALT
              in_loop   <= 1'b0;
              drain_cnt <= pipe_mode ? DW'(ROWS) : DW'(1);
              state     <= DRAIN;
            end
          endcase
        end
        DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == DW'(1)) begin
            state    <= IDLE;
            done_tog <= ~done_tog;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end


endmodule
