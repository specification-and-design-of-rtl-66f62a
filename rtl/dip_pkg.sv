// dip_pkg: types and constants shared by the DIP image processing chip.
//
// The chip pairs a 16-bit RISC controller with a 16x16 array of 1-bit
// processing elements (PEs). This package defines the array micro-instruction
// that every PE row executes, the control words held in the array instruction
// memory, and the I/O port map the RISC uses to reach the rest of the chip.
// Array size, PE register sizes (A 16, B 32, C 32 bits per bank) and the
// 16-bit word come from the design description; the instruction encoding and
// the port map are this implementation's own. The package holds no logic
// and has no timing; every port the RISC reaches takes one system-clock
// cycle per IN or OUT.
package dip_pkg;

  localparam int unsigned WORD_W = 16;   // RISC word and image bus width
  localparam int unsigned ADDR_W = 5;    // PE RAM bit address (B and C hold 32 bits)

  // Operand 0 of the bit-serial adder: the PE's RAM A bit, a neighbour's
  // output bit, or a constant.
  typedef enum logic [2:0] {
    S0_RAM_A = 3'd0,
    S0_NORTH = 3'd1,
    S0_SOUTH = 3'd2,
    S0_EAST  = 3'd3,
    S0_WEST  = 3'd4,
    S0_ZERO  = 3'd5,
    S0_ONE   = 3'd6
  } src0_e;

  // Operand 1: RAM B bit, RAM A bit or zero.
  typedef enum logic [1:0] {
    S1_RAM_B = 2'd0,
    S1_RAM_A = 2'd1,
    S1_ZERO  = 2'd2
  } src1_e;

  // Operand 2 (carry/borrow in): RAM C bit or a constant.
  typedef enum logic [1:0] {
    S2_RAM_C = 2'd0,
    S2_ZERO  = 2'd1,
    S2_ONE   = 2'd2
  } src2_e;

  // Where the ALU output bit is written.
  typedef enum logic [2:0] {
    DST_NONE = 3'd0,
    DST_A    = 3'd1,
    DST_B    = 3'd2,
    DST_C    = 3'd3,
    DST_FLAG = 3'd4
  } dst_e;

  // One array micro-instruction, as seen by one row of PEs.
  typedef struct packed {
    logic              sub;      // 1: subtract (borrow), 0: add (carry)
    logic              carry;    // 1: ALU output is carry/borrow, 0: sum/difference
    src0_e             src0;
    src1_e             src1;
    src2_e             src2;
    logic [ADDR_W-1:0] a_addr;
    logic [ADDR_W-1:0] b_addr;
    logic [ADDR_W-1:0] c_addr;
    dst_e              dst;
    logic [ADDR_W-1:0] d_addr;
    logic              news_we;  // latch the ALU output into the neighbour register
  } micro_t;

  localparam micro_t MICRO_NOP = '{
    sub: 1'b0, carry: 1'b0, src0: S0_ZERO, src1: S1_ZERO, src2: S2_ZERO,
    a_addr: '0, b_addr: '0, c_addr: '0, dst: DST_NONE, d_addr: '0, news_we: 1'b0};

  // Control word kinds in the array instruction memory.
  typedef enum logic [1:0] {
    CW_MICRO = 2'd0,   // issue one micro-instruction (repeatedly inside a loop)
    CW_LOOP  = 2'd1,   // repeat the next LEN words COUNT times
    CW_HALT  = 2'd2    // end of array program
  } cw_kind_e;

  // Address increment flags: inside a loop, iteration i adds i to each
  // flagged address, so one loop body walks the bits of an M-bit number.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } inc_t;

  typedef struct packed {
    cw_kind_e kind;
    inc_t     inc;
    micro_t   micro;   // for CW_LOOP: micro[15:8] = COUNT-1, micro[7:0] = LEN-1
  } cword_t;

  localparam int unsigned CWORD_W = $bits(cword_t);

  // RISC I/O port map (8-bit port numbers).
  localparam logic [7:0] P_ARR_START  = 8'h00; // W: start array program at address; R: busy
  localparam logic [7:0] P_ARR_MODE   = 8'h02; // W/R: bit0 pingpong, bit1 pipelined rows
  localparam logic [7:0] P_DMA_BASE   = 8'h10; // channel n at 0x10 + 8n
  localparam logic [7:0] P_CTA_CFG    = 8'h28; // W: {auto[5], base[4:0]}; R: lines written
  localparam logic [7:0] P_CTA_MASK   = 8'h29; // W: column mask
  localparam logic [7:0] P_CTB_CFG    = 8'h2C;
  localparam logic [7:0] P_CTB_MASK   = 8'h2D;
  localparam logic [7:0] P_CTC_CFG    = 8'h30; // W: {auto[5], base[4:0]}
  localparam logic [7:0] P_CTC_SEL    = 8'h31; // W: first column
  localparam logic [7:0] P_CTC_START  = 8'h32; // W: number of lines, starts; R: busy
  localparam logic [7:0] P_CTD_CFG    = 8'h34;
  localparam logic [7:0] P_CTD_SEL    = 8'h35; // W: first row
  localparam logic [7:0] P_CTD_START  = 8'h36;
  localparam logic [7:0] P_CTD_POP    = 8'h37; // R: next word from the row bus buffer
  localparam logic [7:0] P_CTD_AVAIL  = 8'h38; // R: 1 when a word is waiting
  localparam logic [7:0] P_STREAM     = 8'h3E; // W: 1-D output stream; R: 1-D input stream
  localparam logic [7:0] P_LOOPS      = 8'h3F; // R: array LOOP words run since reset

  // DMA channel register offsets (added to P_DMA_BASE + 8*channel).
  localparam logic [2:0] DMA_DESC0 = 3'd0;     // 0..3: the four descriptor words
  localparam logic [2:0] DMA_COUNT = 3'd4;     // words to move
  localparam logic [2:0] DMA_GO    = 3'd5;     // W: start; R: busy

endpackage
