// dip_pe_array: the ROWS x COLS array of 1-bit processing elements.
//
// PEs are joined in a four-way nearest-neighbour mesh; links past the array
// edge read zero. Each row has its own micro-instruction input, so rows can
// run the same instruction at different times (pipelined mode) or at once.
//
// Image buses, as the corner-turn line buffers see them:
//   bus A, bus B  one line per row. A bit plane (one bit per row) is written
//                 into register A (or B) of the I/O bank at one bit address,
//                 in every column whose enable bit is set (column select).
//   bus C         one line per row. The PEs of one selected column drive the
//                 bit at c_addr of their I/O-bank register C onto the lines.
//   bus D         one line per column. The PEs of one selected row drive the
//                 bit at d_addr of their I/O-bank register C onto the lines.
// The tri-state drivers of the description are written as multiplexers.
// All bus reads are combinational; writes take effect on the clock edge.
module dip_pe_array
  import dip_pkg::*;
#(
  parameter int unsigned ROWS   = 16,
  parameter int unsigned COLS   = 16,
  parameter int unsigned A_BITS = 16,
  parameter int unsigned B_BITS = 32,
  parameter int unsigned C_BITS = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  micro_t                  row_instr [ROWS],
  input  logic                    pingpong,
  // bus A
  input  logic                    a_we,
  input  logic [ADDR_W-1:0]       a_addr,
  input  logic [ROWS-1:0]         a_plane,
  input  logic [COLS-1:0]         a_col_en,
  // bus B
  input  logic                    b_we,
  input  logic [ADDR_W-1:0]       b_addr,
  input  logic [ROWS-1:0]         b_plane,
  input  logic [COLS-1:0]         b_col_en,
  // bus C (column read-out)
  input  logic [ADDR_W-1:0]       c_addr,
  input  logic [$clog2(COLS)-1:0] c_col,
  output logic [ROWS-1:0]         c_plane,
  // bus D (row read-out towards the RISC)
  input  logic [ADDR_W-1:0]       d_addr,
  input  logic [$clog2(ROWS)-1:0] d_row,
  output logic [COLS-1:0]         d_plane
);

  logic [COLS-1:0] news  [ROWS];
  logic [COLS-1:0] flags [ROWS];
  logic [COLS-1:0] cbit  [ROWS];
  logic [COLS-1:0] dbit  [ROWS];
  // neighbour registers with a ring of zeros around the array edge
  logic [COLS+1:0] news_pad [ROWS+2];

  always_comb begin
    for (int r = 0; r < ROWS + 2; r++) news_pad[r] = '0;
    for (int r = 0; r < ROWS; r++) news_pad[r+1][COLS:1] = news[r];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic n_in, s_in, e_in, w_in;
      assign n_in = news_pad[r][c+1];
      assign s_in = news_pad[r+2][c+1];
      assign e_in = news_pad[r+1][c+2];
      assign w_in = news_pad[r+1][c];

      dip_pe #(.A_BITS(A_BITS), .B_BITS(B_BITS), .C_BITS(C_BITS)) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .instr    (row_instr[r]),
        .pingpong (pingpong),
        .n_in     (n_in),
        .s_in     (s_in),
        .e_in     (e_in),
        .w_in     (w_in),
        .news_out (news[r][c]),
        .flag     (flags[r][c]),
        .a_we     (a_we & a_col_en[c]),
        .a_addr   (a_addr),
        .a_bit    (a_plane[r]),
        .b_we     (b_we & b_col_en[c]),
        .b_addr   (b_addr),
        .b_bit    (b_plane[r]),
        .c_rd_addr(c_addr),
        .c_rd_bit (cbit[r][c]),
        .d_rd_addr(d_addr),
        .d_rd_bit (dbit[r][c])
      );
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) c_plane[r] = cbit[r][c_col];
    d_plane = dbit[d_row];
  end

  // The flag registers only act inside the PEs; they have no port here.
  logic unused_flags;
  always_comb begin
    unused_flags = 1'b0;
    for (int r = 0; r < ROWS; r++) unused_flags ^= ^flags[r];
  end

endmodule
