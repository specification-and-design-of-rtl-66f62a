// dip_chip: top level of the DIP (Digital Image Processor) chip.
//
// A 16-bit RISC controls a 16x16 array of 1-bit processing elements that
// accelerates correlation and convolution: the array forms local products
// and sums them down its columns, and the RISC adds up the column results.
// The array has its own instruction memory and sequencer; its micro-
// instructions pass down a per-row delay chain, so in pipelined mode each row
// runs one cycle behind the row above and a column accumulation produces one
// result bit per cycle at the bottom row. Image data reaches the array over
// two input buses (A, B) and leaves over one output bus (C), each through a
// corner-turn line buffer fed by a DMA channel; a fourth buffer on the row
// bus (D) carries one array row to the RISC. Each PE has two register banks,
// so buses and computation use different banks at the same time; the
// pingpong bit swaps them.
//
// Blocks and connections follow the description; the register map of the
// RISC's I/O ports (dip_pkg) and the handshakes are this design's choices.
// Two clocks, as in the described chip: clk drives the array, its
// controller and the bit-plane side of the line buffers; sys_clk drives the
// RISC, the DMA channels, the word side of the line buffers and every
// external interface (the described chip ran them at 40 and 20 MHz). The
// clocks may be unrelated. The line buffers and the controller's start/busy
// cross between them with toggle handshakes; the pingpong and pipelined-mode
// bits cross through a two-flop synchronizer and must only be changed while
// the array is idle, as must the loop counter be read only then.
//
// External interfaces (all on sys_clk): two instruction buses (RISC program, array program),
// a 1-D word stream in and out of the RISC, and per DMA channel a descriptor
// output plus a data stream (channels 0 and 1 in, channel 2 out), all with
// valid/ready handshakes.
module dip_chip
  import dip_pkg::*;
#(
  parameter int unsigned ROWS        = 16,
  parameter int unsigned COLS        = 16,
  parameter int unsigned A_BITS      = 16,
  parameter int unsigned B_BITS      = 32,
  parameter int unsigned C_BITS      = 32,
  parameter int unsigned ARR_DEPTH   = 256,
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_DEPTH  = 256
) (
  input  logic                          clk,       // array clock
  input  logic                          sys_clk,   // RISC and external interface clock
  input  logic                          rst_n,
  // RISC instruction bus and run control
  input  logic                          risc_il_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] risc_il_addr,
  input  logic [15:0]                   risc_il_data,
  input  logic                          risc_run,
  output logic                          risc_halted,
  // array instruction bus
  input  logic                          arr_il_we,
  input  logic [$clog2(ARR_DEPTH)-1:0]  arr_il_addr,
  input  cword_t                        arr_il_data,
  // 1-D I/O stream of the RISC
  output logic [15:0]                   stream_out,
  output logic                          stream_out_valid,
  input  logic [15:0]                   stream_in,
  // DMA descriptor words, one set per channel
  output logic [15:0]                   desc_data  [3],
  output logic [2:0]                    desc_valid,
  input  logic [2:0]                    desc_ready,
  // DMA channels 0 and 1: image data in (to buses A and B)
  input  logic [15:0]                   in_data    [2],
  input  logic [1:0]                    in_valid,
  output logic [1:0]                    in_ready,
  // DMA channel 2: image data out (from bus C)
  output logic [15:0]                   out_data,
  output logic                          out_valid,
  input  logic                          out_ready
);

  // ---------------- RISC and its I/O decode ----------------
  logic [7:0]  io_addr;
  logic [15:0] io_wdata, io_rdata;
  logic        io_we, io_re;

  dip_risc #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_risc (
    .clk(sys_clk), .rst_n,
    .il_we(risc_il_we), .il_addr(risc_il_addr), .il_data(risc_il_data),
    .run(risc_run), .halted(risc_halted),
    .io_addr, .io_wdata, .io_we, .io_re, .io_rdata
  );

  function automatic logic wr(input logic [7:0] port);
    return io_we && io_addr == port;
  endfunction

  logic pingpong_s, pipe_mode_s, pingpong, pipe_mode;
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      pingpong_s       <= 1'b0;
      pipe_mode_s      <= 1'b0;
      stream_out       <= '0;
      stream_out_valid <= 1'b0;
    end else begin
      stream_out_valid <= 1'b0;
      if (wr(P_ARR_MODE)) {pipe_mode_s, pingpong_s} <= io_wdata[1:0];
      if (wr(P_STREAM)) begin
        stream_out       <= io_wdata;
        stream_out_valid <= 1'b1;
      end
    end
  end

  dip_sync #(.WIDTH(2)) u_sync_mode (.clk, .rst_n, .d({pipe_mode_s, pingpong_s}),
                                     .q({pipe_mode, pingpong}));

  // ---------------- array controller, delay chain, PE array ----------------
  logic   arr_busy;
  micro_t issued;
  micro_t row_instr [ROWS];
  logic [15:0] loops_run;

  dip_array_ctrl #(.DEPTH(ARR_DEPTH), .ROWS(ROWS)) u_ctrl (
    .clk, .sys_clk, .rst_n,
    .ld_we(arr_il_we), .ld_addr(arr_il_addr), .ld_data(arr_il_data),
    .start(wr(P_ARR_START)), .start_addr(io_wdata[$clog2(ARR_DEPTH)-1:0]),
    .pipe_mode, .busy(arr_busy), .micro_out(issued), .loops_run
  );

  dip_row_delay #(.ROWS(ROWS)) u_delay (
    .clk, .rst_n, .instr_in(issued), .pipe_mode, .row_instr
  );

  logic                    a_we, b_we;
  logic [ADDR_W-1:0]       a_addr, b_addr, c_addr, d_addr;
  logic [ROWS-1:0]         a_plane, b_plane, c_plane;
  logic [COLS-1:0]         a_col_en, b_col_en, d_plane;
  logic [$clog2(COLS)-1:0] c_col;
  logic [$clog2(ROWS)-1:0] d_row;

  dip_pe_array #(.ROWS(ROWS), .COLS(COLS), .A_BITS(A_BITS), .B_BITS(B_BITS),
                 .C_BITS(C_BITS)) u_array (
    .clk, .rst_n, .row_instr, .pingpong,
    .a_we, .a_addr, .a_plane, .a_col_en,
    .b_we, .b_addr, .b_plane, .b_col_en,
    .c_addr, .c_col, .c_plane,
    .d_addr, .d_row, .d_plane
  );

  // ---------------- DMA channels and corner-turn buffers ----------------
  logic [2:0]  dma_busy;
  logic [15:0] dma_dst_data [2];
  logic [1:0]  dma_dst_valid, cta_ready;
  logic [15:0] lines_a, lines_b;
  logic        ctc_valid, ctc_ready, ctc_busy, ctd_valid, ctd_busy;
  logic [15:0] ctc_data, ctd_data;

  for (genvar ch = 0; ch < 2; ch++) begin : g_in_dma
    dip_dma #(.WORD(16)) u_dma (
      .clk(sys_clk), .rst_n,
      .reg_we(io_we && io_addr[7:3] == P_DMA_BASE[7:3] + 5'(ch)),
      .reg_addr(io_addr[2:0]), .reg_wdata(io_wdata), .busy(dma_busy[ch]),
      .desc_data(desc_data[ch]), .desc_valid(desc_valid[ch]), .desc_ready(desc_ready[ch]),
      .src_valid(in_valid[ch]), .src_data(in_data[ch]), .src_ready(in_ready[ch]),
      .dst_valid(dma_dst_valid[ch]), .dst_data(dma_dst_data[ch]), .dst_ready(cta_ready[ch])
    );
  end

  dip_dma #(.WORD(16)) u_dma_out (
    .clk(sys_clk), .rst_n,
    .reg_we(io_we && io_addr[7:3] == P_DMA_BASE[7:3] + 5'd2),
    .reg_addr(io_addr[2:0]), .reg_wdata(io_wdata), .busy(dma_busy[2]),
    .desc_data(desc_data[2]), .desc_valid(desc_valid[2]), .desc_ready(desc_ready[2]),
    .src_valid(ctc_valid), .src_data(ctc_data), .src_ready(ctc_ready),
    .dst_valid(out_valid), .dst_data(out_data), .dst_ready(out_ready)
  );

  dip_ctlb_in #(.ROWS(ROWS), .COLS(COLS), .WORD(16)) u_cta (
    .clk, .sys_clk, .rst_n,
    .cfg_we(wr(P_CTA_CFG)), .cfg_base(io_wdata[ADDR_W-1:0]), .cfg_auto(io_wdata[5]),
    .mask_we(wr(P_CTA_MASK)), .mask_in(io_wdata[COLS-1:0]), .lines_done(lines_a),
    .in_valid(dma_dst_valid[0]), .in_data(dma_dst_data[0]), .in_ready(cta_ready[0]),
    .arr_we(a_we), .arr_addr(a_addr), .arr_plane(a_plane), .arr_col_en(a_col_en)
  );

  dip_ctlb_in #(.ROWS(ROWS), .COLS(COLS), .WORD(16)) u_ctb (
    .clk, .sys_clk, .rst_n,
    .cfg_we(wr(P_CTB_CFG)), .cfg_base(io_wdata[ADDR_W-1:0]), .cfg_auto(io_wdata[5]),
    .mask_we(wr(P_CTB_MASK)), .mask_in(io_wdata[COLS-1:0]), .lines_done(lines_b),
    .in_valid(dma_dst_valid[1]), .in_data(dma_dst_data[1]), .in_ready(cta_ready[1]),
    .arr_we(b_we), .arr_addr(b_addr), .arr_plane(b_plane), .arr_col_en(b_col_en)
  );

  dip_ctlb_out #(.LINES(ROWS), .SEL_N(COLS), .WORD(16)) u_ctc (
    .clk, .sys_clk, .rst_n,
    .cfg_we(wr(P_CTC_CFG)), .cfg_base(io_wdata[ADDR_W-1:0]), .cfg_auto(io_wdata[5]),
    .sel_we(wr(P_CTC_SEL)), .sel_in(io_wdata[$clog2(COLS)-1:0]),
    .start(wr(P_CTC_START)), .n_lines(io_wdata[7:0]), .busy(ctc_busy),
    .rd_addr(c_addr), .rd_sel(c_col), .rd_plane(c_plane),
    .out_valid(ctc_valid), .out_data(ctc_data), .out_ready(ctc_ready)
  );

  dip_ctlb_out #(.LINES(COLS), .SEL_N(ROWS), .WORD(16)) u_ctd (
    .clk, .sys_clk, .rst_n,
    .cfg_we(wr(P_CTD_CFG)), .cfg_base(io_wdata[ADDR_W-1:0]), .cfg_auto(io_wdata[5]),
    .sel_we(wr(P_CTD_SEL)), .sel_in(io_wdata[$clog2(ROWS)-1:0]),
    .start(wr(P_CTD_START)), .n_lines(io_wdata[7:0]), .busy(ctd_busy),
    .rd_addr(d_addr), .rd_sel(d_row), .rd_plane(d_plane),
    .out_valid(ctd_valid), .out_data(ctd_data),
    .out_ready(io_re && io_addr == P_CTD_POP)
  );

  // ---------------- I/O read mux ----------------
  always_comb begin
    io_rdata = '0;
    unique case (io_addr)
      P_ARR_START: io_rdata = {15'd0, arr_busy};
      P_ARR_MODE:  io_rdata = {14'd0, pipe_mode_s, pingpong_s};
      8'h15:       io_rdata = {15'd0, dma_busy[0]};
      8'h1D:       io_rdata = {15'd0, dma_busy[1]};
      8'h25:       io_rdata = {15'd0, dma_busy[2]};
      P_CTA_CFG:   io_rdata = lines_a;
      P_CTB_CFG:   io_rdata = lines_b;
      P_CTC_START: io_rdata = {15'd0, ctc_busy};
      P_CTD_START: io_rdata = {15'd0, ctd_busy};
      P_CTD_POP:   io_rdata = ctd_data;
      P_CTD_AVAIL: io_rdata = {15'd0, ctd_valid};
      P_STREAM:    io_rdata = stream_in;
      P_LOOPS:     io_rdata = loops_run;
      default:     io_rdata = '0;
    endcase
  end

endmodule
