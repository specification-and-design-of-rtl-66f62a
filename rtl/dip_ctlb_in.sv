// dip_ctlb_in: input corner-turn line buffer (CTLB) for image bus A or B.
//
// Pixels arrive one WORD-bit word at a time from a DMA channel, but the
// array takes them one bit plane at a time: bit k of every row's pixel on
// the ROWS row lines, written into bit address base+k of the selected
// columns. The buffer collects ROWS words (one image column, word r for
// row r) and then "turns the corner", emitting WORD bit planes, one per
// array cycle. It is double buffered: one line fills while the other drains.
//
// The buffer also separates the two clocks of the chip. The word side and
// the configuration registers run on sys_clk (the RISC and external
// interface clock); the bit-plane side runs on clk (the array clock). Each
// of the two lines has a fill toggle (word side) and a drain toggle (array
// side); a line is full while they differ, and each side sees the other's
// toggle through a two-flop synchronizer. Configuration reaches the array
// side the same way, by a toggle that tells it to copy the held values.
//
// The column mask is the column select: every column whose bit is set takes
// the line, which broadcasts a kernel to many columns. In auto mode the mask
// rotates one column left after each line, so a single-bit mask walks an
// image in column by column.
//
// Corner turning, the row lines, the column select and the decoupling of
// the external clock from the array clock follow the description. The
// double buffer, the toggle handshakes, the auto-rotating mask and the
// register layout are this design's choices.
// Timing: a full line is drained in WORD array cycles, starting two to
// three array cycles after its last word is taken; lines_done counts lines
// the word side has seen drained.
module dip_ctlb_in
  import dip_pkg::*;
#(
  parameter int unsigned ROWS = 16,
  parameter int unsigned COLS = 16,
  parameter int unsigned WORD = 16
) (
  input  logic              clk,        // array clock
  input  logic              sys_clk,    // word side and configuration
  input  logic              rst_n,
  // configuration from the RISC (sys_clk)
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic              cfg_auto,
  input  logic              mask_we,
  input  logic [COLS-1:0]   mask_in,
  output logic [15:0]       lines_done,
  // word stream in (sys_clk)
  input  logic              in_valid,
  input  logic [WORD-1:0]   in_data,
  output logic              in_ready,
  // bit planes to the array (clk)
  output logic              arr_we,
  output logic [ADDR_W-1:0] arr_addr,
  output logic [ROWS-1:0]   arr_plane,
  output logic [COLS-1:0]   arr_col_en
);

  localparam int unsigned RI = $clog2(ROWS);
  localparam int unsigned KI = $clog2(WORD);

  logic [WORD-1:0] line [2][ROWS];

  // ---------------- word side (sys_clk) ----------------
  logic [1:0]        fill_tog, drain_tog_s, drain_seen;
  logic              fsel;
  logic [RI-1:0]     widx;
  logic [ADDR_W-1:0] base_h;
  logic              auto_h;
  logic [COLS-1:0]   mask_h;
  logic              cfg_tog, mask_tog;

  assign in_ready = ~(fill_tog[fsel] ^ drain_tog_s[fsel]);

  always_ff @(posedge sys_clk) begin
    if (in_valid && in_ready) line[fsel][widx] <= in_data;
  end

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_tog   <= '0;
      drain_seen <= '0;
      fsel       <= 1'b0;
      widx       <= '0;
      base_h     <= '0;
      auto_h     <= 1'b0;
      mask_h     <= '0;
      cfg_tog    <= 1'b0;
      mask_tog   <= 1'b0;
      lines_done <= '0;
    end else begin
      if (cfg_we) begin
        base_h  <= cfg_base;
        auto_h  <= cfg_auto;
        cfg_tog <= ~cfg_tog;
      end
      if (mask_we) begin
        mask_h   <= mask_in;
        mask_tog <= ~mask_tog;
      end
      if (in_valid && in_ready) begin
        widx <= widx + 1'b1;
        if (widx == RI'(ROWS - 1)) begin
          widx           <= '0;
          fill_tog[fsel] <= ~fill_tog[fsel];
          fsel           <= ~fsel;
        end
      end
      drain_seen <= drain_tog_s;
      lines_done <= lines_done + 16'($countones(drain_tog_s ^ drain_seen));
    end
  end

  // ---------------- plane side (clk) ----------------
  logic [1:0]        drain_tog, fill_tog_a;
  logic              dsel, cfg_tog_a, mask_tog_a, cfg_seen, mask_seen;
  logic [KI-1:0]     k;
  logic [ADDR_W-1:0] base;
  logic              auto_rot;
  logic [COLS-1:0]   mask;

  dip_sync #(.WIDTH(2)) u_sync_drain (.clk(sys_clk), .rst_n, .d(drain_tog), .q(drain_tog_s));
  dip_sync #(.WIDTH(4)) u_sync_fill  (.clk, .rst_n, .d({fill_tog, cfg_tog, mask_tog}),
                                      .q({fill_tog_a, cfg_tog_a, mask_tog_a}));

  assign arr_we     = fill_tog_a[dsel] ^ drain_tog[dsel];
  assign arr_addr   = base + ADDR_W'(k);
  assign arr_col_en = mask;

  always_comb begin
    for (int r = 0; r < ROWS; r++) arr_plane[r] = line[dsel][r][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain_tog <= '0;
      dsel      <= 1'b0;
      k         <= '0;
      base      <= '0;
      auto_rot  <= 1'b0;
      mask      <= '0;
      cfg_seen  <= 1'b0;
      mask_seen <= 1'b0;
    end else begin
      cfg_seen  <= cfg_tog_a;
      mask_seen <= mask_tog_a;
      if (cfg_tog_a != cfg_seen) begin
        base     <= base_h;
        auto_rot <= auto_h;
      end
      if (arr_we) begin
        k <= k + 1'b1;
        if (k == KI'(WORD - 1)) begin
          k               <= '0;
          drain_tog[dsel] <= ~drain_tog[dsel];
          dsel            <= ~dsel;
          if (auto_rot) mask <= {mask[COLS-2:0], mask[COLS-1]};
        end
      end
      // a mask written by the RISC wins over the automatic rotation
      if (mask_tog_a != mask_seen) mask <= mask_h;
    end
  end

endmodule
