// dip_ctlb_out: output corner-turn line buffer, for image bus C or row bus D.
//
// The array presents one bit plane at a time: for bus C, bit k of register
// C of every PE in one selected column (one bit per row line); for bus D,
// bit k of register C of every PE in one selected row (one bit per column
// line). This buffer reads WORD planes (bit addresses base .. base+WORD-1),
// one per array cycle, then turns the corner and emits LINES words, word i
// holding the WORD bits of line i. In auto mode the selected column (or row)
// steps by one after each line, so a run of n lines reads n neighbouring
// columns.
//
// Plane reads run on clk (the array clock); the configuration, the start
// and the word side run on sys_clk. A start copies base, auto, first line
// and line count into held registers and flips a request toggle. The array
// side sees the toggle through a synchronizer, latches the held values and
// fills lines. The buffer is double buffered: each of its two halves has a
// full toggle (array side, the half holds a line) and a done toggle (word
// side, the line has been sent), and the array side gathers the next line
// into one half while the word side sends the other.
//
// Corner turning, the single selected column/row and the decoupling of the
// clocks follow the description. Double buffering, the start/count
// interface, the toggle handshakes and the auto step are this design's
// choices. Timing: WORD array cycles to read a line, then one word per
// accepted handshake on sys_clk; with the consumer always ready and the
// array clock at least twice sys_clk, the gathers hide behind the words and
// a run of lines streams out at one word per sys_clk cycle. busy (sys_clk) is high from start until
// the last word of the last line has been taken.
module dip_ctlb_out
  import dip_pkg::*;
#(
  parameter int unsigned LINES = 16,   // bus lines (bits per plane)
  parameter int unsigned SEL_N = 16,   // columns (bus C) or rows (bus D) to choose from
  parameter int unsigned WORD  = 16
) (
  input  logic                     clk,       // array clock
  input  logic                     sys_clk,   // word side and configuration
  input  logic                     rst_n,
  // configuration from the RISC (sys_clk)
  input  logic                     cfg_we,
  input  logic [ADDR_W-1:0]        cfg_base,
  input  logic                     cfg_auto,
  input  logic                     sel_we,
  input  logic [$clog2(SEL_N)-1:0] sel_in,
  input  logic                     start,
  input  logic [7:0]               n_lines,
  output logic                     busy,
  // plane read from the array (clk)
  output logic [ADDR_W-1:0]        rd_addr,
  output logic [$clog2(SEL_N)-1:0] rd_sel,
  input  logic [LINES-1:0]         rd_plane,
  // word stream out (sys_clk)
  output logic                     out_valid,
  output logic [WORD-1:0]          out_data,
  input  logic                     out_ready
);

  localparam int unsigned LI = $clog2(LINES);
  localparam int unsigned KI = $clog2(WORD);
  localparam int unsigned SI = $clog2(SEL_N);

  logic [WORD-1:0] line [2][LINES];   // double buffer

  // ---------------- word side (sys_clk) ----------------
  logic [ADDR_W-1:0] base_h;
  logic              auto_h;
  logic [SI-1:0]     sel_h;
  logic [7:0]        n_h, left_s;
  logic              req_tog, osel;
  logic [1:0]        done_tog, full_tog_s;
  logic [LI-1:0]     oidx;

  assign busy      = (left_s != 8'd0);
  assign out_valid = busy && (full_tog_s[osel] != done_tog[osel]);
  assign out_data  = line[osel][oidx];

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      base_h   <= '0;
      auto_h   <= 1'b0;
      sel_h    <= '0;
      n_h      <= '0;
      left_s   <= '0;
      req_tog  <= 1'b0;
      done_tog <= '0;
      osel     <= 1'b0;
      oidx     <= '0;
    end else begin
      if (cfg_we) begin
        base_h <= cfg_base;
        auto_h <= cfg_auto;
      end
      if (sel_we) sel_h <= sel_in;
      if (start && !busy && n_lines != 8'd0) begin
        n_h     <= n_lines;
        left_s  <= n_lines;
        oidx    <= '0;
        req_tog <= ~req_tog;
      end
      if (out_valid && out_ready) begin
        oidx <= oidx + 1'b1;
        if (oidx == LI'(LINES - 1)) begin
          oidx     <= '0;
          done_tog[osel] <= ~done_tog[osel];
          osel     <= ~osel;
          left_s   <= left_s - 1'b1;
        end
      end
    end
  end

  // ---------------- plane side (clk) ----------------
  typedef enum logic [1:0] {IDLE, WAIT, GATHER} state_e;

  state_e            state;
  logic              req_a, req_seen, gsel;
  logic [1:0]        done_tog_a, full_tog;
  logic [KI-1:0]     k;
  logic [7:0]        left_a;
  logic [ADDR_W-1:0] base;
  logic              auto_step;
  logic [SI-1:0]     sel;

  dip_sync #(.WIDTH(3)) u_sync_a (.clk, .rst_n, .d({req_tog, done_tog}), .q({req_a, done_tog_a}));
  dip_sync #(.WIDTH(2)) u_sync_s (.clk(sys_clk), .rst_n, .d(full_tog), .q(full_tog_s));

  assign rd_addr = base + ADDR_W'(k);
  assign rd_sel  = sel;

  always_ff @(posedge clk) begin
    if (state == GATHER) begin
      for (int i = 0; i < LINES; i++) line[gsel][i][k] <= rd_plane[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      req_seen  <= 1'b0;
      full_tog  <= '0;
      gsel      <= 1'b0;
      k         <= '0;
      left_a    <= '0;
      base      <= '0;
      auto_step <= 1'b0;
      sel       <= '0;
    end else begin
      unique case (state)
        IDLE: if (req_a != req_seen) begin
          req_seen  <= req_a;
          base      <= base_h;
          auto_step <= auto_h;
          sel       <= sel_h;
          left_a    <= n_h;
          state     <= WAIT;
        end
        WAIT: if (done_tog_a[gsel] == full_tog[gsel]) begin   // this half is free
          k     <= '0;
          state <= GATHER;
        end
        GATHER: begin
          k <= k + 1'b1;
          if (k == KI'(WORD - 1)) begin
            full_tog[gsel] <= ~full_tog[gsel];
            gsel     <= ~gsel;
            left_a   <= left_a - 1'b1;
            if (auto_step) sel <= sel + 1'b1;
            state    <= (left_a == 8'd1) ? IDLE : WAIT;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
