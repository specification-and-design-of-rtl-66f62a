// dip_dma: one of the three DMA channels between the chip and its
// off-chip image caches.
//
// To begin a transfer the RISC writes the channel's four descriptor words
// and a word count, then GO. The channel sends the four words, one per
// handshake, to the off-chip DMA controller, which reads them as the
// transfer's source and destination (their meaning is left to that
// controller). It then moves COUNT words from its source stream to its
// destination stream: for the two input channels the source is the off-chip
// cache and the destination an input corner-turn buffer; for the output
// channel the source is the output corner-turn buffer. busy stays high until
// the last word has moved.
//
// Three channels and the four user-defined descriptor words follow the
// description. The register layout, the word count and the valid/ready
// handshakes are this design's choices.
//
// Timing: one clock (the system clock in the chip). Register writes are
// taken only while idle. After GO, each descriptor word takes one cycle
// with desc_ready high, and each data word one cycle with src_valid and
// dst_ready both high; the data path is combinational (dst_data is
// src_data), so a word passes in the cycle it is offered.
module dip_dma
  import dip_pkg::*;
#(
  parameter int unsigned WORD = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // RISC register access
  input  logic            reg_we,
  input  logic [2:0]      reg_addr,
  input  logic [15:0]     reg_wdata,
  output logic            busy,
  // descriptor words to the off-chip DMA controller
  output logic [15:0]     desc_data,
  output logic            desc_valid,
  input  logic            desc_ready,
  // data stream
  input  logic            src_valid,
  input  logic [WORD-1:0] src_data,
  output logic            src_ready,
  output logic            dst_valid,
  output logic [WORD-1:0] dst_data,
  input  logic            dst_ready
);

  typedef enum logic [1:0] {IDLE, DESC, XFER} state_e;

  state_e      state;
  logic [15:0] desc [4];
  logic [15:0] count, left;
  logic [1:0]  didx;

  assign busy       = (state != IDLE);
  assign desc_valid = (state == DESC);
  assign desc_data  = desc[didx];
  assign dst_valid  = (state == XFER) && src_valid;
  assign src_ready  = (state == XFER) && dst_ready;
  assign dst_data   = src_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      for (int i = 0; i < 4; i++) desc[i] <= '0;
      count <= '0;
      left  <= '0;
      didx  <= '0;
    end else begin
      if (reg_we && state == IDLE) begin
        if (reg_addr < DMA_COUNT) desc[reg_addr[1:0]] <= reg_wdata;
        if (reg_addr == DMA_COUNT) count <= reg_wdata;
        if (reg_addr == DMA_GO) begin
          didx  <= '0;
          left  <= count;
          state <= DESC;
        end
      end
      unique case (state)
        DESC: if (desc_ready) begin
          didx <= didx + 1'b1;
          if (didx == 2'd3) state <= (left == '0) ? IDLE : XFER;
        end
        XFER: if (src_valid && dst_ready) begin
          left <= left - 1'b1;
          if (left == 16'd1) state <= IDLE;
        end
        default: ;
      endcase
    end
  end

  // A data handshake only ever happens inside a transfer.
  a_no_stray_xfer: assert property (@(posedge clk) disable iff (!rst_n)
    (dst_valid && dst_ready) |-> (state == XFER));

endmodule
