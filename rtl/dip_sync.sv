// dip_sync: two-flip-flop synchronizer for signals entering a clock domain.
//
// Each bit passes through two registers clocked by the receiving clock.
// Used for toggle handshakes between the array clock and the system clock
// and for quasi-static mode bits that software changes only while the
// array is idle. Multi-bit values must not change while they are being
// sampled, or must be carried by a toggle handshake. Latency: two edges of
// clk. Reset clears both stages.
//
// That the chip has two clocks (array, and RISC plus external interfaces)
// follows the description; how signals cross between them is this
// design's own choice.
module dip_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
