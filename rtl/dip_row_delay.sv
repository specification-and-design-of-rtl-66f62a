// dip_row_delay: the instruction delay chain beside the PE array.
//
// Every micro-instruction issued by the array controller enters a chain of
// ROWS registers, one per array row, clocked by the array clock. In
// pipelined mode row r executes the output of stage r, so an instruction
// reaches row r one cycle after row r-1: the first row can start on bit k+1
// of a result while the row below works on bit k. In broadcast mode every
// row executes the output of stage 0, as in a conventional SIMD array.
//
// The chain of per-row delays and the pipelined/broadcast choice follow the
// description; that the mode is a single control bit and that reset fills
// the chain with no-operations are this design's choices.
// Latency: stage 0 is one cycle after the controller's output.
module dip_row_delay
  import dip_pkg::*;
#(
  parameter int unsigned ROWS = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  micro_t instr_in,
  input  logic   pipe_mode,   // 1: rows are staggered by one cycle each
  output micro_t row_instr [ROWS]
);

  micro_t stage [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) stage[r] <= MICRO_NOP;
    end else begin
      stage[0] <= instr_in;
      for (int r = 1; r < ROWS; r++) stage[r] <= stage[r-1];
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) row_instr[r] = pipe_mode ? stage[r] : stage[0];
  end

endmodule
