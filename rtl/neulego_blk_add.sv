// neulego_blk_add: addition NeuLego block (element-wise sum, e.g. the
// shortcut connection of a residual network).
//
// The block adds its two operands, lane 0 and lane 1 of the batch it is given,
// and registers the saturated sum. Unlike the other blocks it keeps nothing
// from one iteration to the next: there is no feedback multiplexer, and each
// batch yields a complete result. result_valid pulses after the batch marked
// last. A disabled lane counts as zero.
//
// Timing: result one cycle after the batch. Which lanes carry the operands is
// this design's choice; the tile's receive addressing places the two operand
// streams there.
module neulego_blk_add
  import dnnoc_pkg::*;
#(
  parameter int unsigned BATCH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  logic [BATCH-1:0] lane_en,
  input  data_t            x [BATCH],
  output data_t            result,
  output logic             result_valid
);

  data_t a, b;
  logic  unused_first;

  assign unused_first = first;

  always_comb begin
    a = lane_en[0] ? x[0] : '0;
    b = (BATCH > 1 && lane_en[1 % BATCH]) ? x[1 % BATCH] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= in_valid && last;
      if (in_valid) result <= sat(64'(a) + 64'(b));
    end
  end

endmodule
