// neulego_blk_gap: global-average-pooling NeuLego block.
//
// Each computing iteration adds the enabled lanes of one batch to a running
// sum (the feedback multiplexer selects zero on the first batch). After the
// batch marked last, the sum is multiplied by a reciprocal word read from the
// tile's weight memory (1 / number of inputs, in the same Q8.8 format as the
// data) and the saturated average is registered; result_valid pulses once.
//
// Timing: one batch per clock; result one cycle after the last batch. GAP is a
// memory-based block; taking the divisor as a stored reciprocal, so that no
// divider is needed, is this design's own choice.
module neulego_blk_gap
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
  input  data_t            recip,
  output data_t            result,
  output logic             result_valid
);

  localparam int unsigned ACC_W = 40;

  logic signed [ACC_W-1:0] sum_q;
  logic signed [ACC_W-1:0] batch_sum;
  logic signed [ACC_W-1:0] folded;
  logic signed [63:0]      scaled;

  always_comb begin
    batch_sum = '0;
    for (int unsigned i = 0; i < BATCH; i++)
      if (lane_en[i]) batch_sum += ACC_W'(x[i]);
    folded = (first ? '0 : sum_q) + batch_sum;
    scaled = (64'(folded) * 64'(recip)) >>> FRAC_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q        <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= in_valid && last;
      if (in_valid) begin
        sum_q <= last ? '0 : folded;
        if (last) result <= sat(scaled);
      end
    end
  end

endmodule
