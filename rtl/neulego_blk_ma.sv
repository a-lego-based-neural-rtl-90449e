// neulego_blk_ma: multiply-accumulate NeuLego block.
//
// Each computing iteration multiplies one batch of inputs lane by lane with
// the matching batch of weights from the tile's weight memory, sums the
// products of the enabled lanes and adds the sum to the accumulator (the
// feedback multiplexer selects zero on the first batch). After the batch
// marked last, the accumulator is rescaled from Q16.16 to Q8.8, saturated and
// registered; result_valid pulses once. The same block serves convolution
// (one output channel position per run) and dense layers (one neuron per run).
//
// Timing: one batch per clock; result one cycle after the last batch. The
// accumulator width (48 bits) is this design's choice and is wide enough for
// 2^16 products.
module neulego_blk_ma
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
  input  data_t            w [BATCH],
  output data_t            result,
  output logic             result_valid
);

  localparam int unsigned ACC_W = 48;

  logic signed [ACC_W-1:0] acc_q;
  logic signed [ACC_W-1:0] batch_sum;
  logic signed [ACC_W-1:0] folded;

  always_comb begin
    batch_sum = '0;
    for (int unsigned i = 0; i < BATCH; i++)
      if (lane_en[i]) batch_sum += ACC_W'(x[i]) * ACC_W'(w[i]);
    folded = (first ? '0 : acc_q) + batch_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q        <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= in_valid && last;
      if (in_valid) begin
        acc_q <= last ? '0 : folded;
        if (last) result <= sat(64'(folded >>> FRAC_W));
      end
    end
  end

endmodule
