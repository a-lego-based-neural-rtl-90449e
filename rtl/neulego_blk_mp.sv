// neulego_blk_mp: max-pooling NeuLego block.
//
// Each computing iteration presents one batch of up to BATCH input values
// (lanes whose lane_en bit is clear are ignored). The block takes the maximum
// of the batch and of the partial maximum kept from the previous iterations;
// on the first batch the feedback multiplexer selects the reset value instead.
// When the last batch has been folded in, the global maximum is captured in the
// output register and result_valid pulses for one cycle.
//
// Timing: one batch per clock; result one cycle after the batch marked last.
// The batch/feedback structure follows the MP block of the NeuLego block pool.
// The reset value is the most negative data word, so that negative inputs pool
// correctly (a constant 0 gives the same result for the non-negative data that
// follow a ReLU).
module neulego_blk_mp
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

  data_t part_q;      // partial maximum of earlier iterations
  data_t batch_max;
  data_t folded;

  always_comb begin
    batch_max = DATA_MIN;
    for (int unsigned i = 0; i < BATCH; i++)
      if (lane_en[i] && x[i] > batch_max) batch_max = x[i];
    folded = first ? batch_max : ((part_q > batch_max) ? part_q : batch_max);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_q       <= DATA_MIN;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= in_valid && last;
      if (in_valid) begin
        part_q <= last ? DATA_MIN : folded;
        if (last) result <= folded;
      end
    end
  end

endmodule
