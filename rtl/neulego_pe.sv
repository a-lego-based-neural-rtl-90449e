// neulego_pe: a NeuLego processing element, NUM_BLK identical NeuLego blocks
// of one kind (KIND) working in parallel under one block controller.
//
// MP and ADD PEs are memory-less: their blocks take only input data. MA and
// GAP PEs are memory-based: their blocks also take weights (MA) or the stored
// reciprocal (GAP) from the tile's weight memory. The block controller, started
// by the tile's PE controller, reads batch line 0 .. iters-1 of the data buffer
// (and of the weight memory) and hands line k to every block, marking the first
// and last line; in the last line only the first last_lanes lanes are enabled
// (0 means all). Each block keeps its partial result, captures the final one in
// its output register and is ready for the next run.
//
// Timing: line reads take one cycle, so a run of K iterations takes K + 2
// cycles from start to the done pulse; results stay on result until the next
// run. The document has one block controller per block; as all blocks of a PE
// always run the same number of iterations, one shared controller is used here.
module neulego_pe
  import dnnoc_pkg::*;
#(
  parameter pe_kind_e    KIND    = PE_MA,
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned BATCH   = 32,
  parameter int unsigned LINES   = 16,
  localparam int unsigned LW     = clog2_min1(LINES),
  localparam int unsigned IW     = $clog2(LINES + 1),
  localparam int unsigned BW     = $clog2(BATCH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] iters,
  input  logic [BW-1:0] last_lanes,
  output logic          rd_en,
  output logic [LW-1:0] rd_line,
  input  data_t         x_line [NUM_BLK][BATCH],
  input  data_t         w_line [NUM_BLK][BATCH],
  input  data_t         prm    [NUM_BLK][NPARAM],
  output data_t         result [NUM_BLK],
  output logic          done,
  output logic          busy
);

  logic [IW-1:0]    cnt_q, iters_q;
  logic             issuing_q;
  logic             v_q, first_q, last_q;
  logic [BATCH-1:0] lane_en;
  logic [NUM_BLK-1:0] rv;

  assign rd_en   = issuing_q;
  assign rd_line = LW'(cnt_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      iters_q   <= IW'(1);
      issuing_q <= 1'b0;
      v_q       <= 1'b0;
      first_q   <= 1'b0;
      last_q    <= 1'b0;
      busy      <= 1'b0;
    end else begin
      v_q     <= issuing_q;
      first_q <= issuing_q && cnt_q == '0;
      last_q  <= issuing_q && cnt_q == iters_q - 1'b1;
      if (start && !busy) begin
        busy      <= 1'b1;
        issuing_q <= 1'b1;
        cnt_q     <= '0;
        iters_q   <= (iters == '0) ? IW'(1) : ((iters > IW'(LINES)) ? IW'(LINES) : iters);
      end else if (issuing_q) begin
        if (cnt_q == iters_q - 1'b1) issuing_q <= 1'b0;
        else                         cnt_q <= cnt_q + 1'b1;
      end
      if (done) busy <= 1'b0;
    end
  end

  always_comb begin
    for (int unsigned l = 0; l < BATCH; l++)
      lane_en[l] = !last_q || last_lanes == '0 || BW'(l) < last_lanes;
  end

  assign done = rv[0];

  for (genvar b = 0; b < NUM_BLK; b++) begin : g_blk
    if (KIND == PE_MA) begin : g_ma
      neulego_blk_ma #(.BATCH(BATCH)) u_blk (
        .clk, .rst_n, .in_valid(v_q), .first(first_q), .last(last_q), .lane_en,
        .x(x_line[b]), .w(w_line[b]), .result(result[b]), .result_valid(rv[b]));
    end else if (KIND == PE_GAP) begin : g_gap
      neulego_blk_gap #(.BATCH(BATCH)) u_blk (
        .clk, .rst_n, .in_valid(v_q), .first(first_q), .last(last_q), .lane_en,
        .x(x_line[b]), .recip(prm[b][PRM_RECIP]), .result(result[b]), .result_valid(rv[b]));
    end else if (KIND == PE_MP) begin : g_mp
      neulego_blk_mp #(.BATCH(BATCH)) u_blk (
        .clk, .rst_n, .in_valid(v_q), .first(first_q), .last(last_q), .lane_en,
        .x(x_line[b]), .result(result[b]), .result_valid(rv[b]));
    end else begin : g_add
      neulego_blk_add #(.BATCH(BATCH)) u_blk (
        .clk, .rst_n, .in_valid(v_q), .first(first_q), .last(last_q), .lane_en,
        .x(x_line[b]), .result(result[b]), .result_valid(rv[b]));
    end
  end

endmodule
