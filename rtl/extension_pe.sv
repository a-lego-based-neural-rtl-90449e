// extension_pe: post-processing of the NUM_BLK results of a NeuLego PE.
//
// One batch-normalisation extension block and one ReLU extension block per
// NeuLego block, in that order (convolution -> BN -> ReLU). Their parameters
// come from the weight memory of the tile. Each stage can be switched off at
// run time (bn_en, relu_en); a switched-off BN stage is fed the neutral
// parameters (mean 0, gamma 1, inv_std 1, beta 0), a switched-off ReLU stage is
// replaced by a plain register, so the latency is always two cycles from
// in_valid to out_valid. Putting both extension PEs in every tile and enabling
// them per run is this design's choice; the document attaches them to a PE
// when its layer needs them.
module extension_pe
  import dnnoc_pkg::*;
#(
  parameter int unsigned NUM_BLK = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  bn_en,
  input  logic  relu_en,
  input  data_t x   [NUM_BLK],
  input  data_t prm [NUM_BLK][NPARAM],
  output data_t y   [NUM_BLK],
  output logic  out_valid
);

  localparam data_t ONE = data_t'(1 << FRAC_W);

  data_t bn_y   [NUM_BLK];
  data_t relu_y [NUM_BLK];
  data_t pass_q [NUM_BLK];
  logic  [NUM_BLK-1:0] bn_v, relu_v;
  logic  relu_en_q;

  for (genvar b = 0; b < NUM_BLK; b++) begin : g_ext
    ext_bn u_bn (
      .clk, .rst_n, .in_valid,
      .x      (x[b]),
      .mu     (bn_en ? prm[b][PRM_MU]     : data_t'(0)),
      .gamma  (bn_en ? prm[b][PRM_GAMMA]  : ONE),
      .inv_std(bn_en ? prm[b][PRM_INVSTD] : ONE),
      .beta   (bn_en ? prm[b][PRM_BETA]   : data_t'(0)),
      .y      (bn_y[b]),
      .out_valid(bn_v[b]));

    ext_relu u_relu (
      .clk, .rst_n, .in_valid(bn_v[b]), .x(bn_y[b]), .y(relu_y[b]), .out_valid(relu_v[b]));

    always_ff @(posedge clk) if (bn_v[b]) pass_q[b] <= bn_y[b];

    assign y[b] = relu_en_q ? relu_y[b] : pass_q[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       relu_en_q <= 1'b0;
    else if (bn_v[0]) relu_en_q <= relu_en;
  end

  assign out_valid = relu_v[0];

endmodule
