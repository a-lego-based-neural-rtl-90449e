// ext_bn: batch-normalization extension block.
//
// Computes f(x) = gamma * (x - mu) * inv_std + beta on one result of a NeuLego
// block, where inv_std = 1 / sqrt(sigma^2 + eps) is computed off line from the
// trained statistics and, like mu, gamma and beta, is read from the tile's
// weight memory. The datapath is the chain subtract, multiply by gamma,
// multiply by inv_std, add beta; every step saturates to the Q8.8 range.
// The result is registered when in_valid is high and out_valid follows one
// cycle later.
module ext_bn
  import dnnoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t x,
  input  data_t mu,
  input  data_t gamma,
  input  data_t inv_std,
  input  data_t beta,
  output data_t y,
  output logic  out_valid
);

  data_t centred, scaled, normed;

  always_comb begin
    centred = sat(64'(x) - 64'(mu));
    scaled  = fx_mul(centred, gamma);
    normed  = fx_mul(scaled, inv_std);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sat(64'(normed) + 64'(beta));
    end
  end

endmodule
