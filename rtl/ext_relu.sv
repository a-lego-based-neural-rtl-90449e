// ext_relu: ReLU extension block, f(x) = max(0, x).
//
// A comparison against the constant zero picks the larger value, which is
// registered when in_valid is high; out_valid follows one cycle later.
module ext_relu
  import dnnoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t x,
  output data_t y,
  output logic  out_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= (x > 0) ? x : '0;
    end
  end

endmodule
