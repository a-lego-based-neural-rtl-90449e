// weight_memory: the local weight memory of a DNNoC tile.
//
// One bank per NeuLego block. A bank holds WLINES lines of BATCH weights,
// followed by NPARAM parameter words (batch-norm mean, gamma, 1/sqrt(var+eps),
// beta, and the GAP reciprocal; see dnnoc_pkg). Weights are written one word at
// a time by the global controller at a flat, bank-major address
// (bank = addr / BANK_WORDS). A line read returns line rd_line of every bank one
// cycle after rd_en; the parameter words of every bank are always visible on
// prm, since the extension blocks and GAP read them continuously.
// Bank organisation and depth are this design's choices.
module weight_memory
  import dnnoc_pkg::*;
#(
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned BATCH   = 32,
  parameter int unsigned WLINES  = 16,
  localparam int unsigned WWORDS     = WLINES * BATCH,
  localparam int unsigned BANK_WORDS = WWORDS + NPARAM,
  localparam int unsigned AW         = $clog2(NUM_BLK * BANK_WORDS),
  localparam int unsigned LW         = clog2_min1(WLINES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic          rd_en,
  input  logic [LW-1:0] rd_line,
  output data_t         rd_data [NUM_BLK][BATCH],
  output data_t         prm [NUM_BLK][NPARAM]
);

  data_t mem [NUM_BLK][WWORDS];
  data_t prm_q [NUM_BLK][NPARAM];

  logic [AW-1:0] bank, off;
  assign bank = waddr / AW'(BANK_WORDS);
  assign off  = waddr % AW'(BANK_WORDS);

  always_ff @(posedge clk) begin
    if (we && bank < AW'(NUM_BLK) && off < AW'(WWORDS))
      mem[bank][off] <= wdata;
    if (rd_en)
      for (int unsigned b = 0; b < NUM_BLK; b++)
        for (int unsigned l = 0; l < BATCH; l++)
          rd_data[b][l] <= mem[b][rd_line * BATCH + l];
  end

  // Parameter words are registers so that they can be reset to a neutral
  // normalisation (mean 0, gamma 1, inv_std 1, beta 0, reciprocal 1).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NUM_BLK; b++)
        for (int unsigned p = 0; p < NPARAM; p++)
          prm_q[b][p] <= (p == PRM_GAMMA || p == PRM_INVSTD || p == PRM_RECIP)
                         ? data_t'(1 << FRAC_W) : '0;
    end else if (we && bank < AW'(NUM_BLK) && off >= AW'(WWORDS)) begin
      prm_q[bank][off - AW'(WWORDS)] <= wdata;
    end
  end

  assign prm = prm_q;

endmodule
