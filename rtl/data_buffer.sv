// data_buffer: the local input data buffer of a DNNoC tile.
//
// It is split into NUM_BLK banks, one per NeuLego block, and each bank holds
// LINES lines of BATCH words: one line is one batch of one block. A read
// returns line rd_line of every bank at once, one cycle after rd_en, which is
// what lets all blocks of the PE run in parallel.
//
// Writes are one word at a time through two ports: port 0 from the global
// controller (data loaded from the global buffer) and port 1 from the network
// interface (data received over the NoC); port 1 wins if both write the same
// word. A write addresses a flat element number e:
//   bcast = 0: bank e % NUM_BLK, word e / NUM_BLK (interleaved: consecutive
//              elements go to consecutive blocks),
//   bcast = 1: word e % (LINES*BATCH) of every bank (dense layers, where all
//              neurons read the same inputs).
// Word w of a bank is lane w % BATCH of line w / BATCH. The document does not
// size or organise this buffer; banking, addressing and the default depth are
// this design's choices.
module data_buffer
  import dnnoc_pkg::*;
#(
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned BATCH   = 32,
  parameter int unsigned LINES   = 16,
  localparam int unsigned WORDS  = LINES * BATCH,
  localparam int unsigned AW     = $clog2(NUM_BLK * WORDS),
  localparam int unsigned LW     = clog2_min1(LINES)
) (
  input  logic          clk,
  input  logic [1:0]    we,
  input  logic [1:0]    bcast,
  input  logic [AW-1:0] waddr [2],
  input  data_t         wdata [2],
  input  logic          rd_en,
  input  logic [LW-1:0] rd_line,
  output data_t         rd_data [NUM_BLK][BATCH]
);

  data_t mem [NUM_BLK][WORDS];

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < 2; p++) begin
      if (we[p]) begin
        if (bcast[p]) begin
          for (int unsigned b = 0; b < NUM_BLK; b++)
            mem[b][waddr[p] % WORDS] <= wdata[p];
        end else begin
          mem[waddr[p] % NUM_BLK][(waddr[p] / NUM_BLK) % WORDS] <= wdata[p];
        end
      end
    end
    if (rd_en)
      for (int unsigned b = 0; b < NUM_BLK; b++)
        for (int unsigned l = 0; l < BATCH; l++)
          rd_data[b][l] <= mem[b][rd_line * BATCH + l];
  end

endmodule
