// global_buffer: the on-chip global buffer of the DNNoC.
//
// A WORDS x 16-bit memory with two independent synchronous ports: port A for
// the off-chip side (the host or DMA that brings weights and inputs from DRAM
// and takes results back) and port B for the global controller, which moves
// data between the buffer and the tiles. A read returns its word one cycle
// after re; if both ports write one word in the same cycle, port B wins.
// The default size is the design's 3,760 KB of on-chip SRAM taken as 16-bit
// words; the document sizes the buffer by the largest number of weights in a
// single layer of the target model.
module global_buffer
  import dnnoc_pkg::*;
#(
  parameter int unsigned WORDS = 1925120,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic          a_re,
  input  logic [AW-1:0] a_addr,
  input  data_t         a_wdata,
  output data_t         a_rdata,
  input  logic          b_we,
  input  logic          b_re,
  input  logic [AW-1:0] b_addr,
  input  data_t         b_wdata,
  output data_t         b_rdata
);

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_re) a_rdata <= mem[a_addr];
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
