// tb_dnnoc_top: end-to-end testbench of the DNNoC at reduced size (3 x 3 mesh,
// 4 blocks per PE, batch 4).
//
// Two mapping iterations run through the global controller's command stream.
// Iteration 1: two MA tiles compute a dense layer of NB neurons over 2*BATCH
// broadcast inputs, followed by batch norm and ReLU; each multicasts its
// results (run-length encoded) to an MP tile and an Add tile. The MP tile takes
// the element-wise maximum and the Add tile the element-wise sum of the two
// result vectors; both are stored in the global buffer. Iteration 2: the Add
// results are loaded back from the global buffer into a GAP tile, which
// averages them. All results are read through the host port and compared with
// values computed here. The testbench also counts how often each mechanism
// occurred (multicast copy-and-forward, run-length runs longer than one, batch
// norm, ReLU clipping, a head flit waiting for a busy output, broadcast loads,
// two mapping iterations) and fails if one never did.
module tb_dnnoc_top;
  import dnnoc_pkg::*;

  localparam int unsigned N = 3, NB = 4, BATCH = 4, LINES = 4, GB_WORDS = 4096;
  // node 5 MP, 1 GAP, 8 Add, the rest MA
  localparam logic [127:0] KIND_MAP = 128'h3_0408;
  localparam int unsigned T_A = 4, T_B = 3, T_MP = 5, T_ADD = 8, T_GAP = 1;
  localparam int unsigned CYCLES = 200000;
`define DNNOC_TB_INST dnnoc_top #(.N(N), .NUM_BLK(NB), .BATCH(BATCH), .LINES(LINES), .GB_WORDS(GB_WORDS), .KIND_MAP(KIND_MAP)) dut (.*);
`include "tb_dnnoc_body.svh"
`undef DNNOC_TB_INST
endmodule
