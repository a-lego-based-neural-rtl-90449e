// tb_dnnoc_full: end-to-end testbench of the DNNoC with every parameter of the
// top at its default (4 x 4 mesh, 64 blocks per PE, batch 32, 16 lines per
// buffer bank, full-size global buffer). The sequence and the checks are those
// of tb_dnnoc_top: two dense MA tiles with batch norm and ReLU multicast to an
// MP tile and an Add tile, the Add results go through the global buffer into a
// GAP tile in a second mapping iteration.
module tb_dnnoc_full;
  import dnnoc_pkg::*;

  localparam int unsigned N = 4, NB = 64, BATCH = 32, LINES = 16, GB_WORDS = 1925120;
  // default placement: nodes 0-7 MA, 8-11 MP, 12-13 GAP, 14-15 Add
  localparam int unsigned T_A = 4, T_B = 3, T_MP = 8, T_ADD = 14, T_GAP = 12;
  localparam int unsigned CYCLES = 400000;
`define DNNOC_TB_INST dnnoc_top dut (.*);
`include "tb_dnnoc_body.svh"
`undef DNNOC_TB_INST
endmodule
