// dnnoc_pkg: types, constants and helper functions shared by the DNNoC RTL.
//
// Data are 16-bit two's-complement fixed-point numbers (16-bit precision is
// the design's stated data width); the split into 8 integer and 8 fraction
// bits (Q8.8) is this design's own choice. A flit is {type, payload}, with the
// 2-bit type codes head=00, body=01, tail=10 of the packet format. Nodes of the
// N x N mesh are numbered along a boustrophedon Hamiltonian path: row y is
// walked left to right when y is even and right to left when y is odd, so that
// consecutive IDs are always mesh neighbours. That numbering is what the
// multicast router relies on.
package dnnoc_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned FRAC_W = 8;
  localparam int unsigned TYPE_W = 2;

  typedef logic signed [DATA_W-1:0] data_t;

  localparam data_t DATA_MAX = 16'sh7fff;
  localparam data_t DATA_MIN = 16'sh8000;

  typedef enum logic [1:0] {
    FLIT_HEAD = 2'b00,
    FLIT_BODY = 2'b01,
    FLIT_TAIL = 2'b10
  } flit_type_e;

  // NeuLego block kinds. MP and ADD are memory-less, MA and GAP read the
  // weight memory.
  typedef enum logic [1:0] {
    PE_MA  = 2'd0,
    PE_MP  = 2'd1,
    PE_GAP = 2'd2,
    PE_ADD = 2'd3
  } pe_kind_e;

  // Router port numbers.
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;  // y + 1
  localparam int unsigned P_EAST  = 2;  // x + 1
  localparam int unsigned P_SOUTH = 3;  // y - 1
  localparam int unsigned P_WEST  = 4;  // x - 1

  // Per-block parameter words held after the weights in each weight-memory bank.
  localparam int unsigned NPARAM  = 8;
  localparam int unsigned PRM_MU     = 0;  // BN mean
  localparam int unsigned PRM_GAMMA  = 1;  // BN scale
  localparam int unsigned PRM_INVSTD = 2;  // BN 1/sqrt(var + eps), precomputed
  localparam int unsigned PRM_BETA   = 3;  // BN shift
  localparam int unsigned PRM_RECIP  = 4;  // GAP 1/(number of inputs)

  // Tile configuration registers, written by the global controller.
  localparam int unsigned REG_ITERS      = 0;  // computing iterations (batches) per run
  localparam int unsigned REG_LAST_LANES = 1;  // valid lanes in the last batch (0 = all)
  localparam int unsigned REG_EXT        = 2;  // bit0 batch norm, bit1 ReLU
  localparam int unsigned REG_DEST       = 3;  // multicast destination node mask
  localparam int unsigned REG_RX_BCAST   = 4;  // received data go to every block
  localparam int unsigned REG_RX_EXPECT  = 5;  // elements to receive before a run starts
  localparam int unsigned REG_NRES       = 6;  // results sent / stored (0 = all blocks)
  localparam int unsigned REG_RX_BASE0   = 16; // + source node: base element address
  localparam int unsigned NREGS          = 16 + 64;

  // Global controller commands.
  typedef enum logic [2:0] {
    CMD_SETREG  = 3'd0,  // tile, c = register, b = value
    CMD_LOAD_DB = 3'd1,  // tile, a = GB address, b = count, c[30:0] = element, c[31] = broadcast
    CMD_LOAD_WM = 3'd2,  // tile, a = GB address, b = count, c = weight element (bank-major)
    CMD_START   = 3'd3,  // a = mask of tiles to start
    CMD_WAIT    = 3'd4,  // wait for every started tile to finish
    CMD_STORE   = 3'd5   // tile, a = GB address, b = count of results to store
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e     op;
    logic [7:0]  tile;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
  } cmd_t;

  // Node ID of mesh position (x, y) on the boustrophedon path.
  function automatic int unsigned node_id(input int unsigned x, input int unsigned y,
                                          input int unsigned n);
    return y * n + ((y % 2 == 0) ? x : (n - 1 - x));
  endfunction

  function automatic int unsigned clog2_min1(input int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // Saturate a wide signed value to the 16-bit data range.
  function automatic data_t sat(input logic signed [63:0] v);
    if (v > 64'sd32767)  return DATA_MAX;
    if (v < -64'sd32768) return DATA_MIN;
    return data_t'(v[DATA_W-1:0]);
  endfunction

  // Fixed-point product of two data words, rounded toward minus infinity.
  function automatic data_t fx_mul(input data_t a, input data_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return sat(p >>> FRAC_W);
  endfunction

endpackage
