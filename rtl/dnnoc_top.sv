// dnnoc_top: Lego-style DNN accelerator on an N x N network-on-chip (DNNoC).
//
// N*N tiles, each holding one NeuLego PE of a kind fixed when the chip is
// built (KIND_MAP, two bits per node ID: 0 MA, 1 MP, 2 GAP, 3 Add), sit on a
// mesh of multicast routers. A global buffer holds weights, inputs and the
// results passed between mapping iterations; a global controller runs a
// command stream that maps some consecutive layers onto the tiles, loads them,
// starts them and collects the results. Within a mapping iteration, tiles pass
// results to the tiles of the next layer as run-length-encoded multicast
// packets.
//
// Interface: cmd_* is the command stream (valid/ready), host_* is the off-chip
// side's port into the global buffer (one-cycle read latency), idle is high
// when the controller has no command to run and no tile is busy.
//
// Defaults: a 4 x 4 DNNoC, PE size (blocks per PE) 64, batch 32, 16-bit data.
// The default placement (node IDs 0-7 MA, 8-11 MP, 12-13 GAP, 14-15 Add) is this
// design's choice; the placement step chooses it per target model. Node IDs
// follow the boustrophedon path: node_id(x, y) = y*N + (y even ? x : N-1-x).
module dnnoc_top
  import dnnoc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned NUM_BLK    = 64,
  parameter int unsigned BATCH      = 32,
  parameter int unsigned LINES      = 16,
  parameter int unsigned GB_WORDS   = 1925120,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter logic [127:0] KIND_MAP  = 128'hFA55_0000,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned GB_AW  = $clog2(GB_WORDS),
  localparam int unsigned XY_W   = clog2_min1(N),
  localparam int unsigned LEN_W  = clog2_min1(NUM_BLK),
  localparam int unsigned HDR_W  = 2 * XY_W + NODES,
  localparam int unsigned BODY_W = DATA_W + LEN_W,
  localparam int unsigned PAY_W  = (HDR_W > BODY_W) ? HDR_W : BODY_W,
  localparam int unsigned FW     = TYPE_W + PAY_W,
  localparam int unsigned DB_AW  = $clog2(NUM_BLK * LINES * BATCH),
  localparam int unsigned WM_AW  = $clog2(NUM_BLK * (LINES * BATCH + NPARAM))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_t             cmd,
  output logic             idle,
  output logic [NODES-1:0] busy_tiles,
  input  logic             host_we,
  input  logic             host_re,
  input  logic [GB_AW-1:0] host_addr,
  input  data_t            host_wdata,
  output data_t            host_rdata
);

  // global buffer <-> controller
  logic             gb_we, gb_re;
  logic [GB_AW-1:0] gb_addr;
  data_t            gb_wdata, gb_rdata;

  // controller -> tiles
  logic [NODES-1:0] cfg_we, db_we, wm_we, start, tile_done, tile_busy;
  logic [7:0]       cfg_idx;
  logic [31:0]      cfg_data;
  logic [DB_AW-1:0] db_addr;
  logic             db_bcast;
  data_t            db_data;
  logic [WM_AW-1:0] wm_addr;
  data_t            wm_data;
  data_t            tile_res [NODES][NUM_BLK];

  // mesh links, indexed by node ID and direction (0 N, 1 E, 2 S, 3 W)
  logic [3:0]    lk_out_valid [NODES];
  logic [3:0]    lk_out_ready [NODES];
  logic [FW-1:0] lk_out_flit  [NODES][4];
  logic [3:0]    lk_in_valid  [NODES];
  logic [3:0]    lk_in_ready  [NODES];
  logic [FW-1:0] lk_in_flit   [NODES][4];

  global_buffer #(.WORDS(GB_WORDS)) u_gb (
    .clk,
    .a_we(host_we), .a_re(host_re), .a_addr(host_addr), .a_wdata(host_wdata),
    .a_rdata(host_rdata),
    .b_we(gb_we), .b_re(gb_re), .b_addr(gb_addr), .b_wdata(gb_wdata), .b_rdata(gb_rdata));

  dnnoc_controller #(.N(N), .NUM_BLK(NUM_BLK), .GB_AW(GB_AW), .DB_AW(DB_AW),
                     .WM_AW(WM_AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .idle,
    .gb_we, .gb_re, .gb_addr, .gb_wdata, .gb_rdata,
    .cfg_we, .cfg_idx, .cfg_data, .db_we, .db_addr, .db_bcast, .db_data,
    .wm_we, .wm_addr, .wm_data, .start, .tile_done, .tile_res, .busy_tiles);

  for (genvar y = 0; y < N; y++) begin : g_row
    for (genvar x = 0; x < N; x++) begin : g_col
      localparam int unsigned ID = node_id(x, y, N);
      // neighbour IDs (only used where the neighbour exists)
      localparam int unsigned IDN = (y + 1 < N) ? node_id(x, y + 1, N) : ID;
      localparam int unsigned IDE = (x + 1 < N) ? node_id(x + 1, y, N) : ID;
      localparam int unsigned IDS = (y > 0)     ? node_id(x, y - 1, N) : ID;
      localparam int unsigned IDW = (x > 0)     ? node_id(x - 1, y, N) : ID;

      dnnoc_tile #(.N(N), .X(x), .Y(y), .KIND(pe_kind_e'(KIND_MAP[2*ID +: 2])),
                   .NUM_BLK(NUM_BLK), .BATCH(BATCH), .LINES(LINES),
                   .FIFO_DEPTH(FIFO_DEPTH)) u_tile (
        .clk, .rst_n,
        .cfg_we(cfg_we[ID]), .cfg_idx, .cfg_data,
        .db_we(db_we[ID]), .db_addr, .db_bcast, .db_data,
        .wm_we(wm_we[ID]), .wm_addr, .wm_data,
        .start(start[ID]), .done(tile_done[ID]), .busy(tile_busy[ID]),
        .result(tile_res[ID]),
        .lk_in_valid(lk_in_valid[ID]), .lk_in_ready(lk_in_ready[ID]),
        .lk_in_flit(lk_in_flit[ID]),
        .lk_out_valid(lk_out_valid[ID]), .lk_out_ready(lk_out_ready[ID]),
        .lk_out_flit(lk_out_flit[ID]));

      // Input link d of this tile is output link (d+2)%4 of the neighbour in
      // direction d; links at the mesh edge are idle.
      if (y + 1 < N) begin : g_n
        assign lk_in_valid[ID][0]     = lk_out_valid[IDN][2];
        assign lk_in_flit[ID][0]      = lk_out_flit[IDN][2];
        assign lk_out_ready[IDN][2]   = lk_in_ready[ID][0];
      end else begin : g_n_edge
        assign lk_in_valid[ID][0]     = 1'b0;
        assign lk_in_flit[ID][0]      = '0;
        assign lk_out_ready[ID][0]    = 1'b1;
      end
      if (x + 1 < N) begin : g_e
        assign lk_in_valid[ID][1]     = lk_out_valid[IDE][3];
        assign lk_in_flit[ID][1]      = lk_out_flit[IDE][3];
        assign lk_out_ready[IDE][3]   = lk_in_ready[ID][1];
      end else begin : g_e_edge
        assign lk_in_valid[ID][1]     = 1'b0;
        assign lk_in_flit[ID][1]      = '0;
        assign lk_out_ready[ID][1]    = 1'b1;
      end
      if (y > 0) begin : g_s
        assign lk_in_valid[ID][2]     = lk_out_valid[IDS][0];
        assign lk_in_flit[ID][2]      = lk_out_flit[IDS][0];
        assign lk_out_ready[IDS][0]   = lk_in_ready[ID][2];
      end else begin : g_s_edge
        assign lk_in_valid[ID][2]     = 1'b0;
        assign lk_in_flit[ID][2]      = '0;
        assign lk_out_ready[ID][2]    = 1'b1;
      end
      if (x > 0) begin : g_w
        assign lk_in_valid[ID][3]     = lk_out_valid[IDW][1];
        assign lk_in_flit[ID][3]      = lk_out_flit[IDW][1];
        assign lk_out_ready[IDW][1]   = lk_in_ready[ID][3];
      end else begin : g_w_edge
        assign lk_in_valid[ID][3]     = 1'b0;
        assign lk_in_flit[ID][3]      = '0;
        assign lk_out_ready[ID][3]    = 1'b1;
      end
    end
  end

endmodule
