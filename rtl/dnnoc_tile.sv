// dnnoc_tile: one tile of the DNNoC mesh.
//
// A tile joins a NeuLego PE of kind KIND (NUM_BLK blocks), an extension PE
// (batch norm and ReLU), the tile's data buffer and weight memory, the PE
// controller, the network interface and the router. The global controller
// reaches the tile through the global control signals: configuration
// registers, word writes into the data buffer and the weight memory, a start
// pulse, and the done pulse and result registers in return. The four mesh
// links (index 0 north, 1 east, 2 south, 3 west) connect to the neighbouring
// routers.
//
// Dataflow of one run: inputs arrive in the data buffer (loaded by the global
// controller, or received over the NoC and unpacked by the NI); the PE
// controller starts the PE, which reads one batch line per cycle; the results
// pass the extension PE into the PE controller's result registers and, if the
// tile has destinations, through the packetizer into the network as one or two
// multicast packets.
module dnnoc_tile
  import dnnoc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter pe_kind_e    KIND       = PE_MA,
  parameter int unsigned NUM_BLK    = 64,
  parameter int unsigned BATCH      = 32,
  parameter int unsigned LINES      = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned XY_W   = clog2_min1(N),
  localparam int unsigned LEN_W  = clog2_min1(NUM_BLK),
  localparam int unsigned HDR_W  = 2 * XY_W + NODES,
  localparam int unsigned BODY_W = DATA_W + LEN_W,
  localparam int unsigned PAY_W  = (HDR_W > BODY_W) ? HDR_W : BODY_W,
  localparam int unsigned FW     = TYPE_W + PAY_W,
  localparam int unsigned DB_AW  = $clog2(NUM_BLK * LINES * BATCH),
  localparam int unsigned WM_AW  = $clog2(NUM_BLK * (LINES * BATCH + NPARAM)),
  localparam int unsigned LW     = clog2_min1(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // global control signals
  input  logic             cfg_we,
  input  logic [7:0]       cfg_idx,
  input  logic [31:0]      cfg_data,
  input  logic             db_we,
  input  logic [DB_AW-1:0] db_addr,
  input  logic             db_bcast,
  input  data_t            db_data,
  input  logic             wm_we,
  input  logic [WM_AW-1:0] wm_addr,
  input  data_t            wm_data,
  input  logic             start,
  output logic             done,
  output logic             busy,
  output data_t            result [NUM_BLK],
  // mesh links
  input  logic [3:0]       lk_in_valid,
  output logic [3:0]       lk_in_ready,
  input  logic [FW-1:0]    lk_in_flit  [4],
  output logic [3:0]       lk_out_valid,
  input  logic [3:0]       lk_out_ready,
  output logic [FW-1:0]    lk_out_flit [4]
);

  localparam int unsigned IW = $clog2(LINES + 1);
  localparam int unsigned BW = $clog2(BATCH + 1);

  // configuration
  logic [IW-1:0]    iters;
  logic [BW-1:0]    last_lanes;
  logic             bn_en, relu_en, rx_bcast;
  logic [DB_AW-1:0] rx_base [NODES];

  // buffers and PE
  logic             rd_en;
  logic [LW-1:0]    rd_line;
  data_t            x_line [NUM_BLK][BATCH];
  data_t            w_line [NUM_BLK][BATCH];
  data_t            prm    [NUM_BLK][NPARAM];
  data_t            pe_res [NUM_BLK];
  data_t            ext_y  [NUM_BLK];
  logic             pe_start, pe_done, pe_busy, ext_valid;

  // network interface
  logic             tx_valid, tx_ready, tx_last;
  logic [NODES-1:0] tx_mask;
  data_t            tx_data;
  logic             rx_wr, pkt_done;
  logic [DB_AW-1:0] rx_addr;
  data_t            rx_data;

  // router
  logic [NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  logic [FW-1:0]     r_in_flit [NPORTS];
  logic [FW-1:0]     r_out_flit [NPORTS];

  pe_controller #(.N(N), .NUM_BLK(NUM_BLK), .BATCH(BATCH), .LINES(LINES),
                  .X(X), .Y(Y), .AW(DB_AW)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_data, .start, .done, .busy,
    .rx_wr, .iters, .last_lanes, .bn_en, .relu_en, .rx_bcast, .rx_base,
    .pe_start, .ext_valid, .ext_y, .result,
    .tx_valid, .tx_ready, .tx_mask, .tx_data, .tx_last);

  data_buffer #(.NUM_BLK(NUM_BLK), .BATCH(BATCH), .LINES(LINES)) u_db (
    .clk,
    .we({rx_wr, db_we}), .bcast({rx_bcast, db_bcast}),
    .waddr('{db_addr, rx_addr}), .wdata('{db_data, rx_data}),
    .rd_en, .rd_line, .rd_data(x_line));

  weight_memory #(.NUM_BLK(NUM_BLK), .BATCH(BATCH), .WLINES(LINES)) u_wm (
    .clk, .rst_n, .we(wm_we), .waddr(wm_addr), .wdata(wm_data),
    .rd_en, .rd_line, .rd_data(w_line), .prm);

  neulego_pe #(.KIND(KIND), .NUM_BLK(NUM_BLK), .BATCH(BATCH), .LINES(LINES)) u_pe (
    .clk, .rst_n, .start(pe_start), .iters, .last_lanes,
    .rd_en, .rd_line, .x_line, .w_line, .prm,
    .result(pe_res), .done(pe_done), .busy(pe_busy));

  extension_pe #(.NUM_BLK(NUM_BLK)) u_ext (
    .clk, .rst_n, .in_valid(pe_done), .bn_en, .relu_en,
    .x(pe_res), .prm, .y(ext_y), .out_valid(ext_valid));

  network_interface #(.N(N), .NUM_BLK(NUM_BLK), .X(X), .Y(Y), .AW(DB_AW),
                      .FIFO_DEPTH(FIFO_DEPTH)) u_ni (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_mask, .tx_data, .tx_last,
    .rt_out_valid(r_in_valid[P_LOCAL]), .rt_out_ready(r_in_ready[P_LOCAL]),
    .rt_out_flit(r_in_flit[P_LOCAL]),
    .rt_in_valid(r_out_valid[P_LOCAL]), .rt_in_ready(r_out_ready[P_LOCAL]),
    .rt_in_flit(r_out_flit[P_LOCAL]),
    .rx_base, .wr_en(rx_wr), .wr_addr(rx_addr), .wr_data(rx_data), .pkt_done);

  for (genvar d = 0; d < 4; d++) begin : g_link
    assign r_in_valid[d+1]  = lk_in_valid[d];
    assign lk_in_ready[d]   = r_in_ready[d+1];
    assign r_in_flit[d+1]   = lk_in_flit[d];
    assign lk_out_valid[d]  = r_out_valid[d+1];
    assign r_out_ready[d+1] = lk_out_ready[d];
    assign lk_out_flit[d]   = r_out_flit[d+1];
  end

  router #(.N(N), .X(X), .Y(Y), .NUM_BLK(NUM_BLK), .FIFO_DEPTH(FIFO_DEPTH)) u_rt (
    .clk, .rst_n,
    .in_valid(r_in_valid), .in_ready(r_in_ready), .in_flit(r_in_flit),
    .out_valid(r_out_valid), .out_ready(r_out_ready), .out_flit(r_out_flit));

endmodule
