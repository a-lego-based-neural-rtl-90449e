// network_interface: the network interface (NI) between a tile's PE side and
// its router.
//
// Transmit: results from the PE controller enter a FIFO as {mask, data, last},
// the packetizer run-length encodes them into a packet, and a flit FIFO holds
// the flits until the router's local input takes them. Receive: flits from the
// router's local output wait in a flit FIFO and the depacketizer expands them
// into element writes for the tile's data buffer. All queues are FIFO_DEPTH
// entries deep (the depth is this design's choice).
module network_interface
  import dnnoc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned NUM_BLK    = 64,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned AW         = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned XY_W   = clog2_min1(N),
  localparam int unsigned LEN_W  = clog2_min1(NUM_BLK),
  localparam int unsigned HDR_W  = 2 * XY_W + NODES,
  localparam int unsigned BODY_W = DATA_W + LEN_W,
  localparam int unsigned PAY_W  = (HDR_W > BODY_W) ? HDR_W : BODY_W,
  localparam int unsigned FW     = TYPE_W + PAY_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the PE controller
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic [NODES-1:0] tx_mask,
  input  data_t            tx_data,
  input  logic             tx_last,
  // to the router's local input
  output logic             rt_out_valid,
  input  logic             rt_out_ready,
  output logic [FW-1:0]    rt_out_flit,
  // from the router's local output
  input  logic             rt_in_valid,
  output logic             rt_in_ready,
  input  logic [FW-1:0]    rt_in_flit,
  // to the data buffer
  input  logic [AW-1:0]    rx_base [NODES],
  output logic             wr_en,
  output logic [AW-1:0]    wr_addr,
  output data_t            wr_data,
  output logic             pkt_done
);

  localparam int unsigned TW = NODES + DATA_W + 1;

  logic          q_valid, q_ready;
  logic [TW-1:0] q_word;
  logic          p_valid, p_ready;
  logic [FW-1:0] p_flit;
  logic          r_valid, r_ready;
  logic [FW-1:0] r_flit;

  sync_fifo #(.W(TW), .DEPTH(FIFO_DEPTH)) u_txq (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_data({tx_mask, tx_data, tx_last}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_word));

  packetizer #(.N(N), .NUM_BLK(NUM_BLK), .X(X), .Y(Y)) u_pkt (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready),
    .in_mask(q_word[TW-1 -: NODES]), .in_data(data_t'(q_word[DATA_W:1])), .in_last(q_word[0]),
    .out_valid(p_valid), .out_ready(p_ready), .out_flit(p_flit));

  sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n,
    .in_valid(p_valid), .in_ready(p_ready), .in_data(p_flit),
    .out_valid(rt_out_valid), .out_ready(rt_out_ready), .out_data(rt_out_flit));

  sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n,
    .in_valid(rt_in_valid), .in_ready(rt_in_ready), .in_data(rt_in_flit),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_flit));

  depacketizer #(.N(N), .NUM_BLK(NUM_BLK), .AW(AW)) u_dpk (
    .clk, .rst_n,
    .in_valid(r_valid), .in_ready(r_ready), .in_flit(r_flit),
    .rx_base, .wr_en, .wr_addr, .wr_data, .pkt_done);

endmodule
