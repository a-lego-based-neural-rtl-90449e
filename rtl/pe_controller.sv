// pe_controller: the PE controller of a DNNoC tile.
//
// It holds the tile's configuration registers, written over the global control
// signals (cfg_we/cfg_idx/cfg_data, register map in dnnoc_pkg), and sequences
// one run of the tile after a start pulse:
//   1. wait until rx_expect elements have arrived from the NoC (0 when the
//      inputs were loaded from the global buffer);
//   2. start the NeuLego PE and wait for the extension PE's results, which are
//      kept in the result registers (readable by the global controller);
//   3. if the destination mask is not empty, stream the first nres results to
//      the network interface, once for the destinations above this node in the
//      path numbering and once for those below, so each packet travels one way;
//   4. pulse done and clear the received-element count.
// Elements received before the start pulse are counted too, so a producer may
// run ahead of its consumer. Timing: one result per cycle into the NI when it
// is ready. The register map and the sequence are this design's choices.
module pe_controller
  import dnnoc_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned BATCH   = 32,
  parameter int unsigned LINES   = 16,
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0,
  parameter int unsigned AW      = 16,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned IW     = $clog2(LINES + 1),
  localparam int unsigned BW     = $clog2(BATCH + 1),
  localparam int unsigned RW     = $clog2(NUM_BLK + 1),
  localparam int unsigned ME     = node_id(X, Y, N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [7:0]       cfg_idx,
  input  logic [31:0]      cfg_data,
  input  logic             start,
  output logic             done,
  output logic             busy,
  input  logic             rx_wr,
  output logic [IW-1:0]    iters,
  output logic [BW-1:0]    last_lanes,
  output logic             bn_en,
  output logic             relu_en,
  output logic             rx_bcast,
  output logic [AW-1:0]    rx_base [NODES],
  output logic             pe_start,
  input  logic             ext_valid,
  input  data_t            ext_y  [NUM_BLK],
  output data_t            result [NUM_BLK],
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic [NODES-1:0] tx_mask,
  output data_t            tx_data,
  output logic             tx_last
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_RX, S_RUN, S_SEND_HI, S_SEND_LO, S_DONE} state_e;

  state_e           state_q;
  logic [NODES-1:0] dest_q, hi_mask, lo_mask;
  logic [31:0]      rx_expect_q, rx_cnt_q;
  logic [RW-1:0]    nres_q, nres_eff, idx_q;

  always_comb begin
    hi_mask = '0;
    lo_mask = '0;
    for (int unsigned i = 0; i < NODES; i++) begin
      if (i > ME) hi_mask[i] = dest_q[i];
      if (i < ME) lo_mask[i] = dest_q[i];
    end
    nres_eff = (nres_q == '0 || nres_q > RW'(NUM_BLK)) ? RW'(NUM_BLK) : nres_q;
  end

  // Configuration registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iters       <= IW'(1);
      last_lanes  <= '0;
      bn_en       <= 1'b0;
      relu_en     <= 1'b0;
      dest_q      <= '0;
      rx_bcast    <= 1'b0;
      rx_expect_q <= '0;
      nres_q      <= '0;
      for (int unsigned i = 0; i < NODES; i++) rx_base[i] <= '0;
    end else if (cfg_we) begin
      case (32'(cfg_idx))
        REG_ITERS:      iters       <= IW'(cfg_data);
        REG_LAST_LANES: last_lanes  <= BW'(cfg_data);
        REG_EXT:        {relu_en, bn_en} <= cfg_data[1:0];
        REG_DEST:       dest_q      <= NODES'(cfg_data);
        REG_RX_BCAST:   rx_bcast    <= cfg_data[0];
        REG_RX_EXPECT:  rx_expect_q <= cfg_data;
        REG_NRES:       nres_q      <= RW'(cfg_data);
        default:
          if (32'(cfg_idx) >= REG_RX_BASE0 && 32'(cfg_idx) < REG_RX_BASE0 + NODES)
            rx_base[32'(cfg_idx) - REG_RX_BASE0] <= AW'(cfg_data);
      endcase
    end
  end

  assign busy     = state_q != S_IDLE;
  assign pe_start = state_q == S_WAIT_RX && rx_cnt_q >= rx_expect_q;
  assign done     = state_q == S_DONE;

  assign tx_valid = state_q == S_SEND_HI || state_q == S_SEND_LO;
  assign tx_mask  = (state_q == S_SEND_HI) ? hi_mask : lo_mask;
  assign tx_data  = result[idx_q];
  assign tx_last  = idx_q == nres_eff - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      rx_cnt_q <= '0;
      idx_q    <= '0;
      for (int unsigned b = 0; b < NUM_BLK; b++) result[b] <= '0;
    end else begin
      rx_cnt_q <= (done ? '0 : rx_cnt_q) + (rx_wr ? 32'd1 : 32'd0);
      unique case (state_q)
        S_IDLE:    if (start) state_q <= S_WAIT_RX;
        S_WAIT_RX: if (pe_start) state_q <= S_RUN;
        S_RUN: if (ext_valid) begin
          result  <= ext_y;
          idx_q   <= '0;
          state_q <= (hi_mask != '0) ? S_SEND_HI : (lo_mask != '0) ? S_SEND_LO : S_DONE;
        end
        S_SEND_HI: if (tx_ready) begin
          idx_q <= tx_last ? '0 : idx_q + 1'b1;
          if (tx_last) state_q <= (lo_mask != '0) ? S_SEND_LO : S_DONE;
        end
        S_SEND_LO: if (tx_ready) begin
          idx_q <= tx_last ? '0 : idx_q + 1'b1;
          if (tx_last) state_q <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
