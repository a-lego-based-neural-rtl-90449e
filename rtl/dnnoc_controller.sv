// dnnoc_controller: the global controller of the DNNoC.
//
// It executes a stream of commands (cmd_t, see dnnoc_pkg) prepared off line by
// the mapping step: for each mapping iteration, configure the tiles that hold
// the layers mapped now, copy weights and first-layer inputs from the global
// buffer into the tiles, start the tiles, wait for them, and copy the results
// of the last mapped layer back into the global buffer, from where the next
// mapping iteration (or the off-chip side) takes them.
//   SETREG  one cycle: writes one configuration register of one tile.
//   LOAD_DB / LOAD_WM  copy b words from global-buffer address a to element c
//           of the tile's data buffer / weight memory, one word per cycle after
//           a one-cycle read latency (c[31] selects broadcast for LOAD_DB).
//   START   pulses start to every tile in mask a and marks them busy.
//   WAIT    stalls the command stream until every busy tile has pulsed done.
//   STORE   copies b results of a tile to global-buffer address a, one per cycle.
// The tile buses (address and data) are shared; only the enables are per tile.
// The command set is this design's own; the document gives the controller's
// role (global control signals, mapping state, global-buffer transfers).
module dnnoc_controller
  import dnnoc_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned GB_AW   = 21,
  parameter int unsigned DB_AW   = 15,
  parameter int unsigned WM_AW   = 16,
  localparam int unsigned NODES  = N * N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_t             cmd,
  output logic             idle,
  // global buffer port
  output logic             gb_we,
  output logic             gb_re,
  output logic [GB_AW-1:0] gb_addr,
  output data_t            gb_wdata,
  input  data_t            gb_rdata,
  // tile control
  output logic [NODES-1:0] cfg_we,
  output logic [7:0]       cfg_idx,
  output logic [31:0]      cfg_data,
  output logic [NODES-1:0] db_we,
  output logic [DB_AW-1:0] db_addr,
  output logic             db_bcast,
  output data_t            db_data,
  output logic [NODES-1:0] wm_we,
  output logic [WM_AW-1:0] wm_addr,
  output data_t            wm_data,
  output logic [NODES-1:0] start,
  input  logic [NODES-1:0] tile_done,
  input  data_t            tile_res [NODES][NUM_BLK],
  output logic [NODES-1:0] busy_tiles
);

  typedef enum logic [2:0] {S_FETCH, S_COPY, S_WAIT, S_STORE} state_e;

  state_e      state_q;
  cmd_t        cur_q;
  logic [31:0] issued_q, written_q;
  logic        rd_pend_q;         // a global-buffer read returns this cycle
  logic [31:0] rd_idx_q;          // element offset of that read

  assign cmd_ready = state_q == S_FETCH;
  assign idle      = state_q == S_FETCH && !cmd_valid && busy_tiles == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_FETCH;
      cur_q      <= '0;
      issued_q   <= '0;
      written_q  <= '0;
      rd_pend_q  <= 1'b0;
      rd_idx_q   <= '0;
      busy_tiles <= '0;
      gb_we      <= 1'b0;
      gb_re      <= 1'b0;
      gb_addr    <= '0;
      gb_wdata   <= '0;
      cfg_we     <= '0;
      cfg_idx    <= '0;
      cfg_data   <= '0;
      db_we      <= '0;
      db_addr    <= '0;
      db_bcast   <= 1'b0;
      db_data    <= '0;
      wm_we      <= '0;
      wm_addr    <= '0;
      wm_data    <= '0;
      start      <= '0;
    end else begin
      cfg_we <= '0;
      db_we  <= '0;
      wm_we  <= '0;
      start  <= '0;
      gb_we  <= 1'b0;
      gb_re  <= 1'b0;
      busy_tiles <= (busy_tiles & ~tile_done) | start;

      // returning global-buffer read: write it into the tile
      rd_pend_q <= 1'b0;
      if (rd_pend_q) begin
        if (cur_q.op == CMD_LOAD_DB) begin
          db_we[cur_q.tile] <= 1'b1;
          db_addr  <= DB_AW'(cur_q.c[30:0] + rd_idx_q);
          db_bcast <= cur_q.c[31];
          db_data  <= gb_rdata;
        end else begin
          wm_we[cur_q.tile] <= 1'b1;
          wm_addr <= WM_AW'(cur_q.c + rd_idx_q);
          wm_data <= gb_rdata;
        end
        written_q <= written_q + 1'b1;
      end

      unique case (state_q)
        S_FETCH: if (cmd_valid) begin
          cur_q     <= cmd;
          issued_q  <= '0;
          written_q <= '0;
          unique case (cmd.op)
            CMD_SETREG: begin
              cfg_we[cmd.tile] <= 1'b1;
              cfg_idx  <= cmd.c[7:0];
              cfg_data <= cmd.b;
            end
            CMD_LOAD_DB, CMD_LOAD_WM: if (cmd.b != '0) state_q <= S_COPY;
            CMD_START: start <= NODES'(cmd.a);
            CMD_WAIT:  state_q <= S_WAIT;
            CMD_STORE: if (cmd.b != '0) state_q <= S_STORE;
            default: ;
          endcase
        end
        S_COPY: begin
          if (issued_q < cur_q.b) begin
            gb_re     <= 1'b1;
            gb_addr   <= GB_AW'(cur_q.a + issued_q);
            issued_q  <= issued_q + 1'b1;
          end
          if (gb_re) begin
            rd_pend_q <= 1'b1;
            rd_idx_q  <= issued_q - 1'b1;
          end
          if (rd_pend_q && written_q + 1'b1 == cur_q.b) state_q <= S_FETCH;
        end
        S_WAIT: if (busy_tiles == '0 && start == '0) state_q <= S_FETCH;
        S_STORE: begin
          gb_we    <= 1'b1;
          gb_addr  <= GB_AW'(cur_q.a + issued_q);
          gb_wdata <= tile_res[cur_q.tile][issued_q % NUM_BLK];
          issued_q <= issued_q + 1'b1;
          if (issued_q + 1'b1 == cur_q.b) state_q <= S_FETCH;
        end
        default: state_q <= S_FETCH;
      endcase
    end
  end

endmodule
