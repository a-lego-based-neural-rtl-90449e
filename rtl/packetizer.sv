// packetizer: builds run-length-encoded multicast packets from a stream of PE
// results (the transmit half of the network interface).
//
// Input: a stream of words {mask, data, last}; the mask of the first word of a
// packet is its destination set (bit i = node i) and last marks the final
// result. Output: flits {type, payload}:
//   head  (type 00): payload = {src_x, src_y, destination mask}
//   body  (type 01): payload = {value, length - 1}, one (value, length) pair
//   tail  (type 10): no payload
// The encoder compares each result with the previous one; equal values extend
// the current run (its counter), a different value, or a run that has reached
// 2^LEN_W, closes the run and emits it as one body flit. After the last result
// the open run is flushed and the tail flit follows.
//
// The 2-bit type codes and the header/body fields follow the packet format of
// the design; the length field is LEN_W = ceil(log2 NUM_BLK) bits wide and
// therefore holds length - 1 (this encoding, and carrying one pair per body
// flit, are this design's choices). Throughput: one result per cycle while no
// flit is stalled; a run boundary costs no extra cycle, the head, the final
// flush and the tail cost one cycle each.
module packetizer
  import dnnoc_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0,
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
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [NODES-1:0] in_mask,
  input  data_t            in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [FW-1:0]    out_flit
);

  typedef enum logic [2:0] {S_HEAD, S_BODY, S_FLUSH, S_TAIL} state_e;

  state_e           state_q;
  data_t            cur_q;
  logic [LEN_W:0]   len_q;     // current run length, 1 .. 2^LEN_W
  logic             have_q;    // a run is open
  logic             slot_free;
  logic             take;

  assign slot_free = !out_valid || out_ready;
  assign in_ready  = (state_q == S_BODY) && slot_free;
  assign take      = in_valid && in_ready;

  function automatic logic [FW-1:0] body_flit(input data_t v, input logic [LEN_W:0] len);
    logic [LEN_W-1:0] lm1;
    lm1 = LEN_W'(len - 1'b1);
    return {FLIT_BODY, PAY_W'({v, lm1})};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_HEAD;
      cur_q     <= '0;
      len_q     <= '0;
      have_q    <= 1'b0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state_q)
        S_HEAD: if (in_valid && slot_free) begin
          out_valid <= 1'b1;
          out_flit  <= {FLIT_HEAD, PAY_W'({XY_W'(X), XY_W'(Y), in_mask})};
          have_q    <= 1'b0;
          state_q   <= S_BODY;
        end
        S_BODY: if (take) begin
          if (have_q && (in_data != cur_q || len_q == (LEN_W+1)'(1 << LEN_W))) begin
            out_valid <= 1'b1;
            out_flit  <= body_flit(cur_q, len_q);
            cur_q     <= in_data;
            len_q     <= (LEN_W+1)'(1);
          end else if (have_q) begin
            len_q <= len_q + 1'b1;
          end else begin
            cur_q  <= in_data;
            len_q  <= (LEN_W+1)'(1);
            have_q <= 1'b1;
          end
          if (in_last) state_q <= S_FLUSH;
        end
        S_FLUSH: if (slot_free) begin
          out_valid <= 1'b1;
          out_flit  <= body_flit(cur_q, len_q);
          state_q   <= S_TAIL;
        end
        S_TAIL: if (slot_free) begin
          out_valid <= 1'b1;
          out_flit  <= {FLIT_TAIL, PAY_W'(0)};
          have_q    <= 1'b0;
          state_q   <= S_HEAD;
        end
        default: state_q <= S_HEAD;
      endcase
    end
  end

endmodule
