// depacketizer: unpacks received packets into data-buffer writes (the receive
// half of the network interface).
//
// The depacking unit looks at each flit's type. A head flit gives the source
// node, whose base element address (rx_base, set by the controller for the
// current mapping) becomes the buffer write address. A body flit is decoded
// into its (value, length) pair and the data repeater writes the value to
// length consecutive element addresses, one per cycle, then signals that it is
// ready for the next pair. A tail flit ends the packet and pulses pkt_done.
//
// Timing: a body flit of length L occupies the repeater for L cycles; the next
// flit is accepted in the cycle of the last write, so a packet of total length
// C (elements) drains in C cycles plus one per head and tail flit. Flit format:
// see packetizer. The base-address table per source is this design's choice.
module depacketizer
  import dnnoc_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned NUM_BLK = 64,
  parameter int unsigned AW      = 16,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned XY_W   = clog2_min1(N),
  localparam int unsigned LEN_W  = clog2_min1(NUM_BLK),
  localparam int unsigned HDR_W  = 2 * XY_W + NODES,
  localparam int unsigned BODY_W = DATA_W + LEN_W,
  localparam int unsigned PAY_W  = (HDR_W > BODY_W) ? HDR_W : BODY_W,
  localparam int unsigned FW     = TYPE_W + PAY_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [FW-1:0] in_flit,
  input  logic [AW-1:0] rx_base [NODES],
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output data_t         wr_data,
  output logic          pkt_done
);

  flit_type_e       ftype;
  logic [PAY_W-1:0] pay;
  logic [XY_W-1:0]  sx, sy;
  logic [AW-1:0]    addr_q;
  data_t            val_q;
  logic [LEN_W:0]   rem_q;     // writes still to do for the current pair
  logic             take;

  assign ftype    = flit_type_e'(in_flit[FW-1 -: TYPE_W]);
  assign pay      = in_flit[PAY_W-1:0];
  assign sx       = pay[NODES + XY_W +: XY_W];
  assign sy       = pay[NODES +: XY_W];
  assign in_ready = rem_q <= (LEN_W+1)'(1);
  assign take     = in_valid && in_ready;

  assign wr_en   = rem_q != '0;
  assign wr_addr = addr_q;
  assign wr_data = val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q   <= '0;
      val_q    <= '0;
      rem_q    <= '0;
      pkt_done <= 1'b0;
    end else begin
      pkt_done <= 1'b0;
      if (wr_en) begin
        addr_q <= addr_q + 1'b1;
        rem_q  <= rem_q - 1'b1;
      end
      if (take) begin
        unique case (ftype)
          FLIT_HEAD: addr_q <= rx_base[node_id(32'(sx), 32'(sy), N)];
          FLIT_BODY: begin
            val_q <= data_t'(pay[LEN_W +: DATA_W]);
            rem_q <= (LEN_W+1)'(pay[LEN_W-1:0]) + 1'b1;
          end
          FLIT_TAIL: pkt_done <= 1'b1;
          default: ;
        endcase
      end
    end
  end

endmodule
