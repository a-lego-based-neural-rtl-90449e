// router: five-port wormhole router of the DNNoC mesh with Hamiltonian
// (dual-path) multicast routing.
//
// Ports: 0 local, 1 north (y+1), 2 east (x+1), 3 south (y-1), 4 west (x-1),
// each a valid/ready flit channel; every input has a FIFO_DEPTH-flit buffer.
// Nodes are numbered along the boustrophedon Hamiltonian path (dnnoc_pkg::
// node_id). A head flit carries the set of destination nodes still to be
// reached. The routing computation unit:
//   * checks whether this node is a destination; if so the packet is also
//     replicated to the local port, and this node's bit is cleared in the head
//     flit that travels on;
//   * if destinations with a higher ID remain, forwards toward the lowest of
//     them, choosing the neighbour with the highest ID not beyond it;
//     otherwise, if lower IDs remain, toward the highest of those, choosing the
//     neighbour with the lowest ID not below it.
// A packet thus only ever moves up (or only down) the path numbering, which
// keeps each directed link in one direction class and the network free of
// routing deadlock when every packet's destinations lie on one side of its
// source (the packetizer side of the tile sends the upper and lower
// destination sets as two packets).
//
// Switch allocation: a waiting head flit is granted when every output it needs
// (forward and/or local copy) is free; one grant per cycle, round-robin over
// the inputs. The outputs stay reserved until the tail flit has passed. A flit
// moves only when all its outputs are ready, so a forwarded packet and its
// local copy advance together. Timing: one cycle for the grant, then one flit
// per cycle; the input FIFO adds one cycle per hop.
// The local copy path is the crossbar's local output here; it is not given a
// register of its own, since the network interface buffers it.
module router
  import dnnoc_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned NUM_BLK    = 64,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NODES  = N * N,
  localparam int unsigned XY_W   = clog2_min1(N),
  localparam int unsigned LEN_W  = clog2_min1(NUM_BLK),
  localparam int unsigned HDR_W  = 2 * XY_W + NODES,
  localparam int unsigned BODY_W = DATA_W + LEN_W,
  localparam int unsigned PAY_W  = (HDR_W > BODY_W) ? HDR_W : BODY_W,
  localparam int unsigned FW     = TYPE_W + PAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  input  logic [FW-1:0]     in_flit  [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready,
  output logic [FW-1:0]     out_flit [NPORTS]
);

  localparam int unsigned ME = node_id(X, Y, N);
  localparam int unsigned PIW = 3;

  // Neighbour existence and IDs.
  function automatic logic nb_exists(input int unsigned d);
    case (d)
      P_NORTH: return Y + 1 < N;
      P_EAST:  return X + 1 < N;
      P_SOUTH: return Y > 0;
      P_WEST:  return X > 0;
      default: return 1'b0;
    endcase
  endfunction

  function automatic int unsigned nb_id(input int unsigned d);
    case (d)
      P_NORTH: return node_id(X, Y + 1, N);
      P_EAST:  return node_id(X + 1, Y, N);
      P_SOUTH: return node_id(X, Y - 1, N);
      P_WEST:  return node_id(X - 1, Y, N);
      default: return ME;
    endcase
  endfunction

  // Routing computation: set of outputs for a head flit's destination mask.
  function automatic logic [NPORTS-1:0] route(input logic [NODES-1:0] mask);
    logic [NPORTS-1:0] t;
    logic              hi, lo;
    int unsigned       tgt, best, best_d;
    t  = '0;
    hi = 1'b0;
    lo = 1'b0;
    tgt = ME;
    for (int i = NODES - 1; i > int'(ME); i--)
      if (mask[i]) begin hi = 1'b1; tgt = i; end
    if (!hi)
      for (int i = 0; i < int'(ME); i++)
        if (mask[i]) begin lo = 1'b1; tgt = i; end
    best   = ME;
    best_d = P_LOCAL;
    for (int unsigned d = 1; d < NPORTS; d++) begin
      if (nb_exists(d)) begin
        if (hi && nb_id(d) > ME && nb_id(d) <= tgt && (best == ME || nb_id(d) > best)) begin
          best = nb_id(d); best_d = d;
        end
        if (lo && nb_id(d) < ME && nb_id(d) >= tgt && (best == ME || nb_id(d) < best)) begin
          best = nb_id(d); best_d = d;
        end
      end
    end
    if (best_d != P_LOCAL) t[best_d] = 1'b1;
    // Local copy when this node is a destination; a packet with no destination
    // left is also sunk locally so that it cannot block the network.
    if (mask[ME] || (!hi && !lo)) t[P_LOCAL] = 1'b1;
    return t;
  endfunction

  // Input buffers.
  logic [NPORTS-1:0] f_valid, f_pop;
  logic [FW-1:0]     f_flit [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_data(in_flit[p]),
      .out_valid(f_valid[p]), .out_ready(f_pop[p]), .out_data(f_flit[p]));
  end

  // Allocation state.
  logic [NPORTS-1:0] act_q;                 // input holds its outputs
  logic [NPORTS-1:0] tgt_q [NPORTS];        // outputs held by each input
  logic [NPORTS-1:0] own_v_q;               // output is reserved
  logic [PIW-1:0]    own_q [NPORTS];        // which input reserved it
  logic [PIW-1:0]    rr_q;

  logic [NPORTS-1:0] req_tgt [NPORTS];
  logic [NPORTS-1:0] is_head, is_tail, all_rdy;
  logic              grant_v;
  logic [PIW-1:0]    grant_p;

  always_comb begin
    for (int unsigned p = 0; p < NPORTS; p++) begin
      is_head[p] = flit_type_e'(f_flit[p][FW-1 -: TYPE_W]) == FLIT_HEAD;
      is_tail[p] = flit_type_e'(f_flit[p][FW-1 -: TYPE_W]) == FLIT_TAIL;
      req_tgt[p] = route(f_flit[p][NODES-1:0]);
      all_rdy[p] = &(out_ready | ~tgt_q[p]);
      f_pop[p]   = act_q[p] && f_valid[p] && all_rdy[p];
    end
    // Round-robin search for one head flit whose outputs are all free.
    grant_v = 1'b0;
    grant_p = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      int unsigned p;
      p = (32'(rr_q) + k) % NPORTS;
      if (!grant_v && !act_q[p] && f_valid[p] && is_head[p] &&
          (req_tgt[p] & own_v_q) == '0) begin
        grant_v = 1'b1;
        grant_p = PIW'(p);
      end
    end
  end

  // Crossbar: each reserved output shows its owner's flit, with this node
  // cleared from the destination set of head flits.
  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      logic [FW-1:0] fl;
      fl = f_flit[own_q[o]];
      if (flit_type_e'(fl[FW-1 -: TYPE_W]) == FLIT_HEAD) fl[ME] = 1'b0;
      out_flit[o]  = fl;
      out_valid[o] = own_v_q[o] && f_pop[own_q[o]];
    end
  end

  logic [NPORTS-1:0] release_set, grant_set;

  always_comb begin
    release_set = '0;
    for (int unsigned p = 0; p < NPORTS; p++)
      if (f_pop[p] && is_tail[p]) release_set |= tgt_q[p];
    grant_set = grant_v ? req_tgt[grant_p] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q   <= '0;
      own_v_q <= '0;
      rr_q    <= '0;
      for (int unsigned p = 0; p < NPORTS; p++) begin
        tgt_q[p] <= '0;
        own_q[p] <= '0;
      end
    end else begin
      own_v_q <= (own_v_q & ~release_set) | grant_set;
      for (int unsigned p = 0; p < NPORTS; p++)
        if (f_pop[p] && is_tail[p]) act_q[p] <= 1'b0;
      if (grant_v) begin
        act_q[grant_p] <= 1'b1;
        tgt_q[grant_p] <= grant_set;
        rr_q           <= (grant_p == PIW'(NPORTS - 1)) ? '0 : grant_p + 1'b1;
        for (int unsigned o = 0; o < NPORTS; o++)
          if (grant_set[o]) own_q[o] <= grant_p;
      end
    end
  end

endmodule
