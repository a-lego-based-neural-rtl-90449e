// tb_router: self-checking testbench for router.
//
// The router of node 4, the centre of a 3 x 3 mesh (neighbours: north 7,
// east 3, south 1, west 5 on the boustrophedon numbering). Each case injects
// a packet (head, two bodies, tail) on one input with a destination set
// chosen so that the next hop is known from the numbering:
//   {5,6,7,8} from local  -> west (5 is the next node up the path)
//   {4,7}     from south  -> local copy and north (7 is the farthest
//                            neighbour not beyond 7), node 4 cleared
//   {0,2}     from north  -> east (3, the nearest neighbour toward 2)
//   {4}       from west   -> local only
//   {8}       from west   -> north
//   {0}       from east   -> south
// Every output must carry exactly the expected flits in order, with this
// node's bit cleared in forwarded heads. Finally two packets from two inputs
// compete for the west output at once: both must arrive whole, one after the
// other, under random back-pressure.
module tb_router;
  import dnnoc_pkg::*;
  localparam int unsigned N = 3, NB = 9, NODES = 9, PAY_W = 20, FW = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  logic [FW-1:0]     in_flit  [NPORTS];
  logic [FW-1:0]     out_flit [NPORTS];
  int                bp_pct = 0;

  router #(.N(N), .X(1), .Y(1), .NUM_BLK(NB)) dut (.*);

  logic [FW-1:0] got [NPORTS][$];
  always @(posedge clk)
    if (rst_n)
      for (int o = 0; o < NPORTS; o++)
        if (out_valid[o] && out_ready[o]) got[o].push_back(out_flit[o]);
  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom % 100) >= bp_pct;

  function automatic logic [FW-1:0] head(logic [NODES-1:0] m);
    return {FLIT_HEAD, PAY_W'({2'd0, 2'd0, m})};
  endfunction
  function automatic logic [FW-1:0] body(int v);
    return {FLIT_BODY, PAY_W'(v)};
  endfunction
  localparam logic [FW-1:0] TAIL = {FLIT_TAIL, PAY_W'(0)};

  task automatic inject(input int p, input logic [FW-1:0] f [4]);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      in_valid[p] = 1'b1; in_flit[p] = f[i];
      @(posedge clk);
      while (!in_ready[p]) @(posedge clk);
    end
    @(negedge clk);
    in_valid[p] = 1'b0;
  endtask

  task automatic expect_out(input logic [NPORTS-1:0] outs, input logic [FW-1:0] f [4],
                            input logic [NODES-1:0] fwd_mask, input string tag);
    repeat (12) @(posedge clk);
    for (int o = 0; o < NPORTS; o++) begin
      if (outs[o]) begin
        chk(got[o].size() == 4, $sformatf("%s: port %0d got %0d flits", tag, o, got[o].size()));
        if (got[o].size() == 4) begin
          chk(got[o][0][NODES-1:0] == fwd_mask, $sformatf("%s: port %0d head mask %b", tag, o, got[o][0][NODES-1:0]));
          for (int i = 1; i < 4; i++) chk(got[o][i] == f[i], $sformatf("%s: port %0d flit %0d", tag, o, i));
        end
      end else begin
        chk(got[o].size() == 0, $sformatf("%s: port %0d got %0d stray flits", tag, o, got[o].size()));
      end
      got[o].delete();
    end
  endtask

  task automatic one_case(input int p, input logic [NODES-1:0] m, input logic [NPORTS-1:0] outs,
                          input string tag);
    logic [FW-1:0] f [4];
    f = '{head(m), body(100 + p), body(200 + p), TAIL};
    inject(p, f);
    expect_out(outs, f, m & ~9'b000010000, tag);
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) in_flit[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    one_case(P_LOCAL, 9'b111100000, 5'b10000, "{5,6,7,8} from local -> west");
    one_case(P_SOUTH, 9'b010010000, 5'b00011, "{4,7} from south -> local + north");
    one_case(P_NORTH, 9'b000000101, 5'b00100, "{0,2} from north -> east");
    one_case(P_WEST,  9'b000010000, 5'b00001, "{4} -> local");
    one_case(P_WEST,  9'b100000000, 5'b00010, "{8} -> north");
    one_case(P_EAST,  9'b000000001, 5'b01000, "{0} -> south");

    // two packets for the west output at once, with back-pressure
    bp_pct = 30;
    fork
      inject(P_LOCAL, '{head(9'b000100000), body(1), body(2), TAIL});
      inject(P_SOUTH, '{head(9'b001100000), body(3), body(4), TAIL});
    join
    repeat (40) @(posedge clk);
    chk(got[P_WEST].size() == 8, $sformatf("contention: %0d flits on west", got[P_WEST].size()));
    if (got[P_WEST].size() == 8) begin
      chk(flit_type_e'(got[P_WEST][0][FW-1 -: 2]) == FLIT_HEAD &&
          flit_type_e'(got[P_WEST][3][FW-1 -: 2]) == FLIT_TAIL &&
          flit_type_e'(got[P_WEST][4][FW-1 -: 2]) == FLIT_HEAD &&
          flit_type_e'(got[P_WEST][7][FW-1 -: 2]) == FLIT_TAIL, "packets not interleaved");
      chk(got[P_WEST][1] + 1 == got[P_WEST][2] && got[P_WEST][5] + 1 == got[P_WEST][6],
          "bodies stay with their packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
