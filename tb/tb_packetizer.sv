// tb_packetizer: self-checking testbench for packetizer.
//
// 3 x 3 mesh, 9 results per packet, source node (x=2, y=0). First the packet
// of the worked example: results 9 9 9 9 6 0 0 0 0 to nodes 5..8 must give a
// head flit {2, 0, 0b111100000}, three body flits (9,4) (6,1) (0,4), stored as
// length - 1, and a tail flit. Then random packets with few distinct values and
// random output back-pressure are compared with a reference encoder written
// here; the first packet is also timed (one result per cycle).
module tb_packetizer;
  import dnnoc_pkg::*;
  localparam int unsigned N = 3, NB = 9, NODES = 9, LEN_W = 4, PAY_W = 20, FW = 22;

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

  logic             in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [NODES-1:0] in_mask = '0;
  data_t            in_data = '0;
  logic             out_valid, out_ready = 1'b1;
  logic [FW-1:0]    out_flit;
  int               bp_pct = 0;

  packetizer #(.N(N), .NUM_BLK(NB), .X(2), .Y(0)) dut (.*);

  logic [FW-1:0] got [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_flit);
  always @(negedge clk) out_ready = ($urandom % 100) >= bp_pct;

  function automatic logic [FW-1:0] body(data_t v, int len);
    return {FLIT_BODY, PAY_W'({v, LEN_W'(len - 1)})};
  endfunction

  task automatic send(input data_t d [], input logic [NODES-1:0] m);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_data = d[i]; in_mask = m; in_last = (i == d.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0; in_last = 1'b0;
  endtask

  task automatic expect_flits(input logic [FW-1:0] e [$], input string tag);
    int guard;
    guard = 0;
    while (got.size() < e.size() && guard < 1000) begin @(posedge clk); guard++; end
    chk(got.size() == e.size(), $sformatf("%s: %0d flits, expected %0d", tag, got.size(), e.size()));
    for (int i = 0; i < e.size() && i < got.size(); i++)
      chk(got[i] == e[i], $sformatf("%s flit %0d: %h expected %h", tag, i, got[i], e[i]));
    got.delete();
  endtask

  initial begin
    data_t d [];
    logic [FW-1:0] e [$];
    int t0, t1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    d = '{16'sd9, 16'sd9, 16'sd9, 16'sd9, 16'sd6, 16'sd0, 16'sd0, 16'sd0, 16'sd0};
    e = '{{FLIT_HEAD, PAY_W'({2'd2, 2'd0, 9'b111100000})}, body(9, 4), body(6, 1), body(0, 4),
          {FLIT_TAIL, PAY_W'(0)}};
    t0 = $time / 10;
    send(d, 9'b111100000);
    t1 = $time / 10;
    chk(t1 - t0 <= 11, $sformatf("nine results accepted in %0d cycles", t1 - t0));
    expect_flits(e, "example");

    bp_pct = 40;
    for (int trial = 0; trial < 30; trial++) begin
      logic [NODES-1:0] m;
      int run;
      m = NODES'($urandom);
      d = new[1 + $urandom % 20];
      foreach (d[i]) d[i] = data_t'($urandom % 3);
      if (trial == 0) foreach (d[i]) d[i] = 16'sd5;   // one long run, split at 2^LEN_W
      e = '{{FLIT_HEAD, PAY_W'({2'd2, 2'd0, m})}};
      run = 1;
      for (int i = 1; i <= d.size(); i++) begin
        if (i == d.size() || d[i] != d[i-1] || run == (1 << LEN_W)) begin
          e.push_back(body(d[i-1], run));
          run = 1;
        end else run++;
      end
      e.push_back({FLIT_TAIL, PAY_W'(0)});
      send(d, m);
      expect_flits(e, $sformatf("trial %0d", trial));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
