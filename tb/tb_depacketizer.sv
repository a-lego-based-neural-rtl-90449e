// tb_depacketizer: self-checking testbench for depacketizer.
//
// 3 x 3 mesh, PE size 9. Random packets from random source nodes, each with
// random (value, length) pairs, arrive with random gaps. Every write must go
// to the source's base address plus the running element count, carry the
// pair's value, and come at one write per cycle; pkt_done must pulse once per
// tail flit.
module tb_depacketizer;
  import dnnoc_pkg::*;
  localparam int unsigned N = 3, NB = 9, NODES = 9, LEN_W = 4, PAY_W = 20, FW = 22, AW = 10;

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

  logic          in_valid = 1'b0, in_ready;
  logic [FW-1:0] in_flit = '0;
  logic [AW-1:0] rx_base [NODES];
  logic          wr_en, pkt_done;
  logic [AW-1:0] wr_addr;
  data_t         wr_data;

  depacketizer #(.N(N), .NUM_BLK(NB), .AW(AW)) dut (.*);

  typedef struct { int unsigned addr; data_t data; } wr_t;
  wr_t exp_q [$];
  int  n_done = 0, n_pkts = 0;

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      if (exp_q.size() == 0) chk(1'b0, "unexpected write");
      else begin
        wr_t e;
        e = exp_q.pop_front();
        chk(wr_addr == AW'(e.addr) && wr_data == e.data,
            $sformatf("write %0d:%0d expected %0d:%0d", wr_addr, wr_data, e.addr, e.data));
      end
    end
    if (pkt_done) n_done++;
  end

  task automatic put(input logic [FW-1:0] f);
    @(negedge clk);
    in_valid = 1'b1; in_flit = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    if ($urandom % 3 == 0) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < NODES; i++) rx_base[i] = AW'(i * 37);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 40; p++) begin
      int unsigned sx, sy, src, addr;
      sx = $urandom % 3; sy = $urandom % 3;
      src = node_id(sx, sy, N);
      addr = src * 37;
      put({FLIT_HEAD, PAY_W'({2'(sx), 2'(sy), 9'($urandom)})});
      for (int b = 0; b < 1 + $urandom % 4; b++) begin
        data_t v;
        int len;
        v = data_t'($urandom);
        len = 1 + $urandom % 5;
        for (int k = 0; k < len; k++) begin
          wr_t w;
          w.addr = addr; w.data = v;
          exp_q.push_back(w);
          addr++;
        end
        put({FLIT_BODY, PAY_W'({v, LEN_W'(len - 1)})});
      end
      put({FLIT_TAIL, PAY_W'(0)});
      n_pkts++;
    end
    repeat (20) @(posedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d writes missing", exp_q.size()));
    chk(n_done == n_pkts, $sformatf("pkt_done %0d times for %0d packets", n_done, n_pkts));
    // throughput: a body flit of length 5 writes on 5 consecutive cycles
    begin
      int c0, c1;
      put({FLIT_HEAD, PAY_W'({2'd0, 2'd0, 9'd0})});
      for (int k = 0; k < 5; k++) begin wr_t w; w.addr = k; w.data = 16'sd7; exp_q.push_back(w); end
      @(negedge clk);
      in_valid = 1'b1; in_flit = {FLIT_BODY, PAY_W'({16'sd7, 4'd4})};
      @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      c0 = $time / 10;
      while (exp_q.size() > 0) @(posedge clk);
      c1 = $time / 10;
      chk(c1 - c0 <= 5, $sformatf("five writes in %0d cycles", c1 - c0));
      put({FLIT_TAIL, PAY_W'(0)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
