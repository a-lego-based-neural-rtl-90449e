// tb_neulego_pe: self-checking testbench for neulego_pe (MA kind).
//
// Two blocks, batch 4, four lines. The testbench models the data buffer and
// weight memory (one-cycle read latency), starts runs with random iteration
// counts and last-lane counts, and checks each block's result against the
// multiply-accumulate of its enabled inputs, and that done comes exactly K + 2
// cycles after start.
module tb_neulego_pe;
  import dnnoc_pkg::*;
  localparam int unsigned NB = 2, BT = 4, LN = 4;

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

  logic       start = 1'b0, rd_en, done, busy;
  logic [2:0] iters = '0;
  logic [2:0] last_lanes = '0;
  logic [1:0] rd_line;
  data_t      x_line [NB][BT];
  data_t      w_line [NB][BT];
  data_t      prm    [NB][NPARAM];
  data_t      result [NB];
  data_t      xm [NB][LN][BT];
  data_t      wm [NB][LN][BT];

  neulego_pe #(.KIND(PE_MA), .NUM_BLK(NB), .BATCH(BT), .LINES(LN)) dut (.*);

  always @(posedge clk)
    if (rd_en)
      for (int b = 0; b < NB; b++) begin
        x_line[b] <= xm[b][rd_line];
        w_line[b] <= wm[b][rd_line];
      end

  initial begin
    for (int b = 0; b < NB; b++) for (int p = 0; p < NPARAM; p++) prm[b][p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 30; trial++) begin
      int k, ll, c0, c1;
      longint acc [NB];
      k  = 1 + $urandom % LN;
      ll = $urandom % (BT + 1);
      for (int b = 0; b < NB; b++) begin
        acc[b] = 0;
        for (int l = 0; l < LN; l++)
          for (int i = 0; i < BT; i++) begin
            xm[b][l][i] = data_t'($urandom % 2048) - data_t'(1024);
            wm[b][l][i] = data_t'($urandom % 512) - data_t'(256);
            if (l < k && (l < k - 1 || ll == 0 || i < ll))
              acc[b] += longint'(xm[b][l][i]) * longint'(wm[b][l][i]);
          end
      end
      @(negedge clk);
      start = 1'b1; iters = 3'(k); last_lanes = 3'(ll);
      c0 = $time / 10;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      c1 = $time / 10;
      chk(c1 - c0 == k + 2, $sformatf("done after %0d cycles, expected %0d", c1 - c0, k + 2));
      for (int b = 0; b < NB; b++)
        chk(result[b] == sat(acc[b] >>> 8), $sformatf("trial %0d blk %0d: %0d expected %0d",
                                                       trial, b, result[b], sat(acc[b] >>> 8)));
      @(negedge clk);
      chk(!busy, "PE idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
