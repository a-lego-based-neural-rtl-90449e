// tb_neulego_blk_add: self-checking testbench for neulego_blk_add.
//
// Random operand pairs; the result must be lane 0 + lane 1 of the last batch (disabled lanes
// count as zero), with nothing carried over from earlier batches.
module tb_neulego_blk_add;
  import dnnoc_pkg::*;

  localparam int unsigned BATCH = 4;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             in_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [BATCH-1:0] lane_en = '1;
  data_t            x [BATCH];
  data_t            w [BATCH];
  data_t            recip;
  data_t            result;
  logic             result_valid;
  data_t exp_r;
  neulego_blk_add #(.BATCH(BATCH)) dut (.*);
  logic unused_w;
  assign unused_w = ^{w[0], recip};

  initial begin
    for (int i = 0; i < BATCH; i++) begin x[i] = '0; w[i] = '0; end
    recip = data_t'(64);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      int unsigned k_n;
      k_n = 1 + $urandom % 4;

      for (int unsigned k = 0; k < k_n; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        first    = (k == 0);
        last     = (k == k_n - 1);
        lane_en  = last ? BATCH'($urandom % (1 << BATCH)) : '1;
        for (int i = 0; i < BATCH; i++) begin
          x[i] = data_t'($urandom % 2048) - data_t'(1024);
          w[i] = data_t'($urandom % 1024) - data_t'(512);
        end
        exp_r = sat(longint'(lane_en[0] ? x[0] : data_t'(0)) + longint'(lane_en[1] ? x[1] : data_t'(0)));
        @(posedge clk);
        #1;
        chk(result_valid == last, $sformatf("result_valid one cycle after batch %0d", k));
        if (last) chk(result == exp_r, $sformatf("trial %0d result %0d expected %0d", trial, result, exp_r));
      end
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk);
      #1;
      chk(!result_valid, "result_valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
