// tb_weight_memory: self-checking testbench for weight_memory.
//
// Checks the reset values of the parameter words (neutral batch norm), writes
// every weight and parameter word at its bank-major address, then reads every
// line (one cycle latency) and the parameter outputs and compares them with the
// written values.
module tb_weight_memory;
  import dnnoc_pkg::*;
  localparam int unsigned NB = 4, BT = 4, WL = 4;
  localparam int unsigned BANK_WORDS = WL * BT + NPARAM;
  localparam int unsigned AW = $clog2(NB * BANK_WORDS);
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

  logic          we = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] waddr = '0;
  data_t         wdata = '0;
  logic [1:0]    rd_line = '0;
  data_t         rd_data [NB][BT];
  data_t         prm [NB][NPARAM];
  data_t         ref_m [NB][BANK_WORDS];

  weight_memory #(.NUM_BLK(NB), .BATCH(BT), .WLINES(WL)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int b = 0; b < NB; b++) begin
      chk(prm[b][PRM_GAMMA] == 16'sd256 && prm[b][PRM_INVSTD] == 16'sd256 &&
          prm[b][PRM_MU] == 0 && prm[b][PRM_BETA] == 0 && prm[b][PRM_RECIP] == 16'sd256,
          "neutral parameters after reset");
    end
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < NB * BANK_WORDS; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = data_t'($urandom);
      ref_m[a / BANK_WORDS][a % BANK_WORDS] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int l = 0; l < WL; l++) begin
      rd_en = 1'b1; rd_line = 2'(l);
      @(posedge clk);
      #1;
      rd_en = 1'b0;
      for (int b = 0; b < NB; b++)
        for (int i = 0; i < BT; i++)
          chk(rd_data[b][i] == ref_m[b][l * BT + i], $sformatf("bank %0d line %0d lane %0d", b, l, i));
      @(negedge clk);
    end
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < NPARAM; p++)
        chk(prm[b][p] == ref_m[b][WL * BT + p], $sformatf("bank %0d param %0d", b, p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
