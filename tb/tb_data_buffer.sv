// tb_data_buffer: self-checking testbench for data_buffer.
//
// Writes random words through both ports, in interleaved and broadcast mode,
// into a reference model of the banks, then reads every line back (one cycle
// read latency) and compares all banks and lanes.
module tb_data_buffer;
  import dnnoc_pkg::*;
  localparam int unsigned NB = 4, BT = 4, LN = 4, WORDS = LN * BT;
  localparam int unsigned AW = $clog2(NB * WORDS);
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

  logic [1:0]    we = '0, bcast = '0;
  logic [AW-1:0] waddr [2];
  data_t         wdata [2];
  logic          rd_en = 1'b0;
  logic [1:0]    rd_line = '0;
  data_t         rd_data [NB][BT];
  data_t         ref_m [NB][WORDS];

  data_buffer #(.NUM_BLK(NB), .BATCH(BT), .LINES(LN)) dut (.*);

  logic unused_rst;
  assign unused_rst = rst_n;

  initial begin
    waddr = '{default: '0};
    wdata = '{default: '0};
    @(negedge clk);
    // fill everything in interleaved mode through port 0
    for (int e = 0; e < NB * WORDS; e++) begin
      we = 2'b01; bcast = 2'b00; waddr[0] = AW'(e); wdata[0] = data_t'($urandom);
      ref_m[e % NB][e / NB] = wdata[0];
      @(negedge clk);
    end
    // random writes on both ports
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < 2; p++) begin
        we[p]    = $urandom % 2;
        bcast[p] = ($urandom % 4) == 0;
        waddr[p] = AW'($urandom);
        wdata[p] = data_t'($urandom);
      end
      for (int p = 0; p < 2; p++)
        if (we[p]) begin
          if (bcast[p]) for (int b = 0; b < NB; b++) ref_m[b][waddr[p] % WORDS] = wdata[p];
          else ref_m[waddr[p] % NB][(waddr[p] / NB) % WORDS] = wdata[p];
        end
      @(negedge clk);
    end
    we = '0;
    for (int l = 0; l < LN; l++) begin
      rd_en = 1'b1; rd_line = 2'(l);
      @(posedge clk);
      #1;
      rd_en = 1'b0;
      for (int b = 0; b < NB; b++)
        for (int i = 0; i < BT; i++)
          chk(rd_data[b][i] == ref_m[b][l * BT + i],
              $sformatf("bank %0d line %0d lane %0d", b, l, i));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
