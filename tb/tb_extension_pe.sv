// tb_extension_pe: self-checking testbench for extension_pe.
//
// Four blocks with random parameters; all four combinations of bn_en and
// relu_en are tried. Expected values are computed with the batch-norm formula
// (saturating at each step) followed by max(0, .); the latency must be two
// cycles from in_valid to out_valid.
module tb_extension_pe;
  import dnnoc_pkg::*;
  localparam int unsigned NB = 4;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  in_valid = 1'b0, bn_en = 1'b0, relu_en = 1'b0, out_valid;
  data_t x   [NB];
  data_t prm [NB][NPARAM];
  data_t y   [NB];

  extension_pe #(.NUM_BLK(NB)) dut (.*);

  function automatic data_t bn(data_t xv, data_t m, data_t g, data_t s, data_t b);
    longint c, t1, t2;
    c  = longint'(sat(longint'(xv) - longint'(m)));
    t1 = longint'(sat((c * longint'(g)) >>> 8));
    t2 = longint'(sat((t1 * longint'(s)) >>> 8));
    return sat(t2 + longint'(b));
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin
      x[b] = '0;
      for (int p = 0; p < NPARAM; p++) prm[b][p] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      data_t e [NB];
      @(negedge clk);
      in_valid = 1'b1;
      bn_en    = t[0];
      relu_en  = t[1];
      for (int b = 0; b < NB; b++) begin
        x[b] = data_t'($urandom % 8192) - data_t'(4096);
        prm[b][PRM_MU]     = data_t'($urandom % 512) - data_t'(256);
        prm[b][PRM_GAMMA]  = data_t'($urandom % 512);
        prm[b][PRM_INVSTD] = data_t'($urandom % 512);
        prm[b][PRM_BETA]   = data_t'($urandom % 512) - data_t'(256);
        e[b] = bn_en ? bn(x[b], prm[b][PRM_MU], prm[b][PRM_GAMMA], prm[b][PRM_INVSTD],
                          prm[b][PRM_BETA]) : x[b];
        if (relu_en && e[b] < 0) e[b] = '0;
      end
      @(posedge clk);
      #1;
      chk(!out_valid, "no output after one cycle");
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk);
      #1;
      chk(out_valid, "out_valid two cycles after in_valid");
      for (int b = 0; b < NB; b++)
        chk(y[b] == e[b], $sformatf("t %0d blk %0d: %0d expected %0d", t, b, y[b], e[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
