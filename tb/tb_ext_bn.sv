// tb_ext_bn: self-checking testbench for ext_bn.
//
// Random inputs and parameters; the registered output must equal
// beta + ((x - mu) * gamma >> 8) * inv_std >> 8 with saturation at each step,
// computed here with wide integers, one cycle after in_valid.
module tb_ext_bn;
  import dnnoc_pkg::*;
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

  logic  in_valid = 1'b0, out_valid;
  data_t x, mu, gamma, inv_std, beta, y;

  ext_bn dut (.*);

  function automatic data_t model(data_t xv, data_t m, data_t g, data_t s, data_t b);
    longint c, t1, t2;
    c  = longint'(sat(longint'(xv) - longint'(m)));
    t1 = longint'(sat((c * longint'(g)) >>> 8));
    t2 = longint'(sat((t1 * longint'(s)) >>> 8));
    return sat(t2 + longint'(b));
  endfunction

  initial begin
    x = '0; mu = '0; gamma = '0; inv_std = '0; beta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      data_t e;
      @(negedge clk);
      in_valid = 1'b1;
      x       = data_t'($urandom);
      mu      = data_t'($urandom % 4096) - data_t'(2048);
      gamma   = data_t'($urandom % 1024);
      inv_std = data_t'($urandom % 1024);
      beta    = data_t'($urandom % 4096) - data_t'(2048);
      if (t % 50 == 0) begin gamma = data_t'(256); inv_std = data_t'(256); mu = '0; beta = '0; end
      e = model(x, mu, gamma, inv_std, beta);
      @(posedge clk);
      #1;
      chk(out_valid, "out_valid one cycle after in_valid");
      chk(y == e, $sformatf("bn(%0d) = %0d, expected %0d", x, y, e));
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    chk(!out_valid, "out_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
