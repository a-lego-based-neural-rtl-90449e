// tb_ext_relu: self-checking testbench for ext_relu.
//
// Random signed inputs, including zero and the extremes; the output must be
// max(0, x), registered one cycle after in_valid.
module tb_ext_relu;
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
  data_t x, y;

  ext_relu dut (.*);

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (t)
        0: x = DATA_MIN;
        1: x = DATA_MAX;
        2: x = '0;
        3: x = -16'sd1;
        default: x = data_t'($urandom);
      endcase
      @(posedge clk);
      #1;
      chk(out_valid, "out_valid one cycle after in_valid");
      chk(y == ((x[15] == 1'b1) ? data_t'(0) : x), $sformatf("relu(%0d) = %0d", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
