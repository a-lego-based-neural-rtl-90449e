// tb_global_buffer: self-checking testbench for global_buffer.
//
// A small instance: random writes through both ports (port B wins a same-word
// collision) against a reference array, then reads through both ports with
// the one-cycle latency.
module tb_global_buffer;
  import dnnoc_pkg::*;
  localparam int unsigned WORDS = 64;
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

  logic       a_we = 1'b0, a_re = 1'b0, b_we = 1'b0, b_re = 1'b0;
  logic [5:0] a_addr = '0, b_addr = '0;
  data_t      a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  data_t      ref_m [WORDS];

  global_buffer #(.WORDS(WORDS)) dut (.*);

  logic unused_rst;
  assign unused_rst = rst_n;

  initial begin
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      a_we = 1'b1; a_addr = 6'(a); a_wdata = data_t'($urandom); ref_m[a] = a_wdata;
      @(negedge clk);
    end
    for (int t = 0; t < 300; t++) begin
      a_we = $urandom % 2; b_we = $urandom % 2;
      a_addr = 6'($urandom); b_addr = ($urandom % 4 == 0) ? a_addr : 6'($urandom);
      a_wdata = data_t'($urandom); b_wdata = data_t'($urandom);
      if (a_we) ref_m[a_addr] = a_wdata;
      if (b_we) ref_m[b_addr] = b_wdata;
      @(negedge clk);
    end
    a_we = 1'b0; b_we = 1'b0;
    for (int a = 0; a < WORDS; a++) begin
      a_re = 1'b1; b_re = 1'b1; a_addr = 6'(a); b_addr = 6'(WORDS - 1 - a);
      @(posedge clk);
      #1;
      chk(a_rdata == ref_m[a], $sformatf("port A word %0d", a));
      chk(b_rdata == ref_m[WORDS - 1 - a], $sformatf("port B word %0d", WORDS - 1 - a));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
