// tb_ttn_top_full: one complete run of the TTN engine with every parameter
// at its default (full-parallel nodes, N = 16, D0 = 2, X0 = 8): weights over
// AXI-Lite, one idle-design latency measurement, and a stream of samples
// checked against the reference model: 500 samples, the size of the
// N = 16 evaluation run. See ttn_top_harness.
module tb_ttn_top_full;
  import ttn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic done;
  int   checks, failures;

  ttn_top_harness #(.IMPL(IMPL_FP), .NSAMP(500)) u_h (.clk, .rst_n, .done, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
