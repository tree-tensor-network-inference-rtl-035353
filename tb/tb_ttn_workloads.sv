// tb_ttn_workloads: the two evaluation runs of the design, with random
// samples in place of the datasets: the N = 8 tree with bond dimensions
// X = 2, 4, 8, 1 (X0 = 8) over 100 samples, in both node types, and the
// N = 16 partial-parallel tree (X = 2, 4, 8, 8, 1) over 500 samples. The
// N = 16 full-parallel tree runs 500 samples in tb_ttn_top_full. Every
// result is checked against the reference model (see ttn_top_harness).
module tb_ttn_workloads;
  import ttn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic d0, d1, d2;
  int   c0, f0, c1, f1, c2, f2;

  ttn_top_harness #(.IMPL(IMPL_FP), .N(8),  .X0(8), .NSAMP(100)) u_n8_fp  (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  ttn_top_harness #(.IMPL(IMPL_PP), .N(8),  .X0(8), .NSAMP(100)) u_n8_pp  (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  ttn_top_harness #(.IMPL(IMPL_PP), .N(16), .X0(8), .NSAMP(500)) u_n16_pp (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
