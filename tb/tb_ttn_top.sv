// tb_ttn_top: end-to-end test of the TTN engine in the two configurations
// of the published results table, side by side: partial-parallel nodes with
// N = 16, X0 = 8 (expected tree latency 692 cycles) and full-parallel nodes
// with N = 8, X0 = 4 (64 cycles). The full-parallel N = 16 engine is run by
// tb_ttn_top_full. See ttn_top_harness for what each run does and checks.
module tb_ttn_top;
  import ttn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic done_fp, done_pp;
  int   c_fp, f_fp, c_pp, f_pp;

  ttn_top_harness #(.IMPL(IMPL_FP), .N(8), .X0(4), .NSAMP(150)) u_fp (.clk, .rst_n, .done(done_fp), .checks(c_fp), .failures(f_fp));
  ttn_top_harness #(.IMPL(IMPL_PP), .NSAMP(40)) u_pp (.clk, .rst_n, .done(done_pp), .checks(c_pp), .failures(f_pp));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_fp + c_pp, f_fp + f_pp + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_fp && done_pp);
    $display("TB_RESULT checks=%0d failures=%0d", c_fp + c_pp, f_fp + f_pp);
    $finish;
  end
endmodule
