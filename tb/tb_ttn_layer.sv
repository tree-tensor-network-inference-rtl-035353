// tb_ttn_layer: a layer of three nodes (DIN 2, DOUT 4), once full parallel
// and once partial parallel. Each node has its own random weights and its
// own pair of input vectors; every node output is compared with the
// reference contraction of the right vector pair and weight slice, and the
// layer latency is checked (16 and 36 cycles with a DSP latency of 4).
module tb_ttn_layer;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int NODES = 3, DIN = 2, DOUT = 4, LAT = 4;
  localparam int NWN = DOUT * DIN * DIN;
  logic clk = 0, rst_n = 0;
  fx_t  in_vec [2*NODES][DIN];
  fx_t  w [NODES*NWN];
  fx_t  out_fp [NODES][DOUT], out_pp [NODES][DOUT];
  logic iv_fp = 0, ir_fp, ov_fp, iv_pp = 0, ir_pp, ov_pp, or_pp = 0;
  int   checks = 0, failures = 0;

  ttn_layer #(.NODES(NODES), .DIN(DIN), .DOUT(DOUT), .LAT(LAT), .IMPL(IMPL_FP)) u_fp (
    .clk, .rst_n, .en(1'b1), .in_valid(iv_fp), .in_ready(ir_fp), .in_vec, .w,
    .out_valid(ov_fp), .out_ready(1'b1), .out_vec(out_fp));
  ttn_layer #(.NODES(NODES), .DIN(DIN), .DOUT(DOUT), .LAT(LAT), .IMPL(IMPL_PP)) u_pp (
    .clk, .rst_n, .en(1'b0), .in_valid(iv_pp), .in_ready(ir_pp), .in_vec, .w,
    .out_valid(ov_pp), .out_ready(or_pp), .out_vec(out_pp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  ivec_t wq;

  function automatic ivec_t expected(input int j);
    ivec_t x, y, wn;
    for (int k = 0; k < DIN; k++) begin
      x.push_back(int'(in_vec[2*j][k]));
      y.push_back(int'(in_vec[2*j+1][k]));
    end
    for (int k = 0; k < NWN; k++) wn.push_back(wq[j*NWN + k]);
    return ref_node(x, y, wn, DIN, DOUT);
  endfunction

  initial begin
    for (int i = 0; i < NODES*NWN; i++) begin
      wq.push_back($signed(16'($urandom)) / 2);
      w[i] = fx_t'(wq[i]);
    end
    foreach (in_vec[v, k]) in_vec[v][k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 20; s++) begin
      ivec_t e [NODES];
      int    t;
      @(negedge clk);
      foreach (in_vec[v, k]) in_vec[v][k] = fx_t'($signed(16'($urandom)) / 2);
      for (int j = 0; j < NODES; j++) e[j] = expected(j);
      iv_fp = 1; iv_pp = 1;
      check("pp ready", ir_pp, 1);
      @(negedge clk);
      iv_fp = 0; iv_pp = 0;
      t = 1;
      while (!ov_fp) begin @(negedge clk); t++; end
      check("fp latency", t, LAT * (2 + 2));
      for (int j = 0; j < NODES; j++)
        for (int m = 0; m < DOUT; m++) check("fp out", int'(out_fp[j][m]), e[j][m]);
      while (!ov_pp) begin @(negedge clk); t++; end
      check("pp latency", t, LAT * (DIN*DIN + DOUT + 1));
      check("pp busy", ir_pp, 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int j = 0; j < NODES; j++)
        for (int m = 0; m < DOUT; m++) check("pp out", int'(out_pp[j][m]), e[j][m]);
      or_pp = 1;
      @(negedge clk);
      or_pp = 0;
      check("pp taken", ov_pp, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
