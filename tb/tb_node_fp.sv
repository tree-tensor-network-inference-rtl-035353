// tb_node_fp: full-parallel node contraction. Two nodes are tested, the leaf
// shape (DIN 2, DOUT 4) and an inner shape (DIN 4, DOUT 8), with random
// weights and inputs streamed every cycle and random stalls. Every output
// vector is compared with the reference contraction, and out_valid must
// follow in_valid by exactly LAT * (2 + log2(DIN^2)) enabled cycles
// (16 and 24 cycles here).
module tb_node_fp;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- node A: 2 -> 4 ----
  localparam int DA = 2, OA = 4;
  fx_t xa [DA], ya [DA], wa [OA*DA*DA], za [OA];
  logic va;
  node_fp #(.DIN(DA), .DOUT(OA), .LAT(LAT)) u_a (
    .clk, .rst_n, .en, .in_valid, .x(xa), .y(ya), .w(wa), .out_valid(va), .z(za));

  // ---- node B: 4 -> 8 ----
  localparam int DB = 4, OB = 8;
  fx_t xb [DB], yb [DB], wb [OB*DB*DB], zb [OB];
  logic vb;
  node_fp #(.DIN(DB), .DOUT(OB), .LAT(LAT)) u_b (
    .clk, .rst_n, .en, .in_valid, .x(xb), .y(yb), .w(wb), .out_valid(vb), .z(zb));

  ivec_t wqa, wqb, expa[$], expb[$];
  int    hist[$];  // in_valid of enabled cycles
  int    outs = 0;

  function automatic int rnd16();
    return $signed(16'($urandom)) / 2;  // within [-1, 1)
  endfunction

  initial begin
    ivec_t x, y;
    for (int i = 0; i < OA*DA*DA; i++) begin wqa.push_back(rnd16()); wa[i] = fx_t'(wqa[i]); end
    for (int i = 0; i < OB*DB*DB; i++) begin wqb.push_back(rnd16()); wb[i] = fx_t'(wqb[i]); end
    foreach (xa[i]) begin xa[i] = '0; ya[i] = '0; end
    foreach (xb[i]) begin xb[i] = '0; yb[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en       = (t > 1500) ? 1'b1 : ($urandom_range(0, 4) != 0);
      in_valid = (t < 1500) && ($urandom_range(0, 3) != 0);
      x = {}; y = {};
      for (int i = 0; i < DA; i++) begin x.push_back(rnd16()); y.push_back(rnd16()); xa[i] = fx_t'(x[i]); ya[i] = fx_t'(y[i]); end
      if (in_valid && en) expa.push_back(ref_node(x, y, wqa, DA, OA));
      x = {}; y = {};
      for (int i = 0; i < DB; i++) begin x.push_back(rnd16()); y.push_back(rnd16()); xb[i] = fx_t'(x[i]); yb[i] = fx_t'(y[i]); end
      if (in_valid && en) expb.push_back(ref_node(x, y, wqb, DB, OB));
      @(posedge clk);
      if (en) begin
        hist.push_front(int'(in_valid));
        #1;
        // latency: out_valid equals in_valid of LAT*(2+log2 K) enabled cycles ago
        if (hist.size() > 16) begin
          checks++;
          if (int'(va) != hist[16-1]) failures++;
        end
        if (hist.size() > 24) begin
          checks++;
          if (int'(vb) != hist[24-1]) failures++;
        end
        if (va) begin
          ivec_t e;
          e = expa.pop_front();
          outs++;
          for (int m = 0; m < OA; m++) begin
            checks++;
            if (int'(za[m]) != e[m]) begin
              failures++;
              if (failures < 10) $display("A z[%0d]=%0d expected %0d", m, za[m], e[m]);
            end
          end
        end
        if (vb) begin
          ivec_t e;
          e = expb.pop_front();
          for (int m = 0; m < OB; m++) begin
            checks++;
            if (int'(zb[m]) != e[m]) begin
              failures++;
              if (failures < 10) $display("B z[%0d]=%0d expected %0d", m, zb[m], e[m]);
            end
          end
        end
      end
    end
    if (outs < 500 || expa.size() != 0 || expb.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
