// tb_ttn_tree: the N = 8, D0 = 2, X0 = 4 tree with minimal bond dimensions
// (X = 2, 4, 4, 1), built once with full-parallel and once with
// partial-parallel nodes and fed the same random samples and weights.
// Every result is compared with the reference contraction, and the latency
// from acceptance to result must be the published 64 cycles (full parallel)
// and 192 cycles (partial parallel) with the DSP latency of 4. Both trees
// see random output back-pressure; the full-parallel tree must stall and the
// partial-parallel tree must overlap layers on different samples.
module tb_ttn_tree;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int N = 8, D0 = 2, X0 = 4, O = 1, LAT = 4;
  localparam xmode_e MODE = XMODE_MINIMAL;
  localparam int NW = int'(total_weights(N, D0, X0, O, MODE));
  localparam int NSAMP = 60;

  logic clk = 0, rst_n = 0;
  fx_t  w [NW];
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("timeout: sent %0d/%0d got %0d/%0d inflight %0d fin_v %0d fin_r %0d fout_v %0d vld %b rdy %b", sent[0], sent[1], got[0], got[1], t_in[1].size(), fin_v[1], fin_r[1], fout_v[1], u_pp.vld, u_pp.rdy);
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
  ivec_t samples[$];   // flat phi of each sample
  ivec_t expect_r[$];

  // ---------------- two trees ----------------
  logic fin_v [2], fin_r [2], fout_v [2], fout_r [2];
  fx_t  phi [2][N][D0];
  fx_t  res [2][O];

  ttn_tree #(.N(N), .D0(D0), .X0(X0), .O(O), .XMODE(MODE), .IMPL(IMPL_FP), .LAT(LAT)) u_fp (
    .clk, .rst_n, .in_valid(fin_v[0]), .in_ready(fin_r[0]), .phi(phi[0]), .w,
    .out_valid(fout_v[0]), .out_ready(fout_r[0]), .result(res[0]));
  ttn_tree #(.N(N), .D0(D0), .X0(X0), .O(O), .XMODE(MODE), .IMPL(IMPL_PP), .LAT(LAT)) u_pp (
    .clk, .rst_n, .in_valid(fin_v[1]), .in_ready(fin_r[1]), .phi(phi[1]), .w,
    .out_valid(fout_v[1]), .out_ready(fout_r[1]), .result(res[1]));

  int sent [2], got [2], stalls [2], overlap = 0;
  int t_in [2][$];
  int t_empty [2][$];
  int lat_checked [2] = '{0, 0};

  // source + sink of tree k
  for (genvar k = 0; k < 2; k++) begin : g_drv
    initial begin
      fin_v[k] = 0;
      fout_r[k] = 0;
      sent[k] = 0;
      foreach (phi[k][i, c]) phi[k][i][c] = '0;
      wait (rst_n);
      while (sent[k] < NSAMP) begin
        @(negedge clk);
        fout_r[k] = ($urandom_range(0, 3) != 0);
        if (!fin_v[k] || taken[k]) begin
          // every eighth sample enters an empty partial-parallel tree
          if (k == 1 && sent[k] % 8 == 0) begin
            fin_v[k] = 0;
            while (got[k] < sent[k]) @(negedge clk) fout_r[k] = 1;
          end
          fin_v[k] = (k == 1) || ($urandom_range(0, 2) != 0);
          if (fin_v[k]) begin
            foreach (phi[k][i, c]) phi[k][i][c] = fx_t'(samples[sent[k]][i*D0 + c]);
            sent[k]++;
          end
        end
      end
      fout_r[k] = 1;
      do begin @(posedge clk); #1; end while (!taken[k]);
      @(negedge clk);
      fin_v[k] = 0;
      while (got[k] < NSAMP) @(negedge clk) fout_r[k] = ($urandom_range(0, 3) != 0);
    end
  end

  bit taken [2];
  logic held [2];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        taken[k] = fin_v[k] && fin_r[k];
        if (taken[k]) begin
          t_empty[k].push_back(t_in[k].size() == 0 && !fout_v[k]);
          t_in[k].push_back(cyc);
        end
        if (fout_v[k] && !held[k]) begin
          int t0, e0;
          t0 = t_in[k].pop_front();
          e0 = t_empty[k].pop_front();
          // exact latency: full parallel unless stalled, partial parallel
          // when the sample had the tree to itself
          if ((k == 0 && stall_window[t0] == 0) || (k == 1 && e0 != 0)) begin
            lat_checked[k]++;
            check(k ? "PP latency" : "FP latency", cyc - t0, int'(tree_latency(k ? IMPL_PP : IMPL_FP, LAT, N, D0, X0, O, MODE)));
          end
        end
        if (fout_v[k] && fout_r[k]) begin
          check(k ? "PP result" : "FP result", int'(res[k][0]), expect_r[got[k]][0]);
          got[k]++;
        end
        if (fout_v[k] && !fout_r[k]) stalls[k]++;
        held[k] = fout_v[k] && !fout_r[k];
      end
      // partial parallel: two samples inside the tree at once
      if (t_in[1].size() >= 2) overlap++;
    end
  end

  // cycles in which the full-parallel tree was stalled, to know which
  // samples may be checked for the exact latency
  int stall_window [int];
  always @(posedge clk)
    if (rst_n && fout_v[0] && !fout_r[0])
      foreach (t_in[0][q]) stall_window[t_in[0][q]] = 1;

  initial begin
    for (int i = 0; i < NW; i++) begin
      wq.push_back($signed(16'($urandom)) / 2);
      w[i] = fx_t'(wq[i]);
    end
    for (int s = 0; s < NSAMP; s++) begin
      ivec_t p;
      for (int i = 0; i < N; i++) begin
        int a;
        a = $urandom_range(0, 25736);
        p.push_back(ref_trig(a, 1'b0));
        p.push_back(ref_trig(a, 1'b1));
      end
      samples.push_back(p);
      expect_r.push_back(ref_tree(p, wq, N, D0, X0, O, MODE));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got[0] == NSAMP && got[1] == NSAMP);
    repeat (2) @(posedge clk);
    $display("stalls fp=%0d pp=%0d, overlapped cycles pp=%0d", stalls[0], stalls[1], overlap);
    $display("exact latency checked fp=%0d pp=%0d", lat_checked[0], lat_checked[1]);
    if (stalls[0] == 0 || stalls[1] == 0 || overlap == 0) failures++;
    if (lat_checked[0] == 0 || lat_checked[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
