// tb_feature_map: streams random samples of N features through the feature
// map with random stalls (en low) and checks every [cos, sin] pair and that
// results leave exactly two enabled cycles after their sample.
module tb_feature_map;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  fx_t  feat [N];
  fx_t  phi  [N][2];
  int   checks = 0, failures = 0;

  feature_map #(.N(N)) dut (.clk, .rst_n, .en, .in_valid, .feat, .out_valid, .phi);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int sample_t[N];
  sample_t sent[$];
  int      vld_pipe[$];   // valid of the last enabled inputs
  int      outs = 0;

  initial begin
    sample_t smp;
    foreach (feat[i]) feat[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en       = ($urandom_range(0, 4) != 0);
      in_valid = ($urandom_range(0, 2) != 0);
      for (int i = 0; i < N; i++) begin
        smp[i]  = $urandom_range(0, 25736);
        feat[i] = fx_t'(smp[i]);
      end
      @(posedge clk);
      if (en) begin
        vld_pipe.push_back(in_valid);
        if (in_valid) sent.push_back(smp);
        #1;
        if (vld_pipe.size() > 2) void'(vld_pipe.pop_front());
        if (vld_pipe.size() == 2) begin
          checks++;
          if (out_valid != vld_pipe[0][0]) begin
            failures++;
            $display("out_valid timing wrong at t=%0d", t);
          end
          if (out_valid && sent.size() > 0) begin
            sample_t e;
            e = sent[0];
            sent.delete(0);
            outs++;
            for (int i = 0; i < N; i++) begin
              checks += 2;
              if (int'(phi[i][0]) != ref_trig(e[i], 1'b0)) begin failures++; if (failures < 5) $display("cos %0d: got %0d exp %0d", e[i], phi[i][0], ref_trig(e[i], 1'b0)); end
              if (int'(phi[i][1]) != ref_trig(e[i], 1'b1)) failures++;
            end
          end
        end
      end
    end
    if (outs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
