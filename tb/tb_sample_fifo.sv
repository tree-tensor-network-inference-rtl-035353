// tb_sample_fifo: random pushes and pops against a queue model. Checks
// first-in first-out order, the fill count, that the FIFO refuses words when
// full (the full condition is reached and tested) and that it never offers
// a word when empty.
module tb_sample_fifo;
  localparam int W = 32, DEPTH = 8;
  logic         clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int           checks = 0, failures = 0, fulls = 0;

  sample_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model[$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: fill up, drain, mixed
      in_valid  = ((t / 500) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      out_ready = ((t / 500) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      in_data   = $urandom;
      #1;
      check("count", count, model.size());
      check("in_ready", in_ready, model.size() < DEPTH);
      check("out_valid", out_valid, model.size() > 0);
      if (out_valid) check("data", out_data, model[0]);
      if (!in_ready) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) model.delete(0);
      if (in_valid && in_ready) model.push_back(in_data);
    end
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
