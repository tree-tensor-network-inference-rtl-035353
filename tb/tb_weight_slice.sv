// tb_weight_slice: fills two register blocks with random words and checks
// that weight i is half i%2 of register (i%1024)/2 of block i/1024, one
// clock after the registers change.
module tb_weight_slice;
  import ttn_pkg::*;

  localparam int NB = 2, NREG = 512, NW = 1728;
  logic        clk = 0, rst_n = 0;
  logic [31:0] regs [NB][NREG];
  fx_t         w [NW];
  int          checks = 0, failures = 0;

  weight_slice #(.NB(NB), .NREG(NREG), .NW(NW)) dut (.clk, .rst_n, .regs, .w);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (regs[b, r]) regs[b][r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      logic [31:0] old;
      @(negedge clk);
      old = regs[1][100];
      foreach (regs[b, r]) regs[b][r] = $urandom;
      regs[1][100] = ~old;
      #1;
      // the new values are not visible before the clock edge
      if (round > 0) begin
        checks++;
        if (w[1024 + 200] != fx_t'(old[15:0])) failures++;
      end
      @(posedge clk); #1;
      for (int i = 0; i < NW; i++) begin
        logic [31:0] r;
        r = regs[i / 1024][(i % 1024) / 2];
        checks++;
        if (w[i] != ((i % 2) ? fx_t'(r[31:16]) : fx_t'(r[15:0]))) begin
          failures++;
          if (failures < 10) $display("w[%0d]=%h from %h", i, w[i], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
