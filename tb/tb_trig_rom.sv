// tb_trig_rom: reads the cosine and sine tables at corner angles (0, pi/4,
// pi/2) and random angles in [0, pi/2], compares with the rounded
// reference values and checks the two-cycle read latency and that en holds
// the output.
module tb_trig_rom;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  logic        clk = 0, en = 1;
  logic [15:0] addr = '0;
  fx_t         c, s;
  int          checks = 0, failures = 0;

  trig_rom #(.AW(16), .FUNC(1'b0)) u_cos (.clk, .en, .addr, .dout(c));
  trig_rom #(.AW(16), .FUNC(1'b1)) u_sin (.clk, .en, .addr, .dout(s));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    int ang[$];
    ang = '{0, 12868, 25736, 16384, 8192};
    for (int i = 0; i < 300; i++) ang.push_back($urandom_range(0, 25736));
    ang.push_back(-8192);
    foreach (ang[i]) begin
      @(negedge clk);
      addr = 16'(ang[i]);
      @(negedge clk);
      addr = 16'($urandom);  // must not disturb the read in flight
      @(posedge clk); #1;    // second edge after the address: data out
      check("cos", int'(c), ref_trig(ang[i], 1'b0));
      check("sin", int'(s), ref_trig(ang[i], 1'b1));
    end
    // exact corners
    @(negedge clk); addr = 16'd0;
    repeat (2) @(posedge clk); #1;
    check("cos(0)", int'(c), 16384);
    check("sin(0)", int'(s), 0);
    // en low freezes the output
    @(negedge clk); en = 0; addr = 16'd25736;
    repeat (3) @(posedge clk); #1;
    check("hold cos", int'(c), 16384);
    en = 1;
    repeat (2) @(posedge clk); #1;
    check("sin(pi/2)", int'(s), 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
