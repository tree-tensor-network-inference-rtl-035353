// tb_dsp_mult: checks the pipelined fixed-point multiplier against the
// reference product (floor, saturation) for random and corner operands, and
// that a product appears exactly LAT enabled cycles after its operands,
// including across cycles with en low.
module tb_dsp_mult;
  import ttn_pkg::*;
  import ttn_ref_pkg::*;

  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, en = 0;
  fx_t  a = '0, b = '0, p;
  int   checks = 0, failures = 0;

  dsp_mult #(.LAT(LAT)) dut (.clk, .rst_n, .en, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int enabled_cycles[$];

  initial begin
    int ea, eb, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check the output produced by the previous edge
      en = ($urandom_range(0, 3) != 0);
      case (t % 50)
        0: begin ea = 32767; eb = 32767; end
        1: begin ea = -32768; eb = -32768; end
        2: begin ea = -32768; eb = 32767; end
        3: begin ea = -1; eb = 1; end
        default: begin ea = $signed(16'($urandom)); eb = $signed(16'($urandom)); end
      endcase
      a = fx_t'(ea);
      b = fx_t'(eb);
      @(posedge clk);
      if (en) begin
        exp_q.push_back(ref_mul(ea, eb));
        if (exp_q.size() > LAT) void'(exp_q.pop_front());
        if (exp_q.size() == LAT) begin
          #1;
          checks++;
          if (int'(p) != exp_q[0]) begin
            failures++;
            if (failures < 10) $display("mismatch: p=%0d expected %0d", p, exp_q[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
