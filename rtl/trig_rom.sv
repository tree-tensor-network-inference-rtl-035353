// trig_rom: sine or cosine lookup table of the feature map.
//
// A 65536 x 16 read-only memory addressed by the 16-bit input value itself,
// read as a fixed-point angle (1 sign, 1 integer, 14 fraction bits). Entry a
// holds round(f(a / 2^14) * 2^14) with f = cos (FUNC = 0) or sin (FUNC = 1),
// in the same format. Input angles are expected in [0, pi/2]; the rest of the
// table holds the function of the other representable angles. The read has
// two register stages (address register, output register), a latency of two
// cycles as in a block RAM with its output register enabled; en freezes both
// stages. The contents are computed when the design is elaborated instead of
// being loaded from an initialisation file.
module trig_rom
  import ttn_pkg::*;
#(
  parameter int unsigned AW   = 16,   // address bits: depth 2^AW
  parameter bit          FUNC = 1'b0  // 0: cos, 1: sin
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output fx_t           dout
);
  localparam int unsigned DEPTH = 1 << AW;

  fx_t           mem [DEPTH];
  logic [AW-1:0] addr_q;

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      real ang, v;
      // address read as a signed fixed-point angle with AW-2 fraction bits
      ang = real'($signed(AW'(i))) / real'(1 << (AW - 2));
      v   = FUNC ? $sin(ang) : $cos(ang);
      mem[i] = fx_t'($rtoi(v * real'(1 << FRAC) + ((v >= 0.0) ? 0.5 : -0.5)));
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      addr_q <= addr;
      dout   <= mem[addr_q];
    end
  end
endmodule
