// weight_slice: register slice between the weight register blocks and the
// tree.
//
// Splits every 32-bit register into two 16-bit weights (low half first:
// weight i is half i%2 of register (i%1024)/2 of block i/1024) and
// registers them, so the long wires from the register blocks to the many
// multipliers of the tree get a pipeline stage of their own. Only the NW
// weights the tree uses are produced. The weights are static during
// inference, so the one-cycle delay has no effect on results.
module weight_slice
  import ttn_pkg::*;
#(
  parameter int unsigned NB   = 2,    // register blocks
  parameter int unsigned NREG = 512,  // registers per block
  parameter int unsigned NW   = 1728  // weights used by the tree
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] regs [NB][NREG],
  output fx_t         w    [NW]
);
  localparam int unsigned WPB = 2 * NREG;  // weights per block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NW); i++) w[i] <= '0;
    end else begin
      for (int i = 0; i < int'(NW); i++)
        w[i] <= fx_t'(regs[i / int'(WPB)][(i % int'(WPB)) / 2] >> (16 * (i % 2)));
    end
  end

  initial assert (NW <= NB * WPB) else $error("weight_slice: not enough registers for NW weights");
endmodule
