// adder_tree: pipelined binary adder tree for the sum stage of a node.
//
// Adds N_IN signed 32-bit terms (N_IN a power of two) in log2(N_IN) levels of
// pairwise additions. Each level is followed by LAT registers, matching one
// DSP-slice adder per pair, so the sum appears LAT * log2(N_IN) enabled
// cycles after the terms. The 32-bit width cannot overflow for the 16-bit
// products of this design.
module adder_tree #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned LAT  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [31:0] terms [N_IN],
  output logic signed [31:0] sum
);
  localparam int unsigned LEVELS = $clog2(N_IN);

  logic signed [31:0] lvl [LEVELS+1][N_IN];

  for (genvar t = 0; t < int'(N_IN); t++) begin : g_in
    assign lvl[0][t] = terms[t];
  end

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    localparam int unsigned NOUT = N_IN >> (l + 1);
    for (genvar t = 0; t < int'(N_IN); t++) begin : g_add
      if (t < int'(NOUT)) begin : g_used
        logic signed [31:0] s;
        assign s = lvl[l][2*t] + lvl[l][2*t+1];
        pipe_delay #(.W(32), .STAGES(LAT)) u_pipe (
          .clk, .rst_n, .en, .d(s), .q(lvl[l+1][t])
        );
      end else begin : g_unused
        assign lvl[l+1][t] = '0;
      end
    end
  end

  assign sum = lvl[LEVELS][0];

  initial assert (N_IN == (1 << LEVELS)) else $error("adder_tree: N_IN must be a power of two");
endmodule
