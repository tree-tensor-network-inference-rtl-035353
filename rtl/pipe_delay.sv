// pipe_delay: a chain of STAGES registers of width W that advance when en is
// high. STAGES = 0 gives a plain wire. Used to model the pipeline registers of
// DSP slices and adder levels. All stages reset to zero.
module pipe_delay #(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [STAGES];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < int'(STAGES); s++) r[s] <= '0;
      end else if (en) begin
        r[0] <= d;
        for (int s = 1; s < int'(STAGES); s++) r[s] <= r[s-1];
      end
    end
    assign q = r[STAGES-1];
  end
endmodule
