// pipe_delay: enable-gated shift register delaying a word by DEPTH steps.
//
// Used to balance the pipeline of the signal component separator: the
// amplitude, phase and Cartesian paths are delayed so that every output
// channel of a sample leaves the core in the same cycle.  The register
// chain advances only when en is high; DEPTH = 0 is a plain wire.  All
// stages reset to zero.
module pipe_delay #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < DEPTH; s++) r[s] <= '0;
      end else if (en) begin
        r[0] <= d;
        for (int s = 1; s < DEPTH; s++) r[s] <= r[s-1];
      end
    end
    assign q = r[DEPTH-1];
  end

endmodule
