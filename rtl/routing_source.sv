// routing_source: multiplexer-based configurable routing.
//
// Each of N_DST destinations picks one of N_SRC source signals by its own
// select field. The fabric uses it for the three routing sources between
// the sections (inputs/state to sequential blocks, inputs/state to logic
// blocks, logic block outputs/state to the outputs) and for the first-level
// internal connection inside a logic block, which the architecture builds
// as a multiplexer switch box. A select at or beyond N_SRC gives 0.
//
// Interface: src (sources), sel[d] (select of destination d), dst.
// Combinational.
module routing_source #(
  parameter int N_SRC = 24,
  parameter int N_DST = 8,
  parameter int SEL_W = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic [N_SRC-1:0]            src,
  input  logic [N_DST-1:0][SEL_W-1:0] sel,
  output logic [N_DST-1:0]            dst
);

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      dst[d] = 1'b0;
      for (int s = 0; s < N_SRC; s++) begin
        if (sel[d] == SEL_W'(s)) dst[d] = src[s];
      end
    end
  end

endmodule
