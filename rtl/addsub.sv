// addsub: configurable adder/subtractor of a sequential block.
//
// Adds or subtracts a one-bit step to a W-bit state, so a chain of states
// can be walked in either direction around a closed circle. One
// configuration bit, down, turns the adder into a subtractor, as the
// architecture describes. It is a ripple chain: bit i toggles when the
// carry into it is 1, and passes the carry on when the bit is 1 (add) or 0
// (subtract). cout is the carry (add) or borrow (subtract) out of the top
// bit, which lets blocks be cascaded into a wider counter. The W-bit width
// and the step/carry interface are this design's choices.
//
// Combinational: y = a + step or a - step, modulo 2^W.
module addsub #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic         step,
  input  logic         down,
  output logic [W-1:0] y,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = step;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign c[i+1] = (a[i] ^ down) & c[i];
  end
  assign y    = a ^ c[W-1:0];
  assign cout = c[W];

endmodule
