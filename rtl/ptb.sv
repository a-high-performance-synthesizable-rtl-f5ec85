// ptb: product term-based block (i,p,o).
//
// An AND sub-module forms P product terms of the I inputs and an OR
// sub-module sums selected terms into O outputs, so each output is a
// sum-of-products of up to P terms. The logic block uses two shapes:
// PTB1 = (8,4,2) in its first level and PTB2 = (2,1,1) in the second and
// third; both come from the architecture. A PTB2 is two literal units, one
// two-input node and a select unit, so it can act as any listed two-input
// function of its inputs.
//
// Configuration: the AND sub-module's bits from bit 0, the OR sub-module's
// above them (see ptb_and_plane and ptb_or_plane). Combinational.
module ptb
  import fsm_pkg::*;
#(
  parameter int I = PTB1_I,
  parameter int P = PTB1_P,
  parameter int O = PTB1_O
) (
  input  logic [I-1:0]                            in,
  input  logic [BU_CFG_W*ptb_units(I, P, O)-1:0]  cfg,
  output logic [O-1:0]                            out
);

  localparam int AND_W = BU_CFG_W * and_plane_units(I, P);
  localparam int OR_W  = BU_CFG_W * or_plane_units(P, O);

  logic [P-1:0] term;

  ptb_and_plane #(.I(I), .P(P)) u_and (
    .in   (in),
    .cfg  (cfg[AND_W-1:0]),
    .term (term)
  );

  ptb_or_plane #(.P(P), .O(O)) u_or (
    .term (term),
    .cfg  (cfg[AND_W +: OR_W]),
    .out  (out)
  );

endmodule
