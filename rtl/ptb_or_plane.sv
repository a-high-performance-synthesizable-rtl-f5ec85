// ptb_or_plane: OR sub-module of a product term-based block.
//
// Sums the P product terms into O outputs. For each output, P select units
// (base units fed with the same term on both pins) pass a term (BU_A) or
// mask it (BU_ZERO), and a tree of P-1 base units, normally set to BU_OR,
// adds them up. Building the sub-module from base units follows the
// architecture; the select-then-tree arrangement is this design's choice.
//
// Configuration layout, in base units of 4 bits from bit 0: output o
// occupies units o*(2P-1) .. o*(2P-1)+2P-2, its P select units first, then
// its P-1 tree nodes in bu_tree order. Combinational.
module ptb_or_plane
  import fsm_pkg::*;
#(
  parameter int P = PTB1_P,
  parameter int O = PTB1_O
) (
  input  logic [P-1:0]                             term,
  input  logic [BU_CFG_W*or_plane_units(P, O)-1:0] cfg,
  output logic [O-1:0]                             out
);

  localparam int UPO = 2 * P - 1;  // base units per output

  for (genvar o = 0; o < O; o++) begin : g_out
    logic [P-1:0] sel;
    for (genvar p = 0; p < P; p++) begin : g_sel
      logic_unit u_sel (
        .a (term[p]),
        .b (term[p]),
        .f (bu_func_t'(cfg[BU_CFG_W*(o*UPO + p) +: BU_CFG_W])),
        .y (sel[p])
      );
    end
    if (P > 1) begin : g_tree
      bu_tree #(.N(P)) u_tree (
        .leaf (sel),
        .cfg  (cfg[BU_CFG_W*(o*UPO + P) +: BU_CFG_W*(P-1)]),
        .y    (out[o])
      );
    end else begin : g_single
      assign out[o] = sel[0];
    end
  end

endmodule
