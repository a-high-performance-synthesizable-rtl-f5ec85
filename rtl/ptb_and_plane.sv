// ptb_and_plane: AND sub-module of a product term-based block.
//
// Produces P product terms of I inputs. For each term, I literal units (base
// units fed with the same input on both pins) pass the input (BU_A), invert
// it (BU_NA) or drop it (BU_ONE), and a tree of I-1 base units, normally set
// to BU_AND, combines the literals. Building the sub-module from base units
// follows the architecture; the literal-then-tree arrangement is this
// design's choice.
//
// Configuration layout, in base units of 4 bits from bit 0: term p occupies
// units p*(2I-1) .. p*(2I-1)+2I-2, its I literal units first, then its I-1
// tree nodes in bu_tree order. Combinational.
module ptb_and_plane
  import fsm_pkg::*;
#(
  parameter int I = PTB1_I,
  parameter int P = PTB1_P
) (
  input  logic [I-1:0]                              in,
  input  logic [BU_CFG_W*and_plane_units(I, P)-1:0] cfg,
  output logic [P-1:0]                              term
);

  localparam int UPT = 2 * I - 1;  // base units per term

  for (genvar p = 0; p < P; p++) begin : g_term
    logic [I-1:0] lit;
    for (genvar i = 0; i < I; i++) begin : g_lit
      logic_unit u_lit (
        .a (in[i]),
        .b (in[i]),
        .f (bu_func_t'(cfg[BU_CFG_W*(p*UPT + i) +: BU_CFG_W])),
        .y (lit[i])
      );
    end
    if (I > 1) begin : g_tree
      bu_tree #(.N(I)) u_tree (
        .leaf (lit),
        .cfg  (cfg[BU_CFG_W*(p*UPT + I) +: BU_CFG_W*(I-1)]),
        .y    (term[p])
      );
    end else begin : g_single
      assign term[p] = lit[0];
    end
  end

endmodule
