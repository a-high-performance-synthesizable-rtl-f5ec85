// bu_tree: reduction tree of N leaves made of N-1 base units.
//
// Node j (0..N-2) combines nodes 2j and 2j+1 of the array v, whose first N
// entries are the leaves; the result is written to v[N+j] and the root is
// v[2N-2]. Each node's function comes from its own 4-bit field of cfg
// (node j at cfg[4j +: 4]), so the tree is an AND tree, an OR tree or any
// mix the configuration asks for. N must be at least 2. Combinational.
module bu_tree
  import fsm_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]              leaf,
  input  logic [BU_CFG_W*(N-1)-1:0] cfg,
  output logic                      y
);

  logic v [2*N-1];

  for (genvar k = 0; k < N; k++) begin : g_leaf
    assign v[k] = leaf[k];
  end

  for (genvar j = 0; j < N - 1; j++) begin : g_node
    logic_unit u_node (
      .a (v[2*j]),
      .b (v[2*j+1]),
      .f (bu_func_t'(cfg[BU_CFG_W*j +: BU_CFG_W])),
      .y (v[N+j])
    );
  end

  assign y = v[2*N-2];

endmodule
