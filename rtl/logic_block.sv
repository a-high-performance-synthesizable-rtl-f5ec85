// logic_block: the logic module of the fabric, a triangle of PTBs.
//
// Four PTB1 = (8,4,2) form the first level, two PTB2 = (2,1,1) the second
// and one PTB2 the third; each level has half the PTBs of the one before and
// a level's outputs reach only the next level. Three internal connections
// join them:
//   first level  - a multiplexer switch box: every PTB1 input selects any of
//                  the block's LB_IN inputs (l1_sel);
//   second level - fixed wiring: second-level PTB2 j takes one output of
//                  PTB1 2j and one of PTB1 2j+1; a single configuration bit
//                  per PTB1 (l2_sel) chooses which of its two outputs;
//   third level  - fixed wiring: the last PTB2 takes both second-level
//                  outputs.
// The triangle, the PTB shapes and the multiplexer first level follow the
// architecture. The logic block's 8 inputs and the one-bit choice in the
// second level are this design's reading of "mostly fixed connection".
// With the PTB2s set to OR the block computes a sum of up to 16 product
// terms of its 8 inputs; set to AND they combine sub-functions.
//
// Combinational: y follows lb_in and cfg with no clock.
module logic_block
  import fsm_pkg::*;
(
  input  logic [LB_IN-1:0] lb_in,
  input  lb_cfg_t          cfg,
  output logic             y
);

  logic [N_PTB1-1:0][PTB1_O-1:0] p1_out;
  logic [1:0]                    p2_out;

  // ---- level 1: switch box and PTB1s ---------------------------------------
  for (genvar k = 0; k < N_PTB1; k++) begin : g_l1
    logic [PTB1_I-1:0] p1_in;

    routing_source #(.N_SRC(LB_IN), .N_DST(PTB1_I), .SEL_W(LB_SEL_W)) u_sw (
      .src (lb_in),
      .sel (cfg.l1_sel[k]),
      .dst (p1_in)
    );

    ptb #(.I(PTB1_I), .P(PTB1_P), .O(PTB1_O)) u_ptb1 (
      .in  (p1_in),
      .cfg (cfg.ptb1[k]),
      .out (p1_out[k])
    );
  end

  // ---- level 2: fixed pairs, one output of each PTB1 ---------------------
  for (genvar j = 0; j < 2; j++) begin : g_l2
    logic [1:0] p2_in;
    assign p2_in[0] = p1_out[2*j][cfg.l2_sel[2*j]];
    assign p2_in[1] = p1_out[2*j+1][cfg.l2_sel[2*j+1]];

    ptb #(.I(PTB2_I), .P(PTB2_P), .O(PTB2_O)) u_ptb2 (
      .in  (p2_in),
      .cfg (cfg.ptb2[j]),
      .out (p2_out[j])
    );
  end

  // ---- level 3: fixed wiring to the last PTB2 ----------------------------
  ptb #(.I(PTB2_I), .P(PTB2_P), .O(PTB2_O)) u_ptb2_out (
    .in  (p2_out),
    .cfg (cfg.ptb2[2]),
    .out (y)
  );

endmodule
