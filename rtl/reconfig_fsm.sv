// reconfig_fsm: reconfigurable finite state machine fabric (top level).
//
// The fabric splits an FSM into a sequential section, which holds the state
// and changes it on the clock, and a purely combinational logic section,
// which forms the outputs. Left to right:
//   input routing source  - feeds each sequential block's 8 logic module
//                           inputs from the primary inputs and the state
//                           bits fed back from all sequential blocks;
//   sequential section    - N_SEQ sequential blocks (logic module + D
//                           flip-flop, or adder/subtractor counter), their
//                           carries chained block k-1 -> block k;
//   middle routing source - feeds each logic block's 8 inputs from the
//                           primary inputs and the state bits;
//   logic section         - N_LB logic blocks, one per FSM output;
//   output routing source - drives each output from a logic block (Mealy
//                           or Moore output) or straight from a state bit
//                           (state used as the output).
// Every routing select and block setting is a bit of one configuration
// register, loaded serially through cfg_sdi while cfg_shift_en is high
// (see cfg_chain; the field order is fabric_cfg_t in fsm_pkg, first field
// shifted in first). The section structure, the counts (8 inputs, 8
// sequential and 8 logic blocks) and the feedback path follow the
// architecture; the pools, the serial configuration and the reset follow
// this design's choices described in the sub-blocks.
//
// Timing: out is combinational from in and the state; the state changes on
// the rising clock edge; rst_n is synchronous, active low, and puts every
// sequential block in its configured initial state. Hold rst_n low or
// shift_en low as needed: shifting a new configuration while the FSM runs
// changes its behaviour bit by bit.
module reconfig_fsm
  import fsm_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_IN-1:0]        in,
  output logic [N_OUT-1:0]       out,
  output logic [N_SEQ*SEQ_W-1:0] state,
  input  logic                   cfg_shift_en,
  input  logic                   cfg_sdi,
  output logic                   cfg_sdo
);

  logic [FABRIC_CFG_W-1:0] cfg_bits;
  fabric_cfg_t             cfg;

  cfg_chain #(.W(FABRIC_CFG_W)) u_cfg (
    .clk      (clk),
    .shift_en (cfg_shift_en),
    .sdi      (cfg_sdi),
    .cfg      (cfg_bits),
    .sdo      (cfg_sdo)
  );

  assign cfg = fabric_cfg_t'(cfg_bits);

  logic [N_POOL-1:0]  pool;
  logic [N_OPOOL-1:0] opool;
  logic [N_LB-1:0]    lb_y;
  logic [N_SEQ:0]     carry;

  assign pool  = {state, in};
  assign opool = {state, lb_y};
  assign carry[0] = 1'b1;   // a cascaded first block counts every clock

  // ---- sequential section --------------------------------------------------
  for (genvar k = 0; k < N_SEQ; k++) begin : g_seq
    logic [LB_IN-1:0] lm_in;

    routing_source #(.N_SRC(N_POOL), .N_DST(LB_IN), .SEL_W(POOL_SEL_W)) u_rs_in (
      .src (pool),
      .sel (cfg.seq_rs[k]),
      .dst (lm_in)
    );

    sequential_block u_seq (
      .clk       (clk),
      .rst_n     (rst_n),
      .lm_in     (lm_in),
      .carry_in  (carry[k]),
      .cfg       (cfg.seq[k]),
      .q         (state[SEQ_W*k +: SEQ_W]),
      .carry_out (carry[k+1])
    );
  end

  // ---- logic section -------------------------------------------------------
  for (genvar k = 0; k < N_LB; k++) begin : g_lb
    logic [LB_IN-1:0] lb_in;

    routing_source #(.N_SRC(N_POOL), .N_DST(LB_IN), .SEL_W(POOL_SEL_W)) u_rs_mid (
      .src (pool),
      .sel (cfg.mid_rs[k]),
      .dst (lb_in)
    );

    logic_block u_lb (
      .lb_in (lb_in),
      .cfg   (cfg.lb[k]),
      .y     (lb_y[k])
    );
  end

  // ---- output routing ------------------------------------------------------
  routing_source #(.N_SRC(N_OPOOL), .N_DST(N_OUT), .SEL_W(OPOOL_SEL_W)) u_rs_out (
    .src (opool),
    .sel (cfg.out_rs),
    .dst (out)
  );

endmodule
