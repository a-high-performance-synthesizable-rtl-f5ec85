// fsm_pkg: sizes, configuration types and layout helpers shared by the
// reconfigurable FSM fabric.
//
// The fabric is built from a two-input reconfigurable base unit
// (logic_unit). Product term-based blocks (PTBs) are described by the tuple
// (i,p,o): inputs, product terms, outputs. A logic block is a triangle of
// four PTB1 = (8,4,2) feeding two PTB2 = (2,1,1) feeding one PTB2. The
// system has up to 8 primary inputs, 8 sequential blocks and 8 logic blocks.
// Those numbers follow the architecture description; the configuration
// encodings, the 2-bit width of a sequential block's adder/subtractor, the
// logic block's 8 inputs and the routing pools are this design's choices.
package fsm_pkg;

  // ---- system sizes ------------------------------------------------------
  localparam int N_IN   = 8;   // primary FSM inputs
  localparam int N_OUT  = 8;   // primary FSM outputs
  localparam int N_SEQ  = 8;   // sequential blocks (2^8 states in logic mode)
  localparam int N_LB   = 8;   // logic blocks, one per FSM output
  localparam int SEQ_W  = 2;   // state bits per sequential block (8*2 = 16 bit chain)
  localparam int LB_IN  = 8;   // inputs of one logic block

  // ---- PTB shapes (i,p,o) --------------------------------------------------
  localparam int PTB1_I = 8, PTB1_P = 4, PTB1_O = 2;
  localparam int PTB2_I = 2, PTB2_P = 1, PTB2_O = 1;
  localparam int N_PTB1 = 4;   // first level of the triangle; then 2, then 1

  // ---- base unit -----------------------------------------------------------
  // Functions of the two-input base unit (A, B are its inputs).
  typedef enum logic [3:0] {
    BU_ZERO = 4'd0,  // 0
    BU_ONE  = 4'd1,  // 1
    BU_A    = 4'd2,  // A
    BU_NA   = 4'd3,  // not A
    BU_B    = 4'd4,  // B
    BU_NB   = 4'd5,  // not B
    BU_OR   = 4'd6,  // A + B
    BU_NOR  = 4'd7,  // not (A + B)
    BU_AND  = 4'd8,  // A . B
    BU_NAND = 4'd9   // not (A . B)
  } bu_func_t;
  localparam int BU_CFG_W = 4;

  // Number of base units in a PTB (i,p,o):
  //   AND sub-module: per term, i literal units and i-1 tree nodes
  //   OR  sub-module: per output, p term-select units and p-1 tree nodes
  function automatic int and_plane_units(int i, int p);
    return p * (2 * i - 1);
  endfunction
  function automatic int or_plane_units(int p, int o);
    return o * (2 * p - 1);
  endfunction
  function automatic int ptb_units(int i, int p, int o);
    return and_plane_units(i, p) + or_plane_units(p, o);
  endfunction

  localparam int PTB1_CFG_W = BU_CFG_W * ptb_units(PTB1_I, PTB1_P, PTB1_O);  // 296
  localparam int PTB2_CFG_W = BU_CFG_W * ptb_units(PTB2_I, PTB2_P, PTB2_O);  // 16
  typedef logic [PTB1_CFG_W-1:0] ptb1_cfg_t;
  typedef logic [PTB2_CFG_W-1:0] ptb2_cfg_t;

  // ---- logic block ---------------------------------------------------------
  localparam int LB_SEL_W = $clog2(LB_IN);
  typedef struct packed {
    ptb1_cfg_t [N_PTB1-1:0]                      ptb1;   // level 1
    ptb2_cfg_t [2:0]                             ptb2;   // [0],[1] level 2, [2] level 3
    logic [N_PTB1-1:0][PTB1_I-1:0][LB_SEL_W-1:0] l1_sel; // first-level switch box
    logic [N_PTB1-1:0]                           l2_sel; // which PTB1 output goes on
  } lb_cfg_t;

  // ---- sequential block ----------------------------------------------------
  typedef enum logic {
    SEQ_LOGIC = 1'b0,   // logic module followed by a D flip-flop
    SEQ_COUNT = 1'b1    // adder/subtractor steps the state around a circle
  } seq_mode_t;

  typedef struct packed {
    lb_cfg_t            lm;       // logic module
    seq_mode_t          mode;
    logic               down;     // 1: subtract, 0: add
    logic               cascade;  // step comes from the previous block's carry
    logic [SEQ_W-1:0]   init;     // reset (initial) state
  } seq_cfg_t;

  // ---- routing pools -------------------------------------------------------
  // Pool feeding sequential and logic blocks: primary inputs, then the state
  // bits of all sequential blocks (block k, bit b at N_IN + SEQ_W*k + b).
  localparam int N_POOL     = N_IN + N_SEQ * SEQ_W;     // 24
  localparam int POOL_SEL_W = $clog2(N_POOL);
  // Pool feeding the outputs: logic block outputs, then the state bits.
  localparam int N_OPOOL    = N_LB + N_SEQ * SEQ_W;     // 24
  localparam int OPOOL_SEL_W = $clog2(N_OPOOL);

  typedef struct packed {
    logic [N_SEQ-1:0][LB_IN-1:0][POOL_SEL_W-1:0] seq_rs;  // input routing source
    seq_cfg_t [N_SEQ-1:0]                        seq;
    logic [N_LB-1:0][LB_IN-1:0][POOL_SEL_W-1:0]  mid_rs;  // middle routing source
    lb_cfg_t [N_LB-1:0]                          lb;
    logic [N_OUT-1:0][OPOOL_SEL_W-1:0]           out_rs;  // output routing source
  } fabric_cfg_t;

  localparam int FABRIC_CFG_W = $bits(fabric_cfg_t);

endpackage
