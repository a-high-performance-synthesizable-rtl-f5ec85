// sequential_block: one state element of the fabric's sequential section.
//
// It holds SEQ_W (2) state bits and has two modes, chosen by configuration:
//   SEQ_LOGIC - a logic module (a full logic_block) followed by a D
//               flip-flop: q[0] takes the logic module's output on each
//               clock edge, q[1] stays 0. Eight blocks give 2^8 states.
//   SEQ_COUNT - the adder/subtractor adds (or, with down set, subtracts) a
//               step to q on each clock edge. The step is the logic
//               module's output, which acts as the transition condition,
//               or, with cascade set, the carry of the previous block, so
//               blocks chain into a longer closed-circle counter (eight
//               blocks give 2^16 states).
// Both modes and the adder/subtractor follow the architecture. Using the
// logic module as the count condition, the 2-bit width that makes eight
// blocks reach 2^16 states, the cascade chain and the synchronous reset to
// a configured initial state are this design's choices.
//
// Timing: q changes only on the rising clock edge; carry_out is
// combinational from q, carry_in and lm_in (0 in SEQ_LOGIC). Reset is
// synchronous, active low, and loads cfg.init.
module sequential_block
  import fsm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LB_IN-1:0] lm_in,      // logic module inputs from routing
  input  logic             carry_in,   // from the previous block
  input  seq_cfg_t         cfg,
  output logic [SEQ_W-1:0] q,
  output logic             carry_out
);

  logic             lm_y;
  logic             step;
  logic [SEQ_W-1:0] q_step;
  logic             cout;

  logic_block u_lm (
    .lb_in (lm_in),
    .cfg   (cfg.lm),
    .y     (lm_y)
  );

  assign step = cfg.cascade ? carry_in : lm_y;

  addsub #(.W(SEQ_W)) u_addsub (
    .a    (q),
    .step (step),
    .down (cfg.down),
    .y    (q_step),
    .cout (cout)
  );

  assign carry_out = (cfg.mode == SEQ_COUNT) && cout;

  always_ff @(posedge clk) begin
    if (!rst_n)                   q <= cfg.init;
    else if (cfg.mode == SEQ_COUNT) q <= q_step;
    else                          q <= {{(SEQ_W-1){1'b0}}, lm_y};
  end

endmodule
