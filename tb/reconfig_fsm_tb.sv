// reconfig_fsm_tb: end-to-end test of the whole fabric at its default size
// (8 inputs, 8 outputs, 8 sequential and 8 logic blocks), configured only
// through the serial configuration port.
//
// Phase 1 - Mealy FSMs in logic mode. Random complete FSMs with the input,
//   output and state counts of two benchmark machines (2 in/1 out/4 states
//   and 1 in/2 out/7 states) are generated, binary state-encoded, mapped as
//   minterm sums onto the sequential blocks (next-state bits) and the logic
//   blocks (outputs), shifted in, and run against a table model for random
//   input sequences. Outputs are checked every cycle before the clock edge
//   (Mealy: they depend on the current input) and the state after it.
// Phase 2 - the sequential blocks as one 16-bit closed-circle counter: block
//   0 steps when in[0] is 1 (its logic module forms the condition), blocks
//   1-7 take the carry of the previous block. The low state byte is routed
//   straight to the outputs (state as output). Counting up from 0xFFFF and
//   down from 0x0001 crosses the wrap point; one more run steps 65536 times
//   and must come back to its start.
// Phase 3 - two communicating sub-machines sharing the fabric, one a
//   counter circle and one in logic mode, each reading the other's state,
//   with a Mealy, a Moore and a state-bit output side by side.
// Phase 1 also runs 1 in/3 out/15 state machines (five variables): a
// function with more than 16 minterms is built from its complement's
// minterms with the last PTB2 set to NOR.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module reconfig_fsm_tb;
  import fsm_pkg::*;
  import fsm_tb_pkg::*;

  logic clk = 0, rst_n = 0, cfg_shift_en = 0, cfg_sdi = 0, cfg_sdo;
  logic [N_IN-1:0] in = '0;
  logic [N_OUT-1:0] out;
  logic [N_SEQ*SEQ_W-1:0] state;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_cfg_load = 0, n_logic_step = 0, n_mealy_out = 0, n_state_out = 0;
  int n_count_up = 0, n_count_down = 0, n_cascade = 0, n_wrap = 0, n_hold = 0;
  int n_sub_link = 0, n_nor_out = 0, n_moore_out = 0;

  reconfig_fsm dut (
    .clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state),
    .cfg_shift_en(cfg_shift_en), .cfg_sdi(cfg_sdi), .cfg_sdo(cfg_sdo)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Shift a configuration in, first field first, with the FSM in reset.
  task automatic load_cfg(fabric_cfg_t c);
    logic [FABRIC_CFG_W-1:0] bits = c;
    @(negedge clk);
    rst_n = 0;
    for (int i = FABRIC_CFG_W - 1; i >= 0; i--) begin
      cfg_shift_en = 1;
      cfg_sdi = bits[i];
      @(negedge clk);
    end
    cfg_shift_en = 0;
    n_cfg_load++;
    checks++;
    if (dut.cfg_bits !== bits) fail("configuration register differs from the word shifted in");
    @(negedge clk);
    rst_n = 1;
  endtask

  // ---------------------------------------------------------------------------
  // Phase 1: random Mealy machine with ni inputs, no outputs, ns states.
  // ---------------------------------------------------------------------------
  int next_tab [16][4];   // [state][input]
  int out_tab  [16][4];

  task automatic run_mealy(int ni, int no, int ns, int cycles);
    fabric_cfg_t c = '0;
    int sb = $clog2(ns);
    int nv = ni + sb;
    int st = 0;
    logic [31:0] tt;

    for (int s = 0; s < ns; s++)
      for (int x = 0; x < (1 << ni); x++) begin
        next_tab[s][x] = $urandom % ns;
        out_tab[s][x]  = $urandom % (1 << no);
      end

    // next-state bit b in sequential block b, logic mode, reset state 0
    for (int b = 0; b < sb; b++) begin
      tt = '0;
      for (int m = 0; m < (1 << nv); m++) begin
        int x = m & ((1 << ni) - 1);
        int s = m >> ni;
        if (s < ns) tt[m] = 1'(next_tab[s][x] >> b);
      end
      c.seq[b].lm   = lb_from_table(tt, nv);
      if ($countones(tt) > MAX_CUBES) n_nor_out++;
      c.seq[b].mode = SEQ_LOGIC;
      c.seq[b].init = '0;
    end
    // outputs in logic blocks 0..no-1
    for (int o = 0; o < no; o++) begin
      tt = '0;
      for (int m = 0; m < (1 << nv); m++) begin
        int x = m & ((1 << ni) - 1);
        int s = m >> ni;
        if (s < ns) tt[m] = 1'(out_tab[s][x] >> o);
      end
      c.lb[o] = lb_from_table(tt, nv);
      if ($countones(tt) > MAX_CUBES) n_nor_out++;
      c.out_rs[o] = OPOOL_SEL_W'(o);
    end
    for (int o = no; o < N_OUT; o++) c.out_rs[o] = OPOOL_SEL_W'(N_OPOOL - 1);
    // routing: variable i < ni is input i, variable ni+b is state bit b
    for (int k = 0; k < N_SEQ; k++)
      for (int i = 0; i < LB_IN; i++) begin
        logic [POOL_SEL_W-1:0] p;
        p = (i < ni) ? POOL_SEL_W'(i) : POOL_SEL_W'(N_IN + SEQ_W * (i - ni));
        c.seq_rs[k][i] = p;
        c.mid_rs[k][i] = p;
      end
    load_cfg(c);

    for (int cy = 0; cy < cycles; cy++) begin
      int x = $urandom % (1 << ni);
      in = N_IN'(x) | (N_IN'($urandom) & ~N_IN'((1 << ni) - 1));  // unused inputs toggle
      #1;
      checks++;
      if ((int'(out) & ((1 << no) - 1)) != out_tab[st][x])
        fail($sformatf("mealy output state=%0d in=%0d got=%h exp=%0d", st, x, out, out_tab[st][x]));
      else n_mealy_out++;
      checks++;
      if ((int'(out) >> no) != 0) fail("unused outputs not 0");
      @(negedge clk);
      if (next_tab[st][x] != st) n_logic_step++;
      st = next_tab[st][x];
      begin
        // logic mode: state bit b is bit 0 of sequential block b
        automatic logic [N_SEQ*SEQ_W-1:0] exp_state = '0;
        for (int b = 0; b < sb; b++) exp_state[SEQ_W*b] = 1'(st >> b);
        checks++;
        if (state !== exp_state) fail($sformatf("mealy state got=%h exp=%0d", state, st));
      end
    end
  endtask

  // ---------------------------------------------------------------------------
  // Phase 2: 16-bit closed-circle counter over all sequential blocks.
  // ---------------------------------------------------------------------------
  function automatic fabric_cfg_t counter_cfg(logic down, logic [15:0] init);
    fabric_cfg_t c = '0;
    sop_t en;
    en.n = 1; en.care[0] = 8'h01; en.val[0] = 8'h01;
    for (int k = 0; k < N_SEQ; k++) begin
      c.seq[k].mode    = SEQ_COUNT;
      c.seq[k].down    = down;
      c.seq[k].cascade = (k != 0);
      c.seq[k].init    = init[SEQ_W*k +: SEQ_W];
      for (int i = 0; i < LB_IN; i++) c.seq_rs[k][i] = POOL_SEL_W'(0);
    end
    c.seq[0].lm = lb_from_sop(en);   // step condition: in[0]
    for (int o = 0; o < N_OUT; o++) c.out_rs[o] = OPOOL_SEL_W'(N_LB + o);
    return c;
  endfunction

  task automatic run_counter(logic down, logic [15:0] init, int cycles, bit always_step);
    int model = int'(init);
    load_cfg(counter_cfg(down, init));
    checks++;
    if (state !== init) fail("counter reset state");
    for (int cy = 0; cy < cycles; cy++) begin
      logic stp;
      stp = always_step ? 1'b1 : 1'($urandom);
      in = {N_IN'($urandom)} & ~N_IN'(1) | N_IN'(stp);
      #1;
      checks++;
      if (out !== state[N_OUT-1:0]) fail("state byte not on outputs");
      else n_state_out++;
      @(negedge clk);
      if (stp) begin
        int nxt = down ? model - 1 : model + 1;
        if (nxt < 0 || nxt > 16'hFFFF) n_wrap++;
        if ((model & 3) == (down ? 0 : 3)) n_cascade++;
        if (down) n_count_down++; else n_count_up++;
        model = nxt & 32'hFFFF;
      end else n_hold++;
      checks++;
      if (state !== 16'(model)) fail($sformatf("counter got=%h exp=%h", state, model));
    end
  endtask

  // ---------------------------------------------------------------------------
  // Phase 3: two communicating sub-machines in one fabric, the structure a
  // decomposed FSM maps onto. M1 is a 4-state circle in sequential block 0
  // (counter mode) that steps when in[0] is 1 and M2's state bit is 1. M2 is
  // a 2-state machine in sequential block 2 (logic mode) whose next state is
  // a random function of in[1], M1's two state bits and its own bit. out[0]
  // is a random function of in[2] and both machines' states; out[1] is M1's
  // state bit 1 routed straight out; out[2] is a Moore output, a random
  // function of the two machines' states only.
  // ---------------------------------------------------------------------------
  task automatic run_decomposed(logic down, int cycles);
    fabric_cfg_t c = '0;
    logic [15:0] tt_m2, tt_out, tt_moore;
    sop_t step;
    int m1 = 0, m2 = 0;
    tt_m2    = 16'($urandom);
    tt_out   = 16'($urandom);
    tt_moore = 16'($urandom) & 16'h00FF;   // three state variables
    // M2 must be able to leave either state from every M1 state: in[1] = 1
    // takes it from 0 to 1, in[1] = 0 from 1 to 0; the rest stays random.
    for (int k = 0; k < 4; k++) begin
      tt_m2[(k << 1) | 1] = 1'b1;
      tt_m2[8 | (k << 1)] = 1'b0;
    end
    // variables of every logic module used: v0 = in[x], v1..v2 = M1 bits, v3 = M2 bit
    step.n = 1; step.care[0] = 8'h09; step.val[0] = 8'h09;   // in[0] & M2
    c.seq[0].mode = SEQ_COUNT;
    c.seq[0].down = down;
    c.seq[0].lm   = lb_from_sop(step);
    c.seq[2].mode = SEQ_LOGIC;
    c.seq[2].lm   = lb_from_sop(sop_from_table(tt_m2, 4));
    c.lb[0]       = lb_from_sop(sop_from_table(tt_out, 4));
    for (int k = 0; k < N_SEQ; k++) begin
      c.seq_rs[k][0] = POOL_SEL_W'((k == 2) ? 1 : 0);
      c.seq_rs[k][1] = POOL_SEL_W'(N_IN + 0);
      c.seq_rs[k][2] = POOL_SEL_W'(N_IN + 1);
      c.seq_rs[k][3] = POOL_SEL_W'(N_IN + 2 * SEQ_W);
    end
    c.mid_rs[0][0] = POOL_SEL_W'(2);
    c.mid_rs[0][1] = POOL_SEL_W'(N_IN + 0);
    c.mid_rs[0][2] = POOL_SEL_W'(N_IN + 1);
    c.mid_rs[0][3] = POOL_SEL_W'(N_IN + 2 * SEQ_W);
    // Moore output: logic block 1 sees only the two machines' states
    c.lb[1]        = lb_from_sop(sop_from_table(tt_moore, 3));
    c.mid_rs[1][0] = POOL_SEL_W'(N_IN + 0);
    c.mid_rs[1][1] = POOL_SEL_W'(N_IN + 1);
    c.mid_rs[1][2] = POOL_SEL_W'(N_IN + 2 * SEQ_W);
    c.out_rs[0] = OPOOL_SEL_W'(0);
    c.out_rs[1] = OPOOL_SEL_W'(N_LB + 1);
    c.out_rs[2] = OPOOL_SEL_W'(1);
    for (int o = 3; o < N_OUT; o++) c.out_rs[o] = OPOOL_SEL_W'(N_OPOOL - 1);
    load_cfg(c);

    for (int cy = 0; cy < cycles; cy++) begin
      int v_m2, v_out, m1n, m2n;
      in = N_IN'($urandom);
      #1;
      v_m2  = int'(in[1]) | (m1 << 1) | (m2 << 3);
      v_out = int'(in[2]) | (m1 << 1) | (m2 << 3);
      checks++;
      if (out[1:0] !== {1'(m1 >> 1), tt_out[v_out]})
        fail($sformatf("decomposed outputs got=%b m1=%0d m2=%0d", out[1:0], m1, m2));
      checks++;
      if (out[2] !== tt_moore[m1 | (m2 << 2)])
        fail($sformatf("moore output got=%b m1=%0d m2=%0d", out[2], m1, m2));
      else n_moore_out++;
      m1n = m1;
      if (in[0] && m2 == 1) begin
        m1n = (down ? m1 - 1 : m1 + 1) & 3;
        n_sub_link++;
      end
      m2n = int'(tt_m2[v_m2]);
      if (m2n != m2 && (tt_m2[v_m2 ^ 2] != tt_m2[v_m2] || tt_m2[v_m2 ^ 4] != tt_m2[v_m2])) n_sub_link++;
      @(negedge clk);
      m1 = m1n; m2 = m2n;
      checks++;
      if (state !== 16'((m2 << 4) | m1))
        fail($sformatf("decomposed state got=%h exp m1=%0d m2=%0d", state, m1, m2));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    // Phase 1: table-2 sized machines (lion-sized, dk27-sized), a few each
    for (int r = 0; r < 3; r++) run_mealy(2, 1, 4, 300);
    for (int r = 0; r < 3; r++) run_mealy(1, 2, 7, 300);
    for (int r = 0; r < 3; r++) run_mealy(1, 3, 15, 400);   // dk512-sized
    // Phase 3: two communicating sub-machines
    run_decomposed(1'b0, 400);
    run_decomposed(1'b1, 400);
    // Phase 2: counter up and down across the wrap, then a full circle
    run_counter(1'b0, 16'hFFF0, 400, 1'b0);
    run_counter(1'b1, 16'h0010, 400, 1'b0);
    run_counter(1'b0, 16'h1234, 65536, 1'b1);
    checks++;
    if (state !== 16'h1234) fail("full circle did not return to its start");

    $display("mechanisms: cfg_load=%0d logic_step=%0d mealy_out=%0d state_out=%0d count_up=%0d count_down=%0d cascade=%0d wrap=%0d hold=%0d sub_link=%0d nor_out=%0d moore_out=%0d",
             n_cfg_load, n_logic_step, n_mealy_out, n_state_out, n_count_up, n_count_down, n_cascade, n_wrap, n_hold, n_sub_link, n_nor_out, n_moore_out);
    begin
      automatic int m [12] = '{n_cfg_load, n_logic_step, n_mealy_out, n_state_out, n_count_up, n_count_down,
                               n_cascade, n_wrap, n_hold, n_sub_link, n_nor_out, n_moore_out};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (m[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
