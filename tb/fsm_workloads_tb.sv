// fsm_workloads_tb: machines with the exact sizes of the six benchmark FSMs
// (lion, dk27, dk512, s27, tav, bbara: inputs I, outputs O, states S and
// rows P), run on the full-size fabric.
//
// The benchmark contents are not reproduced here; each machine is drawn at
// random in the benchmark's own format: P rows of (input cube, present
// state, next state, outputs), the input cubes of each state being disjoint
// and covering all input values, so the machine is deterministic and
// complete. States are binary-encoded with state 0 as the reset state.
// Every next-state bit and output is the sum of the rows that set it:
// one cube per row, the input cube plus the full present-state code. A
// logic block sums at most 16 cubes, so each column is drawn with at most
// 16 rows set (invalid next-state codes have their top bit cleared, which
// only removes ones). That is the fabric's per-function limit, not a
// property of the benchmarks.
//
// Each machine is shifted in through the serial configuration port and run
// for 3000 random input cycles against the row table: outputs are checked
// before each clock edge, the state after it. The number of distinct rows
// exercised is reported and must be above zero.
module fsm_workloads_tb;
  import fsm_pkg::*;
  import fsm_tb_pkg::*;

  localparam int MAXP = 64;

  logic clk = 0, rst_n = 0, cfg_shift_en = 0, cfg_sdi = 0, cfg_sdo;
  logic [N_IN-1:0] in = '0;
  logic [N_OUT-1:0] out;
  logic [N_SEQ*SEQ_W-1:0] state;
  int checks = 0, failures = 0;

  reconfig_fsm dut (
    .clk(clk), .rst_n(rst_n), .in(in), .out(out), .state(state),
    .cfg_shift_en(cfg_shift_en), .cfg_sdi(cfg_sdi), .cfg_sdo(cfg_sdo)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic load_cfg(fabric_cfg_t c);
    logic [FABRIC_CFG_W-1:0] bits;
    bits = c;
    @(negedge clk);
    rst_n = 0;
    for (int i = FABRIC_CFG_W - 1; i >= 0; i--) begin
      cfg_shift_en = 1;
      cfg_sdi = bits[i];
      @(negedge clk);
    end
    cfg_shift_en = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // row table
  int         nrows;
  int         r_st   [MAXP];
  logic [7:0] r_care [MAXP];
  logic [7:0] r_val  [MAXP];
  int         r_ns   [MAXP];
  int         r_out  [MAXP];

  // Split the input space of ni bits into k disjoint cubes, appended to the
  // row table for state s.
  task automatic add_state_rows(int s, int ni, int k);
    logic [7:0] care [MAXP], val [MAXP];
    int n = 1;
    care[0] = '0; val[0] = '0;
    while (n < k) begin
      int c, v;
      do c = $urandom % n; while ($countones(care[c]) == ni);
      do v = $urandom % ni; while (care[c][v]);
      care[n] = care[c] | 8'(1 << v);
      val[n]  = val[c]  | 8'(1 << v);
      care[c] = care[c] | 8'(1 << v);
      n++;
    end
    for (int j = 0; j < k; j++) begin
      r_st[nrows]   = s;
      r_care[nrows] = care[j];
      r_val[nrows]  = val[j];
      nrows++;
    end
  endtask

  // Draw a column: at most 16 of the P rows set; next-state columns take
  // as many as allowed up to half the rows, so that many states are reached.
  function automatic logic [MAXP-1:0] draw_column(int p, bit dense);
    logic [MAXP-1:0] col = '0;
    int lim = (p < MAX_CUBES) ? p : MAX_CUBES;
    int k = dense ? (((p + 1) / 2 < MAX_CUBES) ? (p + 1) / 2 : MAX_CUBES) : $urandom % (lim + 1);
    while ($countones(col) < k) col[$urandom % p] = 1'b1;
    return col;
  endfunction

  task automatic run_machine(string name, int ni, int no, int ns, int np, int cycles);
    fabric_cfg_t c;
    int sb = (ns > 1) ? $clog2(ns) : 1;
    int st = 0;
    int rows_hit = 0;
    bit hit [MAXP];
    logic [MAXP-1:0] col;
    sop_t s;

    nrows = 0;
    for (int q = 0; q < ns; q++) add_state_rows(q, ni, np / ns + ((q < np % ns) ? 1 : 0));
    for (int r = 0; r < np; r++) begin r_ns[r] = 0; r_out[r] = 0; hit[r] = 0; end
    for (int b = 0; b < sb; b++) begin
      col = draw_column(np, 1'b1);
      for (int r = 0; r < np; r++) r_ns[r] |= int'(col[r]) << b;
    end
    for (int r = 0; r < np; r++)
      if (r_ns[r] >= ns) r_ns[r] -= 1 << (sb - 1);
    for (int o = 0; o < no; o++) begin
      col = draw_column(np, 1'b0);
      for (int r = 0; r < np; r++) r_out[r] |= int'(col[r]) << o;
    end

    c = '0;
    for (int f = 0; f < sb + no; f++) begin
      s.n = 0;
      for (int r = 0; r < np; r++) begin
        bit set = (f < sb) ? r_ns[r][f] : r_out[r][f - sb];
        if (set) begin
          s.care[s.n] = r_care[r] | 8'(((1 << sb) - 1) << ni);
          s.val[s.n]  = r_val[r]  | 8'(r_st[r] << ni);
          s.n++;
        end
      end
      checks++;
      if (s.n > MAX_CUBES) fail($sformatf("%s: function %0d has %0d cubes", name, f, s.n));
      if (f < sb) begin
        c.seq[f].lm   = lb_from_sop(s);
        c.seq[f].mode = SEQ_LOGIC;
      end else begin
        c.lb[f - sb]      = lb_from_sop(s);
        c.out_rs[f - sb]  = OPOOL_SEL_W'(f - sb);
      end
    end
    for (int o = no; o < N_OUT; o++) c.out_rs[o] = OPOOL_SEL_W'(N_OPOOL - 1);
    for (int k = 0; k < N_SEQ; k++)
      for (int i = 0; i < LB_IN; i++) begin
        logic [POOL_SEL_W-1:0] p;
        p = (i < ni) ? POOL_SEL_W'(i) : POOL_SEL_W'(N_IN + SEQ_W * (i - ni));
        c.seq_rs[k][i] = p;
        c.mid_rs[k][i] = p;
      end
    load_cfg(c);

    for (int cy = 0; cy < cycles; cy++) begin
      int row = -1;
      int x = $urandom % (1 << ni);
      in = N_IN'(x) | (N_IN'($urandom) & ~N_IN'((1 << ni) - 1));
      for (int r = 0; r < np; r++)
        if (r_st[r] == st && ((8'(x) ^ r_val[r]) & r_care[r]) == 0) begin
          checks++;
          if (row >= 0) fail($sformatf("%s: rows %0d and %0d overlap", name, row, r));
          row = r;
        end
      if (row < 0) begin
        fail($sformatf("%s: no row for state %0d input %0d", name, st, x));
        row = 0;
      end
      if (!hit[row]) begin hit[row] = 1; rows_hit++; end
      #1;
      checks++;
      if ((int'(out) & ((1 << no) - 1)) != r_out[row] || (int'(out) >> no) != 0)
        fail($sformatf("%s: output state=%0d in=%0d got=%h exp=%0d", name, st, x, out, r_out[row]));
      @(negedge clk);
      st = r_ns[row];
      begin
        automatic logic [N_SEQ*SEQ_W-1:0] exp_state = '0;
        for (int b = 0; b < sb; b++) exp_state[SEQ_W*b] = 1'(st >> b);
        checks++;
        if (state !== exp_state) fail($sformatf("%s: state got=%h exp=%0d", name, state, st));
      end
    end
    checks++;
    if (rows_hit == 0) fail($sformatf("%s: no row exercised", name));
    $display("%s (I=%0d O=%0d S=%0d P=%0d): %0d of %0d rows exercised", name, ni, no, ns, np, rows_hit, np);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_machine("lion",  2, 1,  4, 11, 3000);
    run_machine("dk27",  1, 2,  7, 14, 3000);
    run_machine("dk512", 1, 3, 15, 30, 3000);
    run_machine("s27",   4, 1,  6, 34, 3000);
    run_machine("tav",   4, 4,  4, 49, 3000);
    run_machine("bbara", 4, 2, 10, 60, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
