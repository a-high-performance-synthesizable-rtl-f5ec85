// sequential_block_tb: one sequential block in both modes.
//  - reset loads the configured initial state;
//  - SEQ_LOGIC: q[0] follows a random 16-cube function of the logic module
//    inputs one clock later, q[1] stays 0, carry_out stays 0;
//  - SEQ_COUNT, not cascaded: the logic module output (here lm_in[0]) is
//    the step; counting up and down, wrapping around the 4-state circle;
//  - SEQ_COUNT, cascaded: carry_in is the step; carry_out is checked as the
//    carry (up) or borrow (down) out of the 2-bit state.
// The reference is a separate integer model kept by the testbench.
module sequential_block_tb;
  import fsm_pkg::*;
  import fsm_tb_pkg::*;

  logic clk = 0, rst_n = 0, carry_in = 0, carry_out;
  logic [LB_IN-1:0] lm_in = '0;
  seq_cfg_t cfg;
  logic [SEQ_W-1:0] q;
  int checks = 0, failures = 0;
  int model;
  int wraps = 0;

  sequential_block dut (.clk(clk), .rst_n(rst_n), .lm_in(lm_in), .carry_in(carry_in),
                        .cfg(cfg), .q(q), .carry_out(carry_out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [SEQ_W-1:0] got, int exp);
    checks++;
    if (got !== SEQ_W'(exp)) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic do_reset(logic [SEQ_W-1:0] init);
    @(negedge clk);
    cfg.init = init;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    check("reset", q, int'(init));
  endtask

  initial begin
    sop_t s, en;
    // ---- logic mode ----
    for (int trial = 0; trial < 20; trial++) begin
      s = random_sop(1 + ($urandom % 16), 3);
      cfg = '0;
      cfg.lm = lb_from_sop(s);
      cfg.mode = SEQ_LOGIC;
      do_reset(SEQ_W'($urandom));
      for (int c = 0; c < 50; c++) begin
        logic exp;
        lm_in = 8'($urandom);
        exp = sop_eval(s, lm_in);
        @(negedge clk);
        check("logic q", q, int'(exp));
        checks++;
        if (carry_out !== 1'b0) begin
          failures++;
          $display("FAIL carry_out in logic mode");
        end
      end
    end
    // ---- counter mode, step from the logic module ----
    en.n = 1; en.care[0] = 8'h01; en.val[0] = 8'h01;
    for (int dir = 0; dir < 2; dir++) begin
      cfg = '0;
      cfg.lm = lb_from_sop(en);
      cfg.mode = SEQ_COUNT;
      cfg.down = dir[0];
      do_reset(2'd1);
      model = 1;
      for (int c = 0; c < 100; c++) begin
        lm_in = 8'($urandom);
        if (lm_in[0]) begin
          model = (dir != 0) ? model - 1 : model + 1;
          if (model < 0 || model > 3) wraps++;
          model = model & 3;
        end
        @(negedge clk);
        check("count q", q, model);
      end
    end
    // ---- counter mode, cascaded ----
    for (int dir = 0; dir < 2; dir++) begin
      cfg = '0;
      cfg.mode = SEQ_COUNT;
      cfg.cascade = 1'b1;
      cfg.down = dir[0];
      do_reset(2'd2);
      model = 2;
      for (int c = 0; c < 100; c++) begin
        int nxt;
        carry_in = 1'($urandom);
        lm_in = 8'($urandom);
        #1;
        nxt = (dir != 0) ? model - int'(carry_in) : model + int'(carry_in);
        checks++;
        if (carry_out !== (nxt < 0 || nxt > 3)) begin
          failures++;
          $display("FAIL carry_out model=%0d cin=%b dir=%0d got=%b", model, carry_in, dir, carry_out);
        end
        model = nxt & 3;
        @(negedge clk);
        check("cascade q", q, model);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap around the circle was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
