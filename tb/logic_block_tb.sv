// logic_block_tb: the 4-2-1 PTB triangle.
// Mode 0: random sums of up to 16 cubes through identity switch boxes.
// Mode 1: the same with a random permutation in every first-level switch box.
// Mode 2: random l2_sel bits; a PTB1 whose unused output is chosen drops
//         its four cubes from the sum.
// Mode 3: the last PTB2 set to AND: (cubes 0-7) AND (cubes 8-15).
// Every result is compared with the cubes evaluated directly.
module logic_block_tb;
  import fsm_pkg::*;
  import fsm_tb_pkg::*;

  logic [LB_IN-1:0] lb_in;
  lb_cfg_t cfg;
  logic y;
  int checks = 0, failures = 0;

  logic_block dut (.lb_in(lb_in), .cfg(cfg), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sop_t s;
    int perm [N_PTB1][LB_IN];
    for (int mode = 0; mode < 4; mode++) begin
      for (int trial = 0; trial < 100; trial++) begin
        s = random_sop(1 + ($urandom % 16), 2 + ($urandom % 6));
        cfg = lb_from_sop(s);
        for (int k = 0; k < N_PTB1; k++)
          for (int i = 0; i < LB_IN; i++) perm[k][i] = i;
        if (mode == 1) begin
          for (int k = 0; k < N_PTB1; k++) begin
            for (int i = LB_IN - 1; i > 0; i--) begin
              automatic int j = $urandom % (i + 1);
              automatic int t = perm[k][i];
              perm[k][i] = perm[k][j];
              perm[k][j] = t;
            end
            for (int i = 0; i < LB_IN; i++) cfg.l1_sel[k][i] = LB_SEL_W'(perm[k][i]);
          end
        end
        if (mode == 2) cfg.l2_sel = N_PTB1'($urandom);
        if (mode == 3) cfg.ptb2[2] = ptb2_func(BU_AND);
        for (int v = 0; v < 64; v++) begin
          logic exp, half0, half1;
          logic [7:0] pv [N_PTB1];
          lb_in = 8'($urandom);
          if (v < s.n) begin
            // steer the input onto cube v as seen through PTB1 v/4
            for (int i = 0; i < LB_IN; i++)
              if (s.care[v][i]) lb_in[perm[v/4][i]] = s.val[v][i];
          end
          #1;
          for (int k = 0; k < N_PTB1; k++)
            for (int i = 0; i < LB_IN; i++) pv[k][i] = lb_in[perm[k][i]];
          exp = 1'b0; half0 = 1'b0; half1 = 1'b0;
          for (int c = 0; c < s.n; c++) begin
            automatic int k = c / 4;
            logic hit;
            hit = (((pv[k] ^ s.val[c]) & s.care[c]) == 0);
            if (mode == 2 && cfg.l2_sel[k]) hit = 1'b0;
            exp |= hit;
            if (k < 2) half0 |= hit; else half1 |= hit;
          end
          if (mode == 3) exp = half0 & half1;
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL mode=%0d trial=%0d in=%h got=%b exp=%b", mode, trial, lb_in, y, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
