// ptb_tb: both PTB shapes of the logic block.
// PTB1 (8,4,2): random sums of up to four cubes on output 0, the same terms
// on output 1, compared with direct evaluation of the cubes.
// PTB2 (2,1,1): every base-unit function on all four input pairs.
module ptb_tb;
  import fsm_pkg::*;
  import fsm_tb_pkg::*;

  logic [PTB1_I-1:0] in1;
  ptb1_cfg_t         cfg1;
  logic [PTB1_O-1:0] out1;
  logic [PTB2_I-1:0] in2;
  ptb2_cfg_t         cfg2;
  logic [PTB2_O-1:0] out2;
  int checks = 0, failures = 0;

  ptb #(.I(PTB1_I), .P(PTB1_P), .O(PTB1_O)) dut1 (.in(in1), .cfg(cfg1), .out(out1));
  ptb #(.I(PTB2_I), .P(PTB2_P), .O(PTB2_O)) dut2 (.in(in2), .cfg(cfg2), .out(out2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sop_t s;
    for (int trial = 0; trial < 300; trial++) begin
      s = random_sop(1 + trial % 4, 1 + trial % 8);
      cfg1 = ptb1_from_sop(s, 0, trial[0]);
      for (int v = 0; v < 16; v++) begin
        in1 = (v < s.n) ? (s.val[v] ^ (8'($urandom) & ~s.care[v])) : 8'($urandom);
        #1;
        checks++;
        if (out1[0] !== sop_eval(s, in1)) begin
          failures++;
          $display("FAIL ptb1 out0 in=%h got=%b", in1, out1[0]);
        end
        checks++;
        if (out1[1] !== (trial[0] ? sop_eval(s, in1) : 1'b0)) begin
          failures++;
          $display("FAIL ptb1 out1 in=%h got=%b", in1, out1[1]);
        end
      end
    end
    for (int code = 0; code < 10; code++) begin
      cfg2 = ptb2_func(bu_func_t'(code));
      for (int ab = 0; ab < 4; ab++) begin
        in2 = 2'(ab);
        #1;
        checks++;
        if (out2[0] !== bu_ref(bu_func_t'(code), in2[0], in2[1])) begin
          failures++;
          $display("FAIL ptb2 code=%0d in=%b got=%b", code, in2, out2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
