// ptb_or_plane_tb: the OR sub-module of a PTB1 (4 terms, 2 outputs).
// Random term masks are loaded as select settings with OR tree nodes and
// each output is compared with the OR of the selected terms, for all 16
// term patterns; a second phase sets the tree nodes to AND.
module ptb_or_plane_tb;
  import fsm_pkg::*;

  localparam int P = PTB1_P, O = PTB1_O;
  localparam int UO = 2 * P - 1;

  logic [P-1:0] term;
  logic [BU_CFG_W*or_plane_units(P, O)-1:0] cfg;
  logic [O-1:0] out;
  logic [P-1:0] mask [O];
  int checks = 0, failures = 0;

  ptb_or_plane #(.P(P), .O(O)) dut (.term(term), .cfg(cfg), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int phase = 0; phase < 2; phase++) begin
      for (int trial = 0; trial < 64; trial++) begin
        cfg = '0;
        for (int o = 0; o < O; o++) begin
          mask[o] = P'($urandom);
          for (int p = 0; p < P; p++)
            cfg[4*(o*UO + p) +: 4] = mask[o][p] ? BU_A : (phase == 0 ? BU_ZERO : BU_ONE);
          for (int j = 0; j < P - 1; j++)
            cfg[4*(o*UO + P + j) +: 4] = (phase == 0) ? BU_OR : BU_AND;
        end
        for (int t = 0; t < (1 << P); t++) begin
          term = P'(t);
          #1;
          for (int o = 0; o < O; o++) begin
            logic exp;
            exp = (phase == 0) ? |(term & mask[o]) : &(term | ~mask[o]);
            checks++;
            if (out[o] !== exp) begin
              failures++;
              $display("FAIL phase=%0d out=%0d term=%b mask=%b got=%b", phase, o, term, mask[o], out[o]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
