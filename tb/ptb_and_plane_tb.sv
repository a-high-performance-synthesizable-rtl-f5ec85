// ptb_and_plane_tb: the AND sub-module of a PTB1 (8 inputs, 4 terms).
// Random cubes are loaded as literal settings with AND tree nodes and each
// term is compared with the cube evaluated directly; a second phase sets
// every tree node to OR and compares with the OR of the literals.
module ptb_and_plane_tb;
  import fsm_pkg::*;

  localparam int I = PTB1_I, P = PTB1_P;
  localparam int UT = 2 * I - 1;

  logic [I-1:0] in;
  logic [BU_CFG_W*and_plane_units(I, P)-1:0] cfg;
  logic [P-1:0] term;
  int checks = 0, failures = 0;

  logic [7:0] care [P], val [P];

  ptb_and_plane #(.I(I), .P(P)) dut (.in(in), .cfg(cfg), .term(term));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int phase = 0; phase < 2; phase++) begin
      for (int trial = 0; trial < 200; trial++) begin
        cfg = '0;
        for (int p = 0; p < P; p++) begin
          care[p] = 8'($urandom);
          val[p]  = 8'($urandom);
          for (int k = 0; k < I; k++)
            cfg[4*(p*UT + k) +: 4] = care[p][k] ? (val[p][k] ? BU_A : BU_NA)
                                               : (phase == 0 ? BU_ONE : BU_ZERO);
          for (int j = 0; j < I - 1; j++)
            cfg[4*(p*UT + I + j) +: 4] = (phase == 0) ? BU_AND : BU_OR;
        end
        for (int v = 0; v < 8; v++) begin
          in = 8'($urandom);
          if (v == 0) in = val[0];  // make sure some terms are true
          #1;
          for (int p = 0; p < P; p++) begin
            logic exp;
            if (phase == 0) exp = (((in ^ val[p]) & care[p]) == 0);
            else            exp = |(~(in ^ val[p]) & care[p]);
            checks++;
            if (term[p] !== exp) begin
              failures++;
              $display("FAIL phase=%0d term=%0d in=%h care=%h val=%h got=%b", phase, p, in, care[p], val[p], term[p]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
