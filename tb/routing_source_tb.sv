// routing_source_tb: the 24-source, 8-destination routing source used
// between the fabric's sections. Random selects and source patterns are
// applied and each destination is compared with the selected source bit;
// selects past the last source must give 0.
module routing_source_tb;
  localparam int N_SRC = 24, N_DST = 8, SEL_W = 5;

  logic [N_SRC-1:0] src;
  logic [N_DST-1:0][SEL_W-1:0] sel;
  logic [N_DST-1:0] dst;
  int checks = 0, failures = 0;

  routing_source #(.N_SRC(N_SRC), .N_DST(N_DST), .SEL_W(SEL_W)) dut (.src(src), .sel(sel), .dst(dst));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 2000; trial++) begin
      src = N_SRC'($urandom);
      for (int d = 0; d < N_DST; d++) sel[d] = SEL_W'($urandom);
      #1;
      for (int d = 0; d < N_DST; d++) begin
        logic exp;
        exp = (int'(sel[d]) < N_SRC) ? src[sel[d]] : 1'b0;
        checks++;
        if (dst[d] !== exp) begin
          failures++;
          $display("FAIL d=%0d sel=%0d src=%h got=%b", d, sel[d], src, dst[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
