// addsub_tb: exhaustive check of the 2-bit adder/subtractor and a 6-bit
// instance: every state, step and direction against integer arithmetic
// modulo 2^W, including the carry/borrow out.
module addsub_tb;
  logic [1:0] a2, y2;
  logic [5:0] a6, y6;
  logic step, down, c2, c6;
  int checks = 0, failures = 0;

  addsub #(.W(2)) dut2 (.a(a2), .step(step), .down(down), .y(y2), .cout(c2));
  addsub #(.W(6)) dut6 (.a(a6), .step(step), .down(down), .y(y6), .cout(c6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      for (int m = 0; m < 4; m++) begin
        int r2, r6;
        {down, step} = 2'(m);
        a2 = 2'(v); a6 = 6'(v);
        #1;
        r2 = down ? (v % 4) - step : (v % 4) + step;
        r6 = down ? v - step : v + step;
        checks++;
        if (y2 !== 2'(r2) || c2 !== (r2 < 0 || r2 > 3)) begin
          failures++;
          $display("FAIL W=2 a=%0d step=%b down=%b y=%0d c=%b", a2, step, down, y2, c2);
        end
        checks++;
        if (y6 !== 6'(r6) || c6 !== (r6 < 0 || r6 > 63)) begin
          failures++;
          $display("FAIL W=6 a=%0d step=%b down=%b y=%0d c=%b", a6, step, down, y6, c6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
