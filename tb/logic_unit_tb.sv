// logic_unit_tb: exhaustive check of the base unit. Every function code
// (the ten defined and the unused ones) is applied with all four input
// combinations and compared with a truth table written out here.
module logic_unit_tb;
  import fsm_pkg::*;

  logic a, b, y;
  bu_func_t f;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .f(f), .y(y));

  // Truth tables indexed by {a,b}: bit 3 = (a=1,b=1) ... bit 0 = (0,0).
  function automatic logic [3:0] table_of(int code);
    case (code)
      0: return 4'b0000;  // 0
      1: return 4'b1111;  // 1
      2: return 4'b1100;  // A
      3: return 4'b0011;  // not A
      4: return 4'b1010;  // B
      5: return 4'b0101;  // not B
      6: return 4'b1110;  // OR
      7: return 4'b0001;  // NOR
      8: return 4'b1000;  // AND
      9: return 4'b0111;  // NAND
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 16; code++) begin
      for (int ab = 0; ab < 4; ab++) begin
        f = bu_func_t'(code);
        {a, b} = 2'(ab);
        #1;
        checks++;
        if (y !== table_of(code)[ab]) begin
          failures++;
          $display("FAIL code=%0d a=%0b b=%0b y=%0b", code, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
