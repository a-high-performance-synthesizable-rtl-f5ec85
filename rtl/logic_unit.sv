// logic_unit: the two-input reconfigurable base computing unit.
//
// Every AND and OR sub-module of a product term-based block is built from
// this unit. A 4-bit configuration word selects one of ten functions of the
// inputs A and B: constant 0 or 1, A, not A, B, not B, OR, NOR, AND, NAND.
// That set is the list of realisable functions of the architecture's base
// unit; XOR/XNOR and the mixed-polarity functions are deliberately absent.
// The binary code of each function (bu_func_t in fsm_pkg) is this design's
// choice. Unused codes give 0.
//
// Purely combinational: y follows a, b and f with no clock.
module logic_unit
  import fsm_pkg::*;
(
  input  logic     a,
  input  logic     b,
  input  bu_func_t f,
  output logic     y
);

  always_comb begin
    unique case (f)
      BU_ZERO: y = 1'b0;
      BU_ONE:  y = 1'b1;
      BU_A:    y = a;
      BU_NA:   y = ~a;
      BU_B:    y = b;
      BU_NB:   y = ~b;
      BU_OR:   y = a | b;
      BU_NOR:  y = ~(a | b);
      BU_AND:  y = a & b;
      BU_NAND: y = ~(a & b);
      default: y = 1'b0;
    endcase
  end

endmodule
