// fsm_tb_pkg: configuration builders and reference helpers for the
// testbenches of the reconfigurable FSM fabric.
//
// A function of up to 8 variables is given as a list of cubes: care[c] marks
// the variables cube c depends on and val[c] their required values. The
// builders turn such lists into PTB and logic block configurations using the
// base-unit layout documented in ptb_and_plane and ptb_or_plane:
//   PTB (i,p,o): term t literal k is unit t*(2i-1)+k, its AND tree node j is
//   unit t*(2i-1)+i+j; output o select t is unit p*(2i-1)+o*(2p-1)+t and its
//   OR tree node j is unit p*(2i-1)+o*(2p-1)+p+j. Unit u is bits [4u+3:4u].
package fsm_tb_pkg;
  import fsm_pkg::*;

  localparam int MAX_CUBES = 16;

  typedef struct {
    int          n;
    logic [7:0]  care [MAX_CUBES];
    logic [7:0]  val  [MAX_CUBES];
  } sop_t;

  // Value of a cube list for the variable vector v.
  function automatic logic sop_eval(sop_t s, logic [7:0] v);
    for (int c = 0; c < s.n; c++)
      if (((v ^ s.val[c]) & s.care[c]) == 8'h00) return 1'b1;
    return 1'b0;
  endfunction

  // Reference model of one base unit.
  function automatic logic bu_ref(bu_func_t f, logic a, logic b);
    case (f)
      BU_ZERO: return 1'b0;
      BU_ONE:  return 1'b1;
      BU_A:    return a;
      BU_NA:   return !a;
      BU_B:    return b;
      BU_NB:   return !b;
      BU_OR:   return a || b;
      BU_NOR:  return !(a || b);
      BU_AND:  return a && b;
      BU_NAND: return !(a && b);
      default: return 1'b0;
    endcase
  endfunction

  // PTB1 whose output 0 is the sum of cubes first..first+3 of s (cubes past
  // s.n are left out). Output 1 sums the same terms if both_outputs is set
  // and is 0 otherwise.
  function automatic ptb1_cfg_t ptb1_from_sop(sop_t s, int first, bit both_outputs);
    ptb1_cfg_t c = '0;
    int ut = 2 * PTB1_I - 1;
    int base_or = PTB1_P * ut;
    for (int t = 0; t < PTB1_P; t++) begin
      int idx = first + t;
      for (int k = 0; k < PTB1_I; k++) begin
        bu_func_t f = BU_ONE;
        if (idx < s.n && s.care[idx][k]) f = s.val[idx][k] ? BU_A : BU_NA;
        c[4*(t*ut + k) +: 4] = f;
      end
      for (int j = 0; j < PTB1_I - 1; j++) c[4*(t*ut + PTB1_I + j) +: 4] = BU_AND;
    end
    for (int o = 0; o < PTB1_O; o++) begin
      int uo = base_or + o * (2 * PTB1_P - 1);
      for (int t = 0; t < PTB1_P; t++)
        c[4*(uo + t) +: 4] = ((first + t < s.n) && (o == 0 || both_outputs)) ? BU_A : BU_ZERO;
      for (int j = 0; j < PTB1_P - 1; j++) c[4*(uo + PTB1_P + j) +: 4] = BU_OR;
    end
    return c;
  endfunction

  // PTB2 computing f(in[0], in[1]).
  function automatic ptb2_cfg_t ptb2_func(bu_func_t f);
    ptb2_cfg_t c;
    c[4*0 +: 4] = BU_A;    // literal of in[0]
    c[4*1 +: 4] = BU_A;    // literal of in[1]
    c[4*2 +: 4] = f;       // two-input node
    c[4*3 +: 4] = BU_A;    // select of the single term
    return c;
  endfunction

  // Logic block computing the sum of up to 16 cubes of its 8 inputs.
  function automatic lb_cfg_t lb_from_sop(sop_t s);
    lb_cfg_t c = '0;
    for (int k = 0; k < N_PTB1; k++) begin
      c.ptb1[k] = ptb1_from_sop(s, 4 * k, 1'b0);
      for (int i = 0; i < PTB1_I; i++) c.l1_sel[k][i] = LB_SEL_W'(i);
    end
    for (int j = 0; j < 3; j++) c.ptb2[j] = ptb2_func(BU_OR);
    c.l2_sel = '0;
    return c;
  endfunction

  // Full minterm list of a truth table over nv variables (nv <= 4 so that it
  // never needs more than 16 cubes).
  function automatic sop_t sop_from_table(logic [15:0] tt, int nv);
    sop_t s;
    s.n = 0;
    for (int m = 0; m < (1 << nv); m++) begin
      if (tt[m]) begin
        s.care[s.n] = 8'((1 << nv) - 1);
        s.val[s.n]  = 8'(m);
        s.n++;
      end
    end
    return s;
  endfunction

  // Logic block computing a truth table over nv <= 5 variables. If the
  // function has more than 16 minterms its complement has at most 16: the
  // block then sums the complement's minterms and the last PTB2 is set to
  // NOR instead of OR.
  function automatic lb_cfg_t lb_from_table(logic [31:0] tt, int nv);
    lb_cfg_t     c;
    logic [31:0] used;
    sop_t        s;
    bit          inv;
    used = (nv >= 5) ? 32'hFFFF_FFFF : ((32'd1 << (1 << nv)) - 1);
    inv  = $countones(tt & used) > MAX_CUBES;
    if (inv) tt = ~tt & used;
    s.n = 0;
    for (int m = 0; m < (1 << nv); m++) begin
      if (tt[m]) begin
        s.care[s.n] = 8'((1 << nv) - 1);
        s.val[s.n]  = 8'(m);
        s.n++;
      end
    end
    c = lb_from_sop(s);
    if (inv) c.ptb2[2] = ptb2_func(BU_NOR);
    return c;
  endfunction

  function automatic sop_t random_sop(int n, int max_care);
    sop_t s;
    s.n = n;
    for (int c = 0; c < n; c++) begin
      s.care[c] = 8'($urandom);
      while ($countones(s.care[c]) > max_care) s.care[c] &= s.care[c] - 8'd1;
      s.val[c] = 8'($urandom);
    end
    return s;
  endfunction

endpackage
