// temp_ucode_pkg: microprograms for the temperature control unit, a 22-state
// machine (A..V) that lets an operator set low and high temperature limits
// and then switches a heat lamp on below the low limit and a fan on above the
// high limit.
//
// Nine condition inputs (condition select codes 0..8): end, strobe, sl, sh,
// dl, dh, enter, ageb, altb. Twelve outputs, packed as temp_out_t. States sit
// at addresses 0..21 in letter order, which gives every two-way state one
// successor at the next address, so the same order serves the full-scale
// sequencer (INCREM for that successor, branch field for the other).
//
// From the state chart: A->B; B tests strobe (0: C, 1: I); C (start low)
// ->D; D waits while end = 1, then E; E (selhilo 0) tests altb (1: F lamp on,
// 0: G); G (selhilo 1) tests ageb (1: H fan on, 0: B); F and H return to B.
// I tests sl (1: J, 0: M). J (ld_low, clr_low) waits for strobe, K tests
// enter (1: B, 0: L ld_low -> J). M tests sh (1: N, 0: Q); N/O/P mirror
// J/K/L for the high limit. Q tests dl (1: R set_low, 0: T); R tests strobe
// (1: I, 0: S -> B); T tests dh (1: U set_high, 0: I); U tests strobe
// (1: I, 0: V -> B). Returning F, H and the ageb = 0 exit of G to B, and
// re-entering the sl test through state I, are this design's reading of the
// chart's off-page lines; seldisp is never driven by the chart and stays 0;
// start is active low (1 except in C).
package temp_ucode_pkg;
  import useq_pkg::*;

  localparam int N_OUT = 12;
  localparam int SEL_W = 4;

  typedef struct packed {
    logic       end_;
    logic       strobe;
    logic       sl;
    logic       sh;
    logic       dl;
    logic       dh;
    logic       enter;
    logic       ageb;
    logic       altb;
  } temp_in_t;

  typedef struct packed {
    logic       start;
    logic       set_low;
    logic       set_high;
    logic       clr_low;
    logic       clr_high;
    logic       ld_low;
    logic       ld_high;
    logic       selhilo;
    logic [1:0] seldisp;
    logic       fan_on;
    logic       lamp_on;
  } temp_out_t;

  // Condition select codes: bit k of cond_in is input k.
  localparam int C_END = 0, C_STR = 1, C_SL = 2, C_SH = 3, C_DL = 4,
                 C_DH = 5, C_ENTER = 6, C_AGEB = 7, C_ALTB = 8, C_ZERO = 15;

  // Map the named inputs onto condition inputs 0..8.
  function automatic logic [8:0] cond_vector(temp_in_t i);
    return {i.altb, i.ageb, i.enter, i.dh, i.dl, i.sh, i.sl, i.strobe, i.end_};
  endfunction

  localparam int A = 0,  B = 1,  C = 2,  D = 3,  E = 4,  F = 5,  G = 6,
                 H = 7,  I = 8,  J = 9,  K = 10, L = 11, M = 12, N = 13,
                 O = 14, P = 15, Q = 16, R = 17, S = 18, T = 19, U = 20,
                 V = 21;
  localparam int NSTATE = 22;

  typedef struct packed {
    int cond;
    int next0;
    int next1;
  } edge_t;

  function automatic edge_t next_of(int s);
    case (s)
      A: return '{C_ZERO,  B, B};
      B: return '{C_STR,   C, I};
      C: return '{C_ZERO,  D, D};
      D: return '{C_END,   E, D};
      E: return '{C_ALTB,  G, F};
      F: return '{C_ZERO,  B, B};
      G: return '{C_AGEB,  B, H};
      H: return '{C_ZERO,  B, B};
      I: return '{C_SL,    M, J};
      J: return '{C_STR,   J, K};
      K: return '{C_ENTER, L, B};
      L: return '{C_ZERO,  J, J};
      M: return '{C_SH,    Q, N};
      N: return '{C_STR,   N, O};
      O: return '{C_ENTER, P, B};
      P: return '{C_ZERO,  N, N};
      Q: return '{C_DL,    T, R};
      R: return '{C_STR,   S, I};
      S: return '{C_ZERO,  B, B};
      T: return '{C_DH,    I, U};
      U: return '{C_STR,   V, I};
      default: return '{C_ZERO, B, B};   // V
    endcase
  endfunction

  function automatic temp_out_t out_of(int s);
    temp_out_t o = '0;
    o.start = 1'b1;
    case (s)
      C: o.start = 1'b0;
      F: o.lamp_on = 1'b1;
      G: o.selhilo = 1'b1;
      H: o.fan_on = 1'b1;
      J: begin o.ld_low = 1'b1; o.clr_low = 1'b1; end
      L: o.ld_low = 1'b1;
      N: begin o.ld_high = 1'b1; o.clr_high = 1'b1; end
      P: o.ld_high = 1'b1;
      R: o.set_low = 1'b1;
      U: o.set_high = 1'b1;
      default: ;
    endcase
    return o;
  endfunction

  function automatic image_t scdn_image();
    image_t m = '{default: '0};
    for (int s = 0; s < NSTATE; s++) begin
      edge_t e = next_of(s);
      m[s] = sd_word(SEL_W, 32'(out_of(s)), int'(e.cond), int'(e.next0),
                     int'(e.next1));
    end
    return m;
  endfunction

  // For the full-scale sequencer a successor at s+1 comes from INCREM and
  // the other from the branch field.
  function automatic image_t flsc_image();
    image_t m = '{default: '0};
    for (int s = 0; s < NSTATE; s++) begin
      edge_t   e  = next_of(s);
      na_sel_e s0 = (int'(e.next0) == s + 1) ? NA_INC : NA_BRANCH;
      na_sel_e s1 = (int'(e.next1) == s + 1) ? NA_INC : NA_BRANCH;
      int      br = (s0 == NA_BRANCH) ? int'(e.next0) : int'(e.next1);
      m[s] = fs_word(SEL_W, 32'(out_of(s)), int'(e.cond), fs_br(s0, s1), br);
    end
    return m;
  endfunction

  localparam image_t SCDN_IMAGE = scdn_image();
  localparam image_t FLSC_IMAGE = flsc_image();
endpackage
