// tape_ucode_pkg: microprograms for a quarter-inch tape cartridge controller,
// a 61-state machine (states A..Z, AA..AZ, BA..BI) with five tested inputs
// (cc, t0..t3) and thirteen outputs (P0..P12).
//
// The state chart names its decision inputs CC, T0, T1, T2 and T3 and its
// outputs P0..P12; it does not say what they mean, so neither does this
// package. Condition select codes: 0 cc, 1..4 t0..t3, 7 the constant-0
// input (unconditional: both successors are the same). Outputs are packed
// with P0 in bit 0.
//
// States sit at addresses 0..60 in letter order. Every two-way state then has
// one successor at the next address, so the same order serves the full-scale
// sequencer (INCREM for that successor, branch field for the other). The
// chart's connector 1 returns to state C.
//
// This design's readings of the chart: the second box labelled "AK" (the
// t0 = 0 exit of AL) is taken to be state AM, the one letter otherwise
// missing; "P0=1,P0=1" in T is P0 alone; "BE=1" in state BE names no P
// output, so BE drives none; the chart's sixth input is never tested and is
// not a port.
package tape_ucode_pkg;
  import useq_pkg::*;

  localparam int N_OUT = 13;
  localparam int SEL_W = 3;

  typedef struct packed {
    logic [3:0] t;      // t[k] is the chart's Tk
    logic       cc;
  } tape_in_t;

  localparam int C_CC = 0, C_T0 = 1, C_T1 = 2, C_T2 = 3, C_T3 = 4,
                 C_ZERO = 7;

  localparam int A  = 0,  B  = 1,  C  = 2,  D  = 3,  E  = 4,  F  = 5,
                 G  = 6,  H  = 7,  I  = 8,  J  = 9,  K  = 10, L  = 11,
                 M  = 12, N  = 13, O  = 14, P  = 15, Q  = 16, R  = 17,
                 S  = 18, T  = 19, U  = 20, V  = 21, W  = 22, X  = 23,
                 Y  = 24, Z  = 25;
  localparam int AA = 26, AB = 27, AC = 28, AD = 29, AE = 30, AF = 31,
                 AG = 32, AH = 33, AI = 34, AJ = 35, AK = 36, AL = 37,
                 AM = 38, AN = 39, AO = 40, AP = 41, AQ = 42, AR = 43,
                 AS = 44, AT = 45, AU = 46, AV = 47, AW = 48, AX = 49,
                 AY = 50, AZ = 51;
  localparam int BA = 52, BB = 53, BC = 54, BD = 55, BE = 56, BF = 57,
                 BG = 58, BH = 59, BI = 60;
  localparam int NSTATE = 61;

  typedef struct packed {
    int cond;
    int next0;     // successor when the tested input is 0 (chart "N")
    int next1;     // successor when it is 1 (chart "Y")
  } edge_t;

  function automatic edge_t next_of(int s);
    case (s)
      A:  return '{C_ZERO, B,  B};
      B:  return '{C_ZERO, C,  C};
      C:  return '{C_CC,   AI, D};
      D:  return '{C_CC,   E,  M};
      E:  return '{C_CC,   F,  O};
      F:  return '{C_CC,   G,  R};
      G:  return '{C_CC,   H,  V};
      H:  return '{C_CC,   I,  Y};
      I:  return '{C_CC,   J,  AA};
      J:  return '{C_CC,   K,  AG};
      K:  return '{C_CC,   L,  AH};
      L:  return '{C_ZERO, C,  C};
      M:  return '{C_CC,   M,  N};
      N:  return '{C_ZERO, E,  E};
      O:  return '{C_CC,   O,  P};
      P:  return '{C_CC,   P,  Q};
      Q:  return '{C_ZERO, C,  C};
      R:  return '{C_CC,   R,  S};
      S:  return '{C_CC,   S,  T};
      T:  return '{C_CC,   T,  U};
      U:  return '{C_ZERO, C,  C};
      V:  return '{C_CC,   V,  W};
      W:  return '{C_CC,   W,  X};
      X:  return '{C_ZERO, C,  C};
      Y:  return '{C_CC,   Y,  Z};
      Z:  return '{C_ZERO, I,  I};
      AA: return '{C_CC,   AB, AE};
      AB: return '{C_CC,   AB, AC};
      AC: return '{C_CC,   AC, AD};
      AD: return '{C_ZERO, C,  C};
      AE: return '{C_CC,   AE, AF};
      AF: return '{C_ZERO, AB, AB};
      AI: return '{C_T3,   AJ, AU};
      AJ: return '{C_T2,   AK, AP};
      AK: return '{C_T1,   AL, AN};
      AL: return '{C_T0,   AM, BD};
      AN: return '{C_T0,   AO, BE};
      AP: return '{C_T1,   AQ, AS};
      AQ: return '{C_T0,   AR, BF};
      AS: return '{C_T0,   AT, BG};
      AU: return '{C_T2,   AV, BA};
      AV: return '{C_T1,   AW, AY};
      AW: return '{C_T0,   AX, BH};
      AY: return '{C_T0,   AZ, BI};
      BA: return '{C_T1,   BB, C};
      BB: return '{C_ZERO, BC, BC};
      // AG, AH, AM, AO, AR, AT, AX, AZ, BC..BI return to C
      default: return '{C_ZERO, C, C};
    endcase
  endfunction

  function automatic logic [N_OUT-1:0] out_of(int s);
    logic [N_OUT-1:0] p = '0;
    case (s)
      A:  p[3] = 1'b1;
      M, P, T, Y, AE: p[0] = 1'b1;
      O:  p[11] = 1'b1;
      R:  begin p[4] = 1'b1; p[0] = 1'b1; end
      AA: p[2] = 1'b1;
      AB: p[1] = 1'b1;
      AH, BI: p[4] = 1'b1;
      AM: begin p[12] = 1'b1; p[5] = 1'b1; p[4] = 1'b1; end
      BF, AX: begin p[6] = 1'b1; p[5] = 1'b1; end
      AT: begin p[6] = 1'b1; p[4] = 1'b1; end
      default: ;
    endcase
    return p;
  endfunction

  function automatic image_t scdn_image();
    image_t m = '{default: '0};
    for (int s = 0; s < NSTATE; s++) begin
      edge_t e = next_of(s);
      m[s] = sd_word(SEL_W, 32'(out_of(s)), e.cond, e.next0, e.next1);
    end
    return m;
  endfunction

  // For the full-scale sequencer a successor at s+1 comes from INCREM and
  // the other from the branch field.
  function automatic image_t flsc_image();
    image_t m = '{default: '0};
    for (int s = 0; s < NSTATE; s++) begin
      edge_t   e  = next_of(s);
      na_sel_e s0 = (e.next0 == s + 1) ? NA_INC : NA_BRANCH;
      na_sel_e s1 = (e.next1 == s + 1) ? NA_INC : NA_BRANCH;
      int      br = (s0 == NA_BRANCH) ? e.next0 : e.next1;
      m[s] = fs_word(SEL_W, 32'(out_of(s)), e.cond, fs_br(s0, s1), br);
    end
    return m;
  endfunction

  localparam image_t SCDN_IMAGE = scdn_image();
  localparam image_t FLSC_IMAGE = flsc_image();
endpackage
