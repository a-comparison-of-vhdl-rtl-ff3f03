// tape_ref: reference model of the tape cartridge controller as the
// microprogrammed versions run it (inputs and reset registered first, one
// state per clock, states A..BI numbered 0..60 in letter order), written
// directly from the state chart with its outputs per state.
module tape_ref
  import tape_ucode_pkg::tape_in_t;
(
  input  logic        clk,
  input  logic        nreset,
  input  tape_in_t    tin,
  output logic [12:0] exp_p,
  output int          state
);
  typedef enum int {A, B, C, D, E, F, G, H, I, J, K, L, M, N, O, P, Q, R, S,
                    T, U, V, W, X, Y, Z,
                    AA, AB, AC, AD, AE, AF, AG, AH, AI, AJ, AK, AL, AM, AN,
                    AO, AP, AQ, AR, AS, AT, AU, AV, AW, AX, AY, AZ,
                    BA, BB, BC, BD, BE, BF, BG, BH, BI} st_e;
  st_e st, nx;
  logic nq;
  tape_in_t iq;
  logic cc;
  logic [3:0] t;

  assign cc = iq.cc;
  assign t  = iq.t;

  always_comb begin
    case (st)
      A:  nx = B;
      B:  nx = C;
      C:  nx = cc ? D : AI;
      D:  nx = cc ? M : E;
      E:  nx = cc ? O : F;
      F:  nx = cc ? R : G;
      G:  nx = cc ? V : H;
      H:  nx = cc ? Y : I;
      I:  nx = cc ? AA : J;
      J:  nx = cc ? AG : K;
      K:  nx = cc ? AH : L;
      M:  nx = cc ? N : M;
      N:  nx = E;
      O:  nx = cc ? P : O;
      P:  nx = cc ? Q : P;
      R:  nx = cc ? S : R;
      S:  nx = cc ? T : S;
      T:  nx = cc ? U : T;
      V:  nx = cc ? W : V;
      W:  nx = cc ? X : W;
      Y:  nx = cc ? Z : Y;
      Z:  nx = I;
      AA: nx = cc ? AE : AB;
      AB: nx = cc ? AC : AB;
      AC: nx = cc ? AD : AC;
      AE: nx = cc ? AF : AE;
      AF: nx = AB;
      AI: nx = t[3] ? AU : AJ;
      AJ: nx = t[2] ? AP : AK;
      AK: nx = t[1] ? AN : AL;
      AL: nx = t[0] ? BD : AM;
      AN: nx = t[0] ? BE : AO;
      AP: nx = t[1] ? AS : AQ;
      AQ: nx = t[0] ? BF : AR;
      AS: nx = t[0] ? BG : AT;
      AU: nx = t[2] ? BA : AV;
      AV: nx = t[1] ? AY : AW;
      AW: nx = t[0] ? BH : AX;
      AY: nx = t[0] ? BI : AZ;
      BA: nx = t[1] ? C : BB;
      BB: nx = BC;
      default: nx = C;
    endcase
  end

  always_ff @(posedge clk) begin
    nq <= nreset;
    iq <= tin;
    st <= !nq ? A : nx;
  end

  always_comb begin
    exp_p = '0;
    exp_p[0]  = st inside {M, P, R, T, Y, AE};
    exp_p[1]  = (st == AB);
    exp_p[2]  = (st == AA);
    exp_p[3]  = (st == A);
    exp_p[4]  = st inside {R, AH, AM, AT, BI};
    exp_p[5]  = st inside {AM, AX, BF};
    exp_p[6]  = st inside {AT, AX, BF};
    exp_p[11] = (st == O);
    exp_p[12] = (st == AM);
  end

  assign state = int'(st);
endmodule
