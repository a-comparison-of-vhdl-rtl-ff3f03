// temp_ref: reference model of the temperature control unit as the
// microprogrammed versions run it (inputs and reset registered first, one
// state per clock, states A..V numbered 0..21), written directly from the
// state chart with its outputs per state.
module temp_ref
  import temp_ucode_pkg::temp_in_t;
  import temp_ucode_pkg::temp_out_t;
(
  input  logic      clk,
  input  logic      nreset,
  input  temp_in_t  cin,
  output temp_out_t exp_out,
  output int        state
);
  typedef enum int {A, B, C, D, E, F, G, H, I, J, K, L, M, N, O, P, Q, R, S,
                    T, U, V} st_e;
  st_e st, nx;
  logic nq;
  temp_in_t iq;

  always_comb begin
    case (st)
      A: nx = B;
      B: nx = iq.strobe ? I : C;
      C: nx = D;
      D: nx = iq.end_ ? D : E;
      E: nx = iq.altb ? F : G;
      F: nx = B;
      G: nx = iq.ageb ? H : B;
      H: nx = B;
      I: nx = iq.sl ? J : M;
      J: nx = iq.strobe ? K : J;
      K: nx = iq.enter ? B : L;
      L: nx = J;
      M: nx = iq.sh ? N : Q;
      N: nx = iq.strobe ? O : N;
      O: nx = iq.enter ? B : P;
      P: nx = N;
      Q: nx = iq.dl ? R : T;
      R: nx = iq.strobe ? I : S;
      S: nx = B;
      T: nx = iq.dh ? U : I;
      U: nx = iq.strobe ? I : V;
      default: nx = B;
    endcase
  end

  always_ff @(posedge clk) begin
    nq <= nreset;
    iq <= cin;
    st <= !nq ? A : nx;
  end

  always_comb begin
    exp_out = '0;
    exp_out.start = (st != C);
    exp_out.lamp_on = (st == F);
    exp_out.selhilo = (st == G);
    exp_out.fan_on = (st == H);
    exp_out.ld_low = (st == J || st == L);
    exp_out.clr_low = (st == J);
    exp_out.ld_high = (st == N || st == P);
    exp_out.clr_high = (st == N);
    exp_out.set_low = (st == R);
    exp_out.set_high = (st == U);
  end

  assign state = int'(st);
endmodule
