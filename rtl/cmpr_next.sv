// cmpr_next - S.nextstate() of the 192-bit composite Mersenne product
// register (CMPR) used by the CASH permutation.
//
// Five MPRs step together in one clock: 107, 61, 19, 3 and 2 bits, with
// primitive feedback polynomials, so each one alone has full period
// 2^n - 1. The 128-bit key is the update polynomials of the two large MPRs:
// U107(x) is the 105-bit key fragment KEY[127:23] and U61(x) the 23-bit
// fragment KEY[22:0], each read as a polynomial with bit i the coefficient
// of x^i (how the fragments are placed is this design's choice). The three
// small MPRs have fixed U(x). Chaining functions (cmpr_chain) run only from
// one MPR to the next, 107 -> 61 -> 19 -> 3 -> 2, and are XORed into the
// next state of the target; the AND terms in them make the CMPR nonlinear,
// while the update stays invertible (a permutation of the 2^192 states).
//
// State layout (this design's choice): S = {M107, M61, M19, M3, M2}, M107
// in S[191:85] and M2 in S[1:0].
//
// Purely combinational. Each key fragment must be neither 0 nor 1.
module cmpr_next
  import cash_pkg::*;
#(
  parameter key_t KEY = DEFAULT_KEY
) (
  input  state_t s,
  output state_t s_next
);

  localparam logic [N107-1:0] U107 = (N107)'(KEY[KEY_W-1 -: K107_W]);
  localparam logic [N61-1:0]  U61  = (N61)'(KEY[K61_W-1:0]);

  logic [N107-1:0] m107, n107;
  logic [N61-1:0]  m61,  n61,  c61;
  logic [N19-1:0]  m19,  n19,  c19;
  logic [N3-1:0]   m3,   n3,   c3;
  logic [N2-1:0]   m2,   n2,   c2;

  assign {m107, m61, m19, m3, m2} = s;

  // Chaining functions, each fed by the current state of the preceding MPR.
  cmpr_chain #(.NS(N107), .NT(N61)) u_c61 (.src(m107), .chain(c61));
  cmpr_chain #(.NS(N61),  .NT(N19)) u_c19 (.src(m61),  .chain(c19));
  cmpr_chain #(.NS(N19),  .NT(N3))  u_c3  (.src(m19),  .chain(c3));
  cmpr_chain #(.NS(N3),   .NT(N2))  u_c2  (.src(m3),   .chain(c2));

  mpr_next #(.WIDTH(N107), .P(P107), .U(U107)) u_m107 (.state(m107), .chain_in('0), .next(n107));
  mpr_next #(.WIDTH(N61),  .P(P61),  .U(U61))  u_m61  (.state(m61),  .chain_in(c61), .next(n61));
  mpr_next #(.WIDTH(N19),  .P(P19),  .U(U19))  u_m19  (.state(m19),  .chain_in(c19), .next(n19));
  mpr_next #(.WIDTH(N3),   .P(P3),   .U(U3))   u_m3   (.state(m3),   .chain_in(c3),  .next(n3));
  mpr_next #(.WIDTH(N2),   .P(P2),   .U(U2))   u_m2   (.state(m2),   .chain_in(c2),  .next(n2));

  assign s_next = {n107, n61, n19, n3, n2};

endmodule
