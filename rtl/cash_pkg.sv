// cash_pkg - constants shared by the CASH keyed sponge and its 192-bit
// composite Mersenne product register (CMPR) permutation.
//
// The CMPR is built from five Mersenne product registers (MPRs) of 107, 61,
// 19, 3 and 2 bits. Their feedback polynomials P(x), the fixed update
// polynomials U(x) of the three small MPRs, the split of the 128-bit key into
// a 105-bit and a 23-bit update polynomial, the sponge rate (64) and capacity
// (128), the 256-bit digest and the 4 x 8 step permutation schedule all
// follow the published CASH parameters.
//
// Polynomials are stored as bit vectors with bit i holding the coefficient
// of x^i; a feedback polynomial of degree n is n+1 bits wide. The placement
// of the MPRs inside the 192-bit state (107-bit MPR in the top bits, 2-bit
// MPR in the bottom bits, in the order in which the architecture lists them)
// is a choice of this design.
package cash_pkg;

  localparam int unsigned N        = 192;  // CMPR / sponge state size
  localparam int unsigned RATE     = 64;   // sponge rate r
  localparam int unsigned CAPACITY = 128;  // sponge capacity c
  localparam int unsigned KEY_W    = 128;  // key embedded in U(x)
  localparam int unsigned DIGEST_W = 256;  // H = H0 || H1 || H2 || H3
  localparam int unsigned SQUEEZES = DIGEST_W / RATE;
  localparam int unsigned ROUNDS   = 4;    // outer loop of the permutation
  localparam int unsigned STEPS    = 8;    // CMPR steps per round
  localparam int unsigned PERM_CYCLES = ROUNDS * STEPS;  // 32

  // MPR sizes (Mersenne exponents), head of the chain first.
  localparam int unsigned N107 = 107;
  localparam int unsigned N61  = 61;
  localparam int unsigned N19  = 19;
  localparam int unsigned N3   = 3;
  localparam int unsigned N2   = 2;

  // Key fragment widths: U107 is a 105-bit key fragment, U61 a 23-bit one.
  localparam int unsigned K107_W = 105;
  localparam int unsigned K61_W  = 23;

  // Feedback polynomials P(x).
  // x^107 + x^59 + x^54 + x^39 + 1
  localparam logic [N107:0] P107 = (108'(1) << 107) | (108'(1) << 59) | (108'(1) << 54)
                                 | (108'(1) << 39) | 108'(1);
  // x^61 + x^44 + x^19 + x^15 + 1
  localparam logic [N61:0]  P61  = (62'(1) << 61) | (62'(1) << 44) | (62'(1) << 19)
                                 | (62'(1) << 15) | 62'(1);
  // x^19 + x^5 + x^2 + x + 1
  localparam logic [N19:0]  P19  = (20'(1) << 19) | (20'(1) << 5) | 20'b111;
  // x^3 + x + 1
  localparam logic [N3:0]   P3   = 4'b1011;
  // x^2 + x + 1
  localparam logic [N2:0]   P2   = 3'b111;

  // Fixed update polynomials of the three small MPRs.
  localparam logic [N19-1:0] U19 = (19'(1) << 17) | 19'(1);  // x^17 + 1
  localparam logic [N3-1:0]  U3  = 3'b110;                    // x^2 + x
  localparam logic [N2-1:0]  U2  = 2'b11;                     // x + 1

  // Default key (arbitrary, non-degenerate); the key is a synthesis-time
  // constant, so re-keying means re-synthesis.
  localparam logic [KEY_W-1:0] DEFAULT_KEY = 128'h3c6e_f372_a54f_f53a_510e_527f_9b05_688c;

  typedef logic [N-1:0]        state_t;
  typedef logic [KEY_W-1:0]    key_t;
  typedef logic [DIGEST_W-1:0] digest_t;

  // S.swap(): exchange the upper and lower halves of the state.
  function automatic state_t swap_halves(state_t s);
    return {s[N/2-1:0], s[N-1:N/2]};
  endfunction

endpackage
