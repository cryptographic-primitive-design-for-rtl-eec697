// mpr_next - next-state logic of one product register (PR), the building
// block of the CMPR. A width-n PR with feedback polynomial P(x) (degree n)
// and update polynomial U(x) (degree < n) steps as
//     A[t+1] = U(x) * A[t]  mod  P(x)
// over GF(2). When n is a Mersenne exponent and P(x) is primitive, every
// U(x) other than 0 and 1 gives the full period 2^n - 1 (a Mersenne product
// register, MPR). U(x) is a parameter: it is a synthesis-time constant,
// which lets the key held in it fold into a plain XOR network.
//
// The product is formed as the XOR of x^i * A mod P(x) for every set
// coefficient u_i of U(x), each x^i * A being one more Galois shift of the
// previous one. The result is then XORed with chain_in, the output of the
// chaining functions of the preceding MPR of a CMPR (zero for the head of
// the chain or a stand-alone MPR).
//
// Bit convention: bit i of the state is the coefficient of x^i, and state
// strings read most significant bit first. With RECIPROCAL = 1 (default)
// the reduction uses the reciprocal x^n P(1/x) of the given P(x); this is
// the convention under which the published worked example (P = x^3+x+1,
// seed 001, one state sequence per U) and the 5-bit CMPR schematic come
// out; both polynomials are primitive together, so the period is the same.
// RECIPROCAL = 0 reduces by P(x) itself.
//
// Purely combinational; the state register belongs to the user.
module mpr_next #(
  parameter int unsigned   WIDTH      = 3,
  parameter logic [WIDTH:0]   P       = 4'b1011,  // x^3 + x + 1
  parameter logic [WIDTH-1:0] U       = 3'b100,   // x^2
  parameter bit            RECIPROCAL = 1'b1
) (
  input  logic [WIDTH-1:0] state,     // A[t]
  input  logic [WIDTH-1:0] chain_in,  // chaining terms from the previous MPR
  output logic [WIDTH-1:0] next       // A[t+1]
);

  function automatic logic [WIDTH:0] reflect(logic [WIDTH:0] p);
    logic [WIDTH:0] r;
    for (int unsigned i = 0; i <= WIDTH; i++) r[i] = p[WIDTH-i];
    return r;
  endfunction

  // Polynomial actually used for the modular reduction.
  localparam logic [WIDTH:0] PRED = RECIPROCAL ? reflect(P) : P;

  if (!P[WIDTH] || !P[0]) begin : g_bad_p
    $error("mpr_next: P(x) must have degree WIDTH and a constant term");
  end
  if (U == '0 || U == WIDTH'(1)) begin : g_bad_u
    $error("mpr_next: U(x) = 0 or 1 is a degenerate update polynomial");
  end

  // x * a mod PRED: one Galois shift.
  function automatic logic [WIDTH-1:0] times_x(logic [WIDTH-1:0] a);
    logic [WIDTH-1:0] sh;
    sh = a << 1;
    if (a[WIDTH-1]) sh ^= PRED[WIDTH-1:0];
    return sh;
  endfunction

  logic [WIDTH-1:0] prod;

  always_comb begin
    logic [WIDTH-1:0] term;
    prod = '0;
    term = state;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (U[i]) prod ^= term;
      term = times_x(term);
    end
  end

  assign next = prod ^ chain_in;

endmodule
