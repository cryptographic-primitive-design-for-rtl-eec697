// cmpr_chain - chaining functions from one MPR of a CMPR into the next.
//
// Every bit j of the target MPR receives one Boolean function of the source
// MPR's current state; mpr_next XORs it into that bit's next state. What the
// architecture fixes is the form: chaining only runs from one MPR to the
// next, each function is balanced (as many ones as zeros in its truth
// table), and each uses at most a 4-input XOR and a 4-input AND; the AND
// term is what makes the CMPR nonlinear. The choice of tap bits is this
// design's own:
//
//   source of 7 bits or more:
//     c[j] = s[b] ^ s[b+1] ^ s[b+2] ^ (s[b+3] & s[b+4] & s[b+5] & s[b+6])
//   source of 3 to 6 bits:
//     c[j] = s[b] ^ (s[b+1] & s[b+2])
//
// with b = floor(j * NS / NT) and all indices taken modulo NS, so the taps
// of the target bits are spread evenly over the source and the taps of one
// function are distinct. The lone XOR tap s[b] does not occur in the AND
// term, which makes every function balanced.
//
// Purely combinational.
module cmpr_chain #(
  parameter int unsigned NS = 3,  // source MPR width
  parameter int unsigned NT = 2   // target MPR width
) (
  input  logic [NS-1:0] src,    // current state of the source MPR
  output logic [NT-1:0] chain   // one chaining term per target bit
);

  localparam int unsigned NX = (NS >= 7) ? 3 : 1;  // linear taps
  localparam int unsigned NA = (NS >= 7) ? 4 : 2;  // AND-term taps

  if (NS < 3) begin : g_bad_ns
    $error("cmpr_chain: the source MPR needs at least 3 bits");
  end

  for (genvar j = 0; j < NT; j++) begin : g_bit
    localparam int unsigned BASE = (j * NS) / NT;
    logic lin, prod;
    always_comb begin
      lin  = 1'b0;
      prod = 1'b1;
      for (int unsigned m = 0; m < NX; m++) lin ^= src[(BASE + m) % NS];
      for (int unsigned m = 0; m < NA; m++) prod &= src[(BASE + NX + m) % NS];
    end
    assign chain[j] = lin ^ prod;
  end

endmodule
