// tb_cmpr_chain - self-checking test of the CMPR chaining functions.
//
//  * 3 -> 2 and 19 -> 3 chains: every output must be balanced over the
//    full truth table (exhaustive) and must be nonlinear (fail
//    f(a^b) = f(a)^f(b)^f(0) for some pair).
//  * 3 -> 2 chain: exact truth table of c0 = s0 ^ (s1 & s2) and
//    c1 = s1 ^ (s2 & s0).
//  * 107 -> 61 and 61 -> 19 chains: random source states against a
//    reference built from the tap rule (3 XOR taps and a 4-input AND).
module tb_cmpr_chain;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [2:0]   s3;   logic [1:0]  c2;
  logic [18:0]  s19;  logic [2:0]  c3;
  logic [106:0] s107; logic [60:0] c61;
  logic [60:0]  s61;  logic [18:0] c19;

  cmpr_chain #(.NS(3),   .NT(2))  u_32   (.src(s3),   .chain(c2));
  cmpr_chain #(.NS(19),  .NT(3))  u_193  (.src(s19),  .chain(c3));
  cmpr_chain #(.NS(107), .NT(61)) u_10761(.src(s107), .chain(c61));
  cmpr_chain #(.NS(61),  .NT(19)) u_6119 (.src(s61),  .chain(c19));

  // Reference for a source of at least 7 bits.
  function automatic bit ref_bit(logic [127:0] s, int ns, int nt, int j);
    int b;
    bit r;
    b = (j * ns) / nt;
    r = s[b % ns] ^ s[(b + 1) % ns] ^ s[(b + 2) % ns];
    r ^= s[(b + 3) % ns] & s[(b + 4) % ns] & s[(b + 5) % ns] & s[(b + 6) % ns];
    return r;
  endfunction

  initial begin
    int ones2 [2];
    int ones3 [3];
    logic [1:0] f0_2;
    logic [2:0] f0_3;
    bit nonlin2, nonlin3;

    // 3 -> 2: truth table, balance.
    ones2 = '{0, 0};
    for (int v = 0; v < 8; v++) begin
      s3 = 3'(v);
      #1;
      check(c2[0] == (s3[0] ^ (s3[1] & s3[2])), $sformatf("3->2 c0 at %b", s3));
      check(c2[1] == (s3[1] ^ (s3[2] & s3[0])), $sformatf("3->2 c1 at %b", s3));
      for (int j = 0; j < 2; j++) ones2[j] += c2[j];
    end
    for (int j = 0; j < 2; j++) check(ones2[j] == 4, $sformatf("3->2 c%0d unbalanced", j));
    // nonlinearity of 3 -> 2
    s3 = 3'b000; #1; f0_2 = c2;
    nonlin2 = 1'b0;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        logic [1:0] fa, fb, fab;
        s3 = 3'(a); #1; fa = c2;
        s3 = 3'(b); #1; fb = c2;
        s3 = 3'(a ^ b); #1; fab = c2;
        if (fab != (fa ^ fb ^ f0_2)) nonlin2 = 1'b1;
      end
    check(nonlin2, "3->2 chain is linear");

    // 19 -> 3: exhaustive balance, nonlinearity.
    ones3 = '{0, 0, 0};
    for (int v = 0; v < (1 << 19); v++) begin
      s19 = 19'(v);
      #1;
      for (int j = 0; j < 3; j++) ones3[j] += c3[j];
    end
    for (int j = 0; j < 3; j++)
      check(ones3[j] == (1 << 18), $sformatf("19->3 c%0d has %0d ones", j, ones3[j]));
    s19 = '0; #1; f0_3 = c3;
    nonlin3 = 1'b0;
    for (int k = 0; k < 200; k++) begin
      logic [18:0] a, b;
      logic [2:0] fa, fb, fab;
      a = 19'($urandom()); b = 19'($urandom());
      s19 = a; #1; fa = c3;
      s19 = b; #1; fb = c3;
      s19 = a ^ b; #1; fab = c3;
      if (fab != (fa ^ fb ^ f0_3)) nonlin3 = 1'b1;
    end
    check(nonlin3, "19->3 chain is linear");
    // 19 -> 3 against the reference
    for (int k = 0; k < 200; k++) begin
      s19 = 19'($urandom());
      #1;
      for (int j = 0; j < 3; j++)
        check(c3[j] == ref_bit(128'(s19), 19, 3, j), $sformatf("19->3 bit %0d", j));
    end

    // 107 -> 61 and 61 -> 19 against the reference.
    for (int k = 0; k < 300; k++) begin
      s107 = {$urandom(), $urandom(), $urandom(), $urandom()};
      s61  = {$urandom(), $urandom()};
      if (k < 50) begin   // dense states exercise the AND terms
        s107 |= {$urandom(), $urandom(), $urandom(), $urandom()};
        s61  |= {$urandom(), $urandom()};
      end
      #1;
      for (int j = 0; j < 61; j++)
        check(c61[j] == ref_bit(128'(s107), 107, 61, j), $sformatf("107->61 bit %0d", j));
      for (int j = 0; j < 19; j++)
        check(c19[j] == ref_bit(128'(s61), 61, 19, j), $sformatf("61->19 bit %0d", j));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
