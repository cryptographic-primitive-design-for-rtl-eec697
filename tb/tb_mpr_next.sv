// tb_mpr_next - self-checking test of the product register next-state logic.
//
//  1. The 3-bit worked example: P(x) = x^3 + x + 1, seed 001, and the six
//     valid U(x); each sequence of seven states is compared with the
//     published table, and each register must return to 001 after 7 steps.
//  2. The 19-bit MPR of the CASH CMPR (P = x^19+x^5+x^2+x+1, U = x^17+1)
//     must have period exactly 2^19 - 1.
//  3. A 107-bit MPR with a key-like U(x) and a random chaining input is
//     compared against a reference that forms the full polynomial product
//     and reduces it by long division.
module tb_mpr_next;

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

  // ---------------- 1. worked example ----------------
  localparam int NU = 6;
  localparam logic [2:0] UV [NU] = '{3'b010, 3'b011, 3'b100, 3'b101, 3'b110, 3'b111};
  // Published state sequences t = 0..6, one row per U(x) above.
  localparam logic [2:0] SEQ [NU][7] = '{
    '{3'b001, 3'b010, 3'b100, 3'b101, 3'b111, 3'b011, 3'b110},  // x
    '{3'b001, 3'b011, 3'b101, 3'b010, 3'b110, 3'b111, 3'b100},  // x + 1
    '{3'b001, 3'b100, 3'b111, 3'b110, 3'b010, 3'b101, 3'b011},  // x^2
    '{3'b001, 3'b101, 3'b110, 3'b100, 3'b011, 3'b010, 3'b111},  // x^2 + 1
    '{3'b001, 3'b110, 3'b011, 3'b111, 3'b101, 3'b100, 3'b010},  // x^2 + x
    '{3'b001, 3'b111, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101}   // x^2 + x + 1
  };

  logic [2:0] st3 [NU];
  logic [2:0] nx3 [NU];
  for (genvar g = 0; g < NU; g++) begin : g_small
    mpr_next #(.WIDTH(3), .P(4'b1011), .U(UV[g])) u_dut (
      .state(st3[g]), .chain_in(3'b000), .next(nx3[g]));
  end

  // ---------------- 2. period of the 19-bit MPR ----------------
  logic [18:0] st19, nx19;
  mpr_next #(.WIDTH(19), .P(20'h80027), .U(19'h20001)) u_m19 (
    .state(st19), .chain_in('0), .next(nx19));

  // ---------------- 3. 107-bit against long division ----------------
  localparam logic [107:0] P107 = (108'(1) << 107) | (108'(1) << 59) | (108'(1) << 54)
                                | (108'(1) << 39) | 108'(1);
  localparam logic [106:0] U107 = 107'h5a5_3c0f_9d21_7b46_e8a0_52c3_b91d;
  logic [106:0] st107, ch107, nx107;
  mpr_next #(.WIDTH(107), .P(P107), .U(U107)) u_m107 (
    .state(st107), .chain_in(ch107), .next(nx107));

  function automatic logic [106:0] ref107(logic [106:0] a);
    logic [213:0] prod;
    logic [107:0] pr;
    for (int i = 0; i <= 107; i++) pr[i] = P107[107 - i];   // reciprocal
    prod = '0;
    for (int i = 0; i < 107; i++) if (U107[i]) prod ^= 214'(a) << i;
    for (int d = 212; d >= 107; d--) if (prod[d]) prod ^= 214'(pr) << (d - 107);
    return prod[106:0];
  endfunction

  function automatic logic [106:0] rnd107();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    // 1.
    for (int g = 0; g < NU; g++) st3[g] = 3'b001;
    #1;
    for (int t = 1; t <= 7; t++) begin
      for (int g = 0; g < NU; g++)
        check(nx3[g] == SEQ[g][t % 7], $sformatf("3-bit U=%b t=%0d got %b", UV[g], t, nx3[g]));
      for (int g = 0; g < NU; g++) st3[g] = nx3[g];
      #1;
    end
    // 2.
    begin
      int unsigned steps;
      bit early;
      st19 = 19'd1;
      steps = 0;
      early = 1'b0;
      #1;
      do begin
        st19 = nx19;
        steps++;
        #1;
        if (st19 == 19'd1 && steps < (1 << 19) - 1) early = 1'b1;
        if (st19 == 19'd0) early = 1'b1;
      end while (st19 != 19'd1 && steps < (1 << 19));
      check(!early && steps == (1 << 19) - 1, $sformatf("19-bit period %0d", steps));
    end
    // 3.
    for (int k = 0; k < 500; k++) begin
      st107 = rnd107();
      ch107 = (k % 2 == 0) ? '0 : rnd107();
      #1;
      check(nx107 == (ref107(st107) ^ ch107), $sformatf("107-bit vector %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
