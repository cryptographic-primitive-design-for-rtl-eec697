// tb_cmpr_next - self-checking test of the 192-bit CMPR next-state logic.
//
// Random states (sparse, dense and random) under two keys are compared
// with the reference model's S.nextstate(); the two keys must give
// different successors (the key acts through U(x)), and the head MPR alone
// stepping from x^0 must give U107(x) reduced, i.e. the key fragment
// itself, in the top 107 bits.
module tb_cmpr_next;
  import cash_ref_pkg::*;

  localparam logic [127:0] KEY_A = 128'h3c6e_f372_a54f_f53a_510e_527f_9b05_688c;
  localparam logic [127:0] KEY_B = 128'hd1b5_4a32_d192_ed03_0123_4567_89ab_cdef;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
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

  logic [191:0] s, na, nb;
  cmpr_next #(.KEY(KEY_A)) u_a (.s(s), .s_next(na));
  cmpr_next #(.KEY(KEY_B)) u_b (.s(s), .s_next(nb));

  function automatic logic [191:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    int differ = 0;
    for (int k = 0; k < 1000; k++) begin
      case (k % 3)
        0: s = rnd();
        1: s = rnd() & rnd() & rnd();
        default: s = rnd() | rnd() | rnd();
      endcase
      #1;
      check(na == next_state(s, KEY_A), $sformatf("key A vector %0d", k));
      check(nb == next_state(s, KEY_B), $sformatf("key B vector %0d", k));
      if (na != nb) differ++;
    end
    check(differ > 990, $sformatf("keys give the same successor %0d times", 1000 - differ));
    // Head MPR at A = 1: next = U107 = KEY[127:23].
    s = '0;
    s[85] = 1'b1;
    #1;
    check(na[191:85] == 107'(KEY_A[127:23]), "head MPR times 1 is not U107");
    check(na[84:0] == next_state(s, KEY_A)[84:0], "tail after unit head");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
