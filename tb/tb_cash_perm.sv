// tb_cash_perm - self-checking test of the CASH permutation unit.
//
// For random start states: done must come exactly 32 cycles after start,
// the state must then equal the reference permutation, and the state seen
// after 8, 16 and 24 cycles must be the reference's state after each
// swapped round (this checks the swap placement). Calls are also issued
// back to back (a start in the done cycle), and a start pulse during a
// call must be ignored.
module tb_cash_perm;
  import cash_ref_pkg::*;

  localparam logic [127:0] KEY = 128'h0f1e_2d3c_4b5a_6978_8796_a5b4_c3d2_e1f0;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
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

  logic rst_n, start, busy, done;
  logic [191:0] start_val, state;

  cash_perm #(.KEY(KEY)) u_dut (
    .clk, .rst_n, .start, .start_val, .busy, .done, .state);

  // Advance one clock and sample just after the edge.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  function automatic logic [191:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // Reference state after r complete rounds (with the swap after each).
  function automatic logic [191:0] after_rounds(logic [191:0] s, int r);
    for (int j = 0; j < r; j++) begin
      for (int i = 0; i < 8; i++) s = next_state(s, KEY);
      s = {s[95:0], s[191:96]};
    end
    return s;
  endfunction

  initial begin
    logic [191:0] v, expect_s;
    int lat;
    rst_n = 1'b0; start = 1'b0; start_val = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    check(!busy && !done, "idle after reset");

    // Single calls with intermediate checks.
    for (int k = 0; k < 6; k++) begin
      v = (k == 0) ? '1 : rnd();
      start = 1'b1; start_val = v;
      tick();
      start = 1'b0; start_val = rnd();
      lat = 1;
      while (!done) begin
        if (lat == 8 || lat == 16 || lat == 24)
          check(state == after_rounds(v, lat / 8), $sformatf("call %0d round %0d", k, lat / 8));
        if (lat == 12) begin   // start during a call: ignored
          start = 1'b1;
          tick();
          start = 1'b0;
        end else tick();
        lat++;
        if (lat > 40) break;
      end
      #1;
      check(lat == 32, $sformatf("call %0d latency %0d", k, lat));
      expect_s = permute(v, KEY);
      check(state == expect_s, $sformatf("call %0d result", k));
      tick();
      check(!done, "done is a single pulse");
    end

    // Back-to-back calls: chain the output into the next call.
    v = rnd();
    expect_s = v;
    start = 1'b1; start_val = v;
    tick();
    start = 1'b0;
    for (int k = 0; k < 5; k++) begin
      lat = 1;
      while (!done) begin tick(); lat++; if (lat > 40) break; end
      check(lat == 32, $sformatf("back-to-back call %0d latency %0d", k, lat));
      expect_s = permute(expect_s, KEY);
      check(state == expect_s, $sformatf("back-to-back call %0d result", k));
      start = 1'b1; start_val = state;
      tick();
      start = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
