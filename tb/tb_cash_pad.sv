// tb_cash_pad - self-checking test of the sponge padding M || 1 || 0*.
//
// Every valid-bit count 0..192 is tried with several random blocks (and an
// all-ones block) and compared with a mask-and-shift reference; a 64-bit
// instance is checked the same way.
module tb_cash_pad;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
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

  logic [191:0] d192, p192;
  logic [7:0]   n192;
  logic [63:0]  d64, p64;
  logic [6:0]   n64;

  cash_pad #(.W(192)) u_192 (.data(d192), .nbits(n192), .padded(p192));
  cash_pad #(.W(64))  u_64  (.data(d64),  .nbits(n64),  .padded(p64));

  function automatic logic [191:0] ref192(logic [191:0] d, int n);
    logic [191:0] keep, one;
    keep = (n == 0) ? '0 : ({192{1'b1}} << (192 - n));
    one  = (n < 192) ? (192'(1) << (191 - n)) : '0;
    return (d & keep) | one;
  endfunction

  function automatic logic [63:0] ref64(logic [63:0] d, int n);
    logic [63:0] keep, one;
    keep = (n == 0) ? '0 : ({64{1'b1}} << (64 - n));
    one  = (n < 64) ? (64'(1) << (63 - n)) : '0;
    return (d & keep) | one;
  endfunction

  initial begin
    for (int n = 0; n <= 192; n++) begin
      for (int k = 0; k < 5; k++) begin
        d192 = (k == 0) ? '1 : {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
        n192 = 8'(n);
        #1;
        check(p192 == ref192(d192, n), $sformatf("W=192 nbits=%0d", n));
      end
    end
    for (int n = 0; n <= 64; n++) begin
      for (int k = 0; k < 5; k++) begin
        d64 = (k == 0) ? '1 : {$urandom(), $urandom()};
        n64 = 7'(n);
        #1;
        check(p64 == ref64(d64, n), $sformatf("W=64 nbits=%0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
