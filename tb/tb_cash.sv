// tb_cash - end-to-end self-checking test of the CASH MAC at its default
// parameters (192-bit blocks, default key).
//
// Messages of many lengths are sent through the valid/ready block interface
// and each 256-bit digest is compared with the reference model. The test
// counts, and requires at least once, each mechanism of the design:
//   partial   a last block with fewer than 192 bits (padding inside it)
//   extra     a full last block, so a separate padding block is absorbed
//   empty     an empty message (the padding block alone)
//   multi     a message of several blocks
//   stall     the block source not ready when the sponge asks for a block
//   b2b       a new start in the cycle right after the previous H3
//   ignored   a start pulse in the middle of a message (no effect)
//   reset     a reset in the middle of a message, then a clean message
// The four 64-bit digest words are collected from h_word as h_valid
// pulses, and must come in the order H0..H3. Where the source never
// stalls, counting the cycle that takes start as cycle 0, H_i must appear
// in cycle 32 * (blocks + 2 + i) (initial call, one call per padded block,
// then the squeezing calls, 32 cycles each).
module tb_cash;
  import cash_ref_pkg::*;

  localparam int W = 192;

  int checks = 0, failures = 0;
  int n_partial = 0, n_extra = 0, n_empty = 0, n_multi = 0, n_stall = 0;
  int n_b2b = 0, n_ignored = 0, n_reset = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
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

  logic          rst_n, start, blk_valid, blk_ready, blk_last, busy, h_valid;
  logic [1:0]    h_idx;
  logic [63:0]   h_word;
  logic [W-1:0]  blk_data;
  logic [7:0]    blk_nbits;

  cash u_dut (
    .clk, .rst_n, .start, .blk_valid, .blk_ready, .blk_data, .blk_nbits,
    .blk_last, .busy, .h_valid, .h_idx, .h_word);

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // Send one message; stall_pct is the chance (in %) that the source
  // leaves a gap before a block; glitch_start pulses start during it.
  task automatic run_msg(int len, int stall_pct, bit glitch_start, bit expect_b2b);
    bit msg[];
    int nblk, jp, t0, sent, lat;
    bit stalled, presenting;
    int gap;
    logic [255:0] want, digest;
    int nwords;
    msg = new[len];
    foreach (msg[i]) msg[i] = 1'($urandom());
    want = mac(msg, cash_pkg::DEFAULT_KEY, W);
    nblk = (len == 0) ? 1 : (len + W - 1) / W;   // blocks handed over
    jp   = len / W + 1;                          // padded blocks absorbed

    if (expect_b2b) begin
      check(!busy, "busy in the cycle after H3");
      n_b2b++;
    end
    start = 1'b1;
    tick();
    start = 1'b0;
    t0 = cyc;
    check(busy && !h_valid, "busy after start");

    sent = 0;
    stalled = 1'b0;
    presenting = 1'b0;
    gap = (stall_pct > 0) ? 45 : 0;
    while (sent < nblk) begin
      int base, nb;
      bit withhold;
      base = sent * W;
      nb = (len - base > W) ? W : len - base;
      // Once offered, a block stays offered until it is taken; a stalling
      // source leaves a random gap of up to 60 cycles before each block.
      if (!presenting && gap == 0) presenting = 1'b1;
      withhold = !presenting;
      if (gap > 0) gap--;
      blk_valid = !withhold;
      blk_last  = (sent == nblk - 1);
      blk_nbits = blk_last ? 8'(nb) : 8'(W);
      blk_data  = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      for (int i = 0; i < nb; i++) blk_data[W - 1 - i] = msg[base + i];
      if (glitch_start && cyc - t0 == 40) begin
        start = 1'b1;
        n_ignored++;
      end
      #1;
      if (blk_ready && withhold) begin
        stalled = 1'b1;
        n_stall++;
      end
      if (blk_ready && blk_valid) begin
        sent++;
        presenting = 1'b0;
        if (stall_pct > 0 && $urandom_range(99) < stall_pct) gap = $urandom_range(60);
      end
      tick();
      start = 1'b0;
      if (cyc - t0 > 100 * (jp + 6)) break;
    end
    blk_valid = 1'b0;
    blk_data  = '0;

    nwords = 0;
    digest = '0;
    while (nwords < 4 && cyc - t0 < 100 * (jp + 6) + 200) begin
      if (h_valid) begin
        lat = cyc - t0 + 1;   // cycle number, start cycle = 0
        check(h_idx == 2'(nwords), $sformatf("len %0d: word index %0d want %0d", len, h_idx, nwords));
        if (!stalled && !glitch_start)
          check(lat == 32 * (jp + 2 + nwords),
                $sformatf("len %0d: H%0d in cycle %0d want %0d", len, nwords, lat, 32 * (jp + 2 + nwords)));
        digest = {digest[191:0], h_word};
        nwords++;
      end
      tick();
    end
    check(nwords == 4, $sformatf("len %0d: %0d digest words", len, nwords));
    check(digest == want, $sformatf("len %0d: digest %h want %h", len, digest, want));
    if (len % W != 0) n_partial++;
    if (len > 0 && len % W == 0) n_extra++;
    if (len == 0) n_empty++;
    if (nblk > 1) n_multi++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; blk_valid = 1'b0; blk_last = 1'b0;
    blk_nbits = '0; blk_data = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    check(!busy && !h_valid && !blk_ready, "idle after reset");

    run_msg(0,   0, 1'b0, 1'b0);
    run_msg(1,   0, 1'b0, 1'b1);
    run_msg(100, 0, 1'b0, 1'b1);
    run_msg(191, 0, 1'b0, 1'b1);
    run_msg(192, 0, 1'b0, 1'b1);
    run_msg(193, 0, 1'b0, 1'b1);
    run_msg(384, 0, 1'b0, 1'b1);
    run_msg(500, 40, 1'b0, 1'b1);
    run_msg(1000, 0, 1'b1, 1'b1);
    for (int k = 0; k < 6; k++) run_msg($urandom_range(700), (k % 2) * 30, 1'b0, 1'b1);

    // Reset in the middle of a message, then a clean one.
    start = 1'b1;
    tick();
    start = 1'b0;
    repeat (20) tick();
    rst_n = 1'b0;
    tick();
    check(!busy && !h_valid, "reset clears a message in progress");
    rst_n = 1'b1;
    tick();
    n_reset++;
    run_msg(250, 0, 1'b0, 1'b0);

    check(n_partial > 0, "no partial last block");
    check(n_extra   > 0, "no full last block (extra padding block)");
    check(n_empty   > 0, "no empty message");
    check(n_multi   > 0, "no multi-block message");
    check(n_stall   > 0, "no source stall");
    check(n_b2b     > 0, "no back-to-back start");
    check(n_ignored > 0, "no start during a message");
    check(n_reset   > 0, "no reset during a message");
    $display("mechanisms: partial=%0d extra=%0d empty=%0d multi=%0d stall=%0d b2b=%0d ignored=%0d reset=%0d",
             n_partial, n_extra, n_empty, n_multi, n_stall, n_b2b, n_ignored, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
