// cash_perm - the CASH permutation: the 192-bit CMPR state register and the
// sequencer that runs one permutation call.
//
// One call is 4 rounds of 8 CMPR steps; after each of the first three
// rounds the upper and lower 96-bit halves of the state are swapped, so
// that the short MPRs at the bottom of the chain and the long ones at the
// top trade places. The swap is folded into the eighth step of a round
// (the register loads swap(nextstate(S))), so a call takes exactly
// 32 clock cycles, as published.
//
// Interface:
//   start / start_val  begin a call on the state start_val. The first step
//                      is taken on that very clock edge (the CMPR input is
//                      muxed between start_val and the register), so the
//                      sponge can XOR a message block into the state and
//                      start permuting in one cycle. Ignored while busy.
//   busy               high while the call is in its steps 1..31.
//   done               one-cycle pulse in the 32nd cycle after start; the
//                      permuted state is on `state` from then on, and a new
//                      call may be started in that same cycle, giving one
//                      call every 32 cycles back to back.
//   state              the state register S.
// Loading the state, the start mux and the done pulse are this design's
// choices; the schedule (4 x 8 steps, swap after rounds 0-2) is published.
module cash_perm
  import cash_pkg::*;
#(
  parameter key_t KEY = DEFAULT_KEY
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t start_val,
  output logic   busy,
  output logic   done,
  output state_t state
);

  localparam int unsigned CW = $clog2(PERM_CYCLES);
  localparam int unsigned RW = $clog2(STEPS);

  state_t         s_q, s_src, s_step;
  logic [CW-1:0]  cnt_q;   // index of the step taken on the next edge
  logic           busy_q, done_q;

  assign s_src = busy_q ? s_q : start_val;

  cmpr_next #(.KEY(KEY)) u_cmpr (.s(s_src), .s_next(s_step));

  // A round ends with step 7, 15, 23, 31; there is no swap after the last.
  logic last_of_round, last_of_call;
  assign last_of_round = (cnt_q[RW-1:0] == RW'(STEPS - 1));
  assign last_of_call  = (cnt_q == CW'(PERM_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (busy_q) begin
        s_q   <= (last_of_round && !last_of_call) ? swap_halves(s_step) : s_step;
        cnt_q <= cnt_q + 1'b1;
        if (last_of_call) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end else if (start) begin
        s_q    <= s_step;        // step 0
        cnt_q  <= CW'(1);
        busy_q <= 1'b1;
      end
    end
  end

  assign busy  = busy_q;
  assign done  = done_q;
  assign state = s_q;

endmodule
