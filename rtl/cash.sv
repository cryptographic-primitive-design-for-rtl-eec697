// cash - CASH, a keyed sponge hash (message authentication code) whose
// permutation is a 192-bit composite Mersenne product register (CMPR) with
// the 128-bit key embedded in its update polynomials.
//
// Operation (published algorithm):
//   initialise  S = all ones, permute
//   absorb      pad the message as M || 1 || 0*, cut it into blocks; for
//               each block S ^= block, permute
//   squeeze     four times: permute, output H_i = S[63:0] (rate r = 64)
//   digest      H = H0 || H1 || H2 || H3, 256 bits
// Each permutation call is 32 clock cycles (cash_perm). The digest is not
// stored: each 64-bit word H_i is presented straight from the state
// register for one cycle, which keeps the register count to the 192-bit
// state plus a few control bits (the published implementation reports 214
// registers, which leaves no room for a 256-bit digest register).
//
// Message interface (this design's choice; valid/ready handshake):
//   start               begin a new message; accepted while busy is low.
//   blk_valid/blk_ready a block transfers on a clock edge with both high.
//   blk_data            block bits, left-aligned: the message bit that
//                       comes first is blk_data[BLOCK_W-1].
//   blk_nbits           number of valid bits of a last block, 0..BLOCK_W;
//                       a block that is not last is always full.
//   blk_last            marks the final block of the message. A last block
//                       with BLOCK_W bits is followed internally by an extra
//                       padding block 1 || 0*; an empty message is one last
//                       block with blk_nbits = 0.
//   h_valid/h_idx/h_word  digest word H_i (i = h_idx) on h_word, valid for
//                       the one cycle in which h_valid is high; there is
//                       no backpressure, the word must be taken then.
//   busy                a message is in progress (until after H3).
// Timing: counting the cycle in which start is taken as cycle 0, and with
// blocks offered as soon as asked for, a message of j padded blocks
// presents H_i in cycle 32 * (j + 2 + i), so H3 in cycle 32 * (j + 5):
// one initial, j absorbing and four squeezing calls of 32 cycles, back to
// back (a block is taken in the cycle its predecessor's call ends, so
// blocks are absorbed at one per 32 cycles).
//
// BLOCK_W is the absorbed block size. The published algorithm XORs 192-bit
// blocks into the whole state (full-state keyed sponge), which is the
// default; the published throughput figure matches 64 bits per call, which
// BLOCK_W = 64 gives (blocks then enter S[63:0], the rate part).
module cash
  import cash_pkg::*;
#(
  parameter key_t        KEY     = DEFAULT_KEY,
  parameter int unsigned BLOCK_W = N,
  localparam int unsigned BW     = $clog2(BLOCK_W + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                blk_valid,
  output logic                blk_ready,
  input  logic [BLOCK_W-1:0]  blk_data,
  input  logic [BW-1:0]       blk_nbits,
  input  logic                blk_last,
  output logic                busy,
  output logic                h_valid,
  output logic [1:0]          h_idx,
  output logic [RATE-1:0]     h_word
);

  if (BLOCK_W != N && BLOCK_W != RATE) begin : g_bad_bw
    $error("cash: BLOCK_W must be the state size or the rate");
  end

  typedef enum logic [1:0] {
    ST_IDLE,     // no message in progress
    ST_ABSORB,   // permutation running (initial or absorbing call)
    ST_WAIT,     // waiting for the next message block
    ST_SQUEEZE   // squeezing calls
  } state_e;

  state_e st_q, st_d;

  logic   perm_start, perm_busy, perm_done;
  state_t perm_val, s;

  logic   pad_pending_q, pad_pending_d;  // full last block: padding block owed
  logic   last_in_q, last_in_d;          // whole padded message absorbed
  logic [1:0] sq_cnt_q, sq_cnt_d;

  // Padding of the incoming block, and the padding-only block.
  logic [BLOCK_W-1:0] blk_padded, pad_only;
  logic [BW-1:0]      nbits_eff;

  assign nbits_eff = blk_last ? blk_nbits : BW'(BLOCK_W);

  cash_pad #(.W(BLOCK_W)) u_pad_blk (.data(blk_data), .nbits(nbits_eff), .padded(blk_padded));
  cash_pad #(.W(BLOCK_W)) u_pad_end (.data('0), .nbits('0), .padded(pad_only));

  cash_perm #(.KEY(KEY)) u_perm (
    .clk, .rst_n,
    .start     (perm_start),
    .start_val (perm_val),
    .busy      (perm_busy),
    .done      (perm_done),
    .state     (s)
  );

  // The permutation is free for a new call now.
  logic perm_free;
  assign perm_free = (st_q == ST_WAIT) || (st_q == ST_ABSORB && perm_done);

  always_comb begin
    st_d          = st_q;
    pad_pending_d = pad_pending_q;
    last_in_d     = last_in_q;
    sq_cnt_d      = sq_cnt_q;
    perm_start    = 1'b0;
    perm_val      = s;
    blk_ready     = 1'b0;

    unique case (st_q)
      ST_IDLE: begin
        if (start) begin
          perm_start    = 1'b1;          // initialise: S = 1^192, permute
          perm_val      = '1;
          pad_pending_d = 1'b0;
          last_in_d     = 1'b0;
          st_d          = ST_ABSORB;
        end
      end
      ST_ABSORB, ST_WAIT: begin
        if (perm_free) begin
          if (pad_pending_q) begin
            perm_start    = 1'b1;
            perm_val      = s ^ N'(pad_only);
            pad_pending_d = 1'b0;
            last_in_d     = 1'b1;
            st_d          = ST_ABSORB;
          end else if (last_in_q) begin
            perm_start = 1'b1;           // first squeezing call
            sq_cnt_d   = '0;
            st_d       = ST_SQUEEZE;
          end else begin
            blk_ready = 1'b1;
            if (blk_valid) begin
              perm_start = 1'b1;
              perm_val   = s ^ N'(blk_padded);
              if (blk_last) begin
                if (nbits_eff == BW'(BLOCK_W)) pad_pending_d = 1'b1;
                else                           last_in_d     = 1'b1;
              end
              st_d = ST_ABSORB;
            end else begin
              st_d = ST_WAIT;
            end
          end
        end
      end
      ST_SQUEEZE: begin
        if (perm_done) begin
          if (sq_cnt_q == 2'(SQUEEZES - 1)) begin
            st_d = ST_IDLE;
          end else begin
            perm_start = 1'b1;
            sq_cnt_d   = sq_cnt_q + 1'b1;
          end
        end
      end
      default: st_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= ST_IDLE;
      pad_pending_q <= 1'b0;
      last_in_q     <= 1'b0;
      sq_cnt_q      <= '0;
    end else begin
      st_q          <= st_d;
      pad_pending_q <= pad_pending_d;
      last_in_q     <= last_in_d;
      sq_cnt_q      <= sq_cnt_d;
    end
  end

  assign busy    = (st_q != ST_IDLE);
  assign h_valid = (st_q == ST_SQUEEZE) && perm_done;
  assign h_idx   = sq_cnt_q;
  assign h_word  = s[RATE-1:0];

  // Handshake rules for the block source.
  a_nbits_range: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid && blk_last |-> 32'(blk_nbits) <= BLOCK_W);
  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid && !blk_ready && busy |=> blk_valid);
  // The permutation is never asked to start while it is running.
  a_perm_start: assert property (@(posedge clk) disable iff (!rst_n)
    perm_start |-> !perm_busy);

endmodule
