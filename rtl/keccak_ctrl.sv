// keccak_ctrl - sponge phase controller.
//
// Sequences the three phases of the sponge: initialisation (state cleared),
// absorbing (each rate block XORed into the state, then the 24 rounds of
// Keccak-f[1600]) and squeezing (the hash value is read from the state).
//
//   IDLE    waits for a block from the buffer. When one is offered it takes
//           it, selects "state XOR block" as the round input and runs round 0
//           in the same cycle.
//   PERMUTE runs rounds 1..23, one per clock, on the state alone. After the
//           last round it returns to IDLE, or, if the block was the last of
//           the message, goes to SQUEEZE.
//   SQUEEZE if more output blocks are needed (NUM_SQUEEZE > 1), pulses
//           squeeze_capture_o so the buffer keeps the current rate block, and
//           starts another permutation (round 0 in this cycle, no block
//           XORed in). Once all output blocks are there it holds
//           hash_valid_o until hash_ready_i; on the handshake the state is
//           cleared for the next message.
//
// One permutation therefore takes NUM_ROUNDS clock cycles, from the cycle the
// block is taken to the cycle the state is ready for the next block.
//
// Interface: blk_valid_i/blk_final_i/blk_take_o from the buffer; round_o
// (round index for the constant ROM), absorb_o (XOR the block in), load_o
// (state register load), init_o (state clear) and squeeze_capture_o (keep
// the rate block before an extra squeeze permutation) to the datapath.
//
// The three phases and the 24 sequential rounds follow the source
// architecture; the state machine, the one-round-per-cycle schedule and the
// hash handshake are this design's own.
module keccak_ctrl
  import keccak_pkg::*;
#(
  parameter int unsigned NUM_SQUEEZE = 1   // output blocks per message
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid_i,
  input  logic       blk_final_i,
  output logic       blk_take_o,
  output round_idx_t round_o,
  output logic       absorb_o,
  output logic       load_o,
  output logic       init_o,
  output logic       squeeze_capture_o,
  output logic       hash_valid_o,
  input  logic       hash_ready_i,
  output logic       busy_o
);

  typedef enum logic [1:0] {S_IDLE, S_PERMUTE, S_SQUEEZE} ctrl_state_e;

  ctrl_state_e state_q, state_d;
  round_idx_t  cnt_q, cnt_d;
  logic        final_q, final_d;
  logic [7:0]  sq_q, sq_d;

  always_comb begin
    state_d      = state_q;
    cnt_d        = cnt_q;
    final_d      = final_q;
    sq_d         = sq_q;
    squeeze_capture_o = 1'b0;
    blk_take_o   = 1'b0;
    absorb_o     = 1'b0;
    load_o       = 1'b0;
    init_o       = 1'b0;
    hash_valid_o = 1'b0;
    round_o      = '0;
    unique case (state_q)
      S_IDLE: begin
        if (blk_valid_i) begin
          blk_take_o = 1'b1;
          absorb_o   = 1'b1;
          load_o     = 1'b1;
          round_o    = '0;
          cnt_d      = round_idx_t'(1);
          final_d    = blk_final_i;
          state_d    = S_PERMUTE;
        end
      end
      S_PERMUTE: begin
        load_o  = 1'b1;
        round_o = cnt_q;
        if (cnt_q == round_idx_t'(NUM_ROUNDS - 1)) begin
          cnt_d   = '0;
          state_d = final_q ? S_SQUEEZE : S_IDLE;
        end else begin
          cnt_d = cnt_q + 1'b1;
        end
      end
      S_SQUEEZE: begin
        if (sq_q != 8'(NUM_SQUEEZE - 1)) begin
          squeeze_capture_o = 1'b1;
          load_o            = 1'b1;
          round_o           = '0;
          cnt_d             = round_idx_t'(1);
          sq_d              = sq_q + 1'b1;
          state_d           = S_PERMUTE;
        end else begin
          hash_valid_o = 1'b1;
          if (hash_ready_i) begin
            init_o  = 1'b1;
            sq_d    = '0;
            final_d = 1'b0;
            state_d = S_IDLE;
          end
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign busy_o = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      final_q <= 1'b0;
      sq_q    <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      final_q <= final_d;
      sq_q    <= sq_d;
    end
  end

  // A hash value, once offered, stays offered until it is accepted.
  a_hash_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                hash_valid_o && !hash_ready_i |=> hash_valid_o);

endmodule
