// keccak_top - iterative Keccak/SHA-3 sponge hash core.
//
// Message words stream into the buffer, which packs and pads them into RATE-bit
// blocks. For each block the controller XORs the block into the first RATE
// bits of the 1600-bit state and runs the 24 rounds of Keccak-f[1600], one
// round per clock, through a single combinational round datapath (theta,
// rho/pi, chi, iota) whose output is written back into the state register.
// After the last block the first OUT_W bits of the state are the hash value;
// an OUT_W larger than RATE is squeezed out over further permutations.
//
// Default configuration: rate R = 1024, capacity C = 1600-1024 = 576, 512-bit
// hash, 64-bit message words, original Keccak padding (PAD_BYTE 8'h01).
// RATE = 1088/OUT_W = 256 and RATE = 576/OUT_W = 512 are the 256- and 512-bit
// configurations; PAD_BYTE = 8'h06 gives FIPS 202 SHA-3 padding.
//
// Timing: a block is absorbed in 24 cycles (round 0 in the cycle the block is
// taken). Words of the next block are accepted while a permutation runs.
// The hash is offered on hash_valid/hash_ready, 24 cycles after the last
// block is taken (plus 24 per extra output block when OUT_W > RATE); after the handshake the state is cleared for the next
// message. hash bits [7:0] are the first byte of the digest.
//
// The block structure (buffer, state, round constant, permutation fed back
// into the state) and the default R = 1024 / C = 576 follow the source
// architecture; computing one round per clock, the interfaces, the padding
// rule and the reset are this design's choices.
module keccak_top
  import keccak_pkg::*;
#(
  parameter int unsigned RATE     = 1024,
  parameter int unsigned OUT_W    = 512,
  parameter int unsigned DATA_W   = 64,
  parameter logic [7:0]  PAD_BYTE = 8'h01
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [DATA_W-1:0]             in_data,
  input  logic                          in_last,
  input  logic [$clog2(DATA_W/8+1)-1:0] in_bytes,
  output logic                          hash_valid,
  input  logic                          hash_ready,
  output logic [OUT_W-1:0]              hash,
  output logic                          busy
);

  localparam int unsigned CAPACITY = STATE_W - RATE;
  localparam int unsigned NSQ      = (OUT_W + RATE - 1) / RATE;   // output blocks
  localparam int unsigned ZW       = (OUT_W < RATE) ? OUT_W : RATE;

  logic              blk_valid, blk_final, blk_take;
  logic [RATE-1:0]   blk;
  round_idx_t        round_idx;
  logic              absorb, load, init, squeeze_capture;
  lane_t             rc;
  state_t            state_q, round_in, round_out;
  logic [STATE_W-1:0] state_flat;

  assign state_flat = state_q;

  keccak_buffer #(
    .RATE(RATE), .DATA_W(DATA_W), .OUT_W(OUT_W), .PAD_BYTE(PAD_BYTE)
  ) u_buffer (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
    .blk_valid_o (blk_valid),
    .blk_final_o (blk_final),
    .blk_o       (blk),
    .blk_take_i  (blk_take),
    .rate_state_i(state_flat[ZW-1:0]),
    .squeeze_capture_i(squeeze_capture),
    .hash_o      (hash)
  );

  keccak_ctrl #(.NUM_SQUEEZE(NSQ)) u_ctrl (
    .clk, .rst_n,
    .blk_valid_i (blk_valid),
    .blk_final_i (blk_final),
    .blk_take_o  (blk_take),
    .round_o     (round_idx),
    .absorb_o    (absorb),
    .load_o      (load),
    .init_o      (init),
    .squeeze_capture_o(squeeze_capture),
    .hash_valid_o(hash_valid),
    .hash_ready_i(hash_ready),
    .busy_o      (busy)
  );

  keccak_round_constant u_rc (.round_i(round_idx), .rc_o(rc));

  // absorbing: the block is XORed into the rate part of the state
  assign round_in = absorb ? (state_q ^ {{CAPACITY{1'b0}}, blk}) : state_q;

  keccak_round u_round (.state_i(round_in), .rc_i(rc), .state_o(round_out));

  keccak_state u_state (
    .clk, .rst_n,
    .init_i(init), .load_i(load), .d_i(round_out), .q_o(state_q)
  );

endmodule
