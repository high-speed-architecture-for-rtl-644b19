// keccak_buffer - message buffer of the sponge ("buffer function").
//
// Message words of DATA_W bits arrive on a valid/ready stream and are packed
// into one rate block of RATE bits, word 0 in the low bits. Bytes are taken in
// Keccak's little-endian order: byte 0 of a word is bits [7:0]. When a block is
// full, or the message ends, the block is offered to the core on blk_valid_o
// and stays there until blk_take_i; the buffer then clears and accepts words
// again. Because the core only reads the block in the first round of a
// permutation, the next block fills while the other 23 rounds run.
//
// Padding (pad10*1): the byte after the last message byte becomes PAD_BYTE and
// the last bit of the block (bit RATE-1) is set. PAD_BYTE = 8'h01 gives the
// original Keccak padding, 8'h06 the FIPS 202 SHA-3 padding. If the message
// ends exactly on a block boundary the padding needs a block of its own: the
// full block is offered first (not final) and a padding-only block follows.
// blk_final_o marks the last block of a message.
//
// Squeezing: the hash value is read from the rate part of the state
// (rate_state_i). If OUT_W <= RATE it is simply the first OUT_W bits of the
// state after the last permutation. A longer output needs NSQ = ceil(OUT_W/RATE)
// output blocks: the controller pulses squeeze_capture_i before each extra
// permutation, the buffer shifts the current rate block into an output
// register, and hash_o is {last rate block, captured blocks} cut to OUT_W
// bits, first block in the low bits.
//
// Interface: in_last marks the last word of a message, in_bytes (0..DATA_W/8)
// gives the number of valid bytes in that word (ignored on other words; a zero
// length message is one word with in_last=1, in_bytes=0). Registered outputs.
//
// The source architecture fixes the buffer's role (message words of 64 or 256
// bits in, block to the XOR in front of the permutation, hash value out).
// The word/byte packing order, the handshakes, the padding byte and the
// refilling during a permutation are choices of this design.
module keccak_buffer #(
  parameter int unsigned       RATE     = 1024,
  parameter int unsigned       DATA_W   = 64,
  parameter int unsigned       OUT_W    = 512,
  parameter logic [7:0]        PAD_BYTE = 8'h01,
  // derived: output blocks and width of the state slice that is read
  localparam int unsigned      NSQ      = (OUT_W + RATE - 1) / RATE,
  localparam int unsigned      ZW       = (OUT_W < RATE) ? OUT_W : RATE
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // message stream
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [DATA_W-1:0]               in_data,
  input  logic                            in_last,
  input  logic [$clog2(DATA_W/8+1)-1:0]   in_bytes,
  // block to the core
  output logic                            blk_valid_o,
  output logic                            blk_final_o,
  output logic [RATE-1:0]                 blk_o,
  input  logic                            blk_take_i,
  // squeezing: rate part of the state in, hash value out
  input  logic [ZW-1:0]                   rate_state_i,
  input  logic                            squeeze_capture_i,
  output logic [OUT_W-1:0]                hash_o
);

  localparam int unsigned WORDS = RATE / DATA_W;
  localparam int unsigned BPW   = DATA_W / 8;
  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef logic [DATA_W-1:0] word_t;

  word_t            words_q [WORDS];
  word_t            words_d [WORDS];
  logic [IDX_W-1:0] widx_q, widx_d;
  logic             valid_q, valid_d;
  logic             final_q, final_d;
  logic             padpend_q, padpend_d;

  word_t            masked;
  int unsigned      nb;

  assign in_ready    = !valid_q && !padpend_q;
  assign blk_valid_o = valid_q;
  assign blk_final_o = final_q;

  if (NSQ == 1) begin : g_one_block
    assign hash_o = rate_state_i;
  end else begin : g_multi_block
    localparam int unsigned ZBUF_W = (NSQ - 1) * RATE;
    logic [ZBUF_W-1:0]      zbuf_q;
    logic [NSQ*RATE-1:0]    zall;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                 zbuf_q <= '0;
      else if (squeeze_capture_i)
        zbuf_q <= ZBUF_W'({rate_state_i, zbuf_q} >> RATE);
    end

    assign zall   = {rate_state_i, zbuf_q};
    assign hash_o = zall[OUT_W-1:0];
  end

  always_comb begin
    for (int w = 0; w < WORDS; w++)
      blk_o[w*DATA_W +: DATA_W] = words_q[w];
  end

  always_comb begin
    words_d   = words_q;
    widx_d    = widx_q;
    valid_d   = valid_q;
    final_d   = final_q;
    padpend_d = padpend_q;

    nb = (int'(in_bytes) > BPW) ? BPW : int'(in_bytes);
    masked = in_data;
    if (in_last)
      for (int b = 0; b < BPW; b++)
        if (b >= nb) masked[8*b +: 8] = 8'h00;

    if (valid_q && blk_take_i) begin
      // block consumed by the core: clear, or emit the padding-only block
      for (int w = 0; w < WORDS; w++) words_d[w] = '0;
      widx_d  = '0;
      valid_d = 1'b0;
      final_d = 1'b0;
      if (padpend_q) begin
        words_d[0][7:0]                = PAD_BYTE;
        words_d[WORDS-1][DATA_W-1]     = 1'b1;
        valid_d                        = 1'b1;
        final_d                        = 1'b1;
        padpend_d                      = 1'b0;
      end
    end else if (in_valid && in_ready) begin
      words_d[widx_q] = masked;
      if (!in_last) begin
        if (widx_q == IDX_W'(WORDS - 1)) begin
          valid_d = 1'b1;
          final_d = 1'b0;
        end else begin
          widx_d = widx_q + 1'b1;
        end
      end else if (nb < BPW) begin
        // padding starts inside the last message word
        words_d[widx_q][8*nb +: 8]  = PAD_BYTE;
        words_d[WORDS-1][DATA_W-1]  = 1'b1;
        valid_d = 1'b1;
        final_d = 1'b1;
      end else if (widx_q != IDX_W'(WORDS - 1)) begin
        // padding starts in the next word of the same block
        words_d[widx_q + 1'b1][7:0] = PAD_BYTE;
        words_d[WORDS-1][DATA_W-1]  = 1'b1;
        valid_d = 1'b1;
        final_d = 1'b1;
      end else begin
        // message fills the block exactly: padding needs a block of its own
        valid_d   = 1'b1;
        final_d   = 1'b0;
        padpend_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WORDS; w++) words_q[w] <= '0;
      widx_q    <= '0;
      valid_q   <= 1'b0;
      final_q   <= 1'b0;
      padpend_q <= 1'b0;
    end else begin
      words_q   <= words_d;
      widx_q    <= widx_d;
      valid_q   <= valid_d;
      final_q   <= final_d;
      padpend_q <= padpend_d;
    end
  end

  initial begin
    assert (RATE % DATA_W == 0) else $error("RATE must be a multiple of DATA_W");
    assert (DATA_W % 8 == 0)    else $error("DATA_W must be whole bytes");
  end

endmodule
