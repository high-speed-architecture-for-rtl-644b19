// tb_keccak_buffer - self-checking testbench of keccak_buffer.
//
// A driver streams messages of many lengths (empty, one byte, partial words,
// exactly one block, one block plus one byte, several blocks, random) with
// random gaps between words. A consumer playing the core takes each offered
// block after a random delay and compares it, and its final flag, with the
// padded blocks of the reference model. It also checks that in_ready is low
// while a block waits, and that the hash output follows the state input.
module tb_keccak_buffer;
  import keccak_ref_pkg::*;

  localparam int RATE   = 1024;
  localparam int DATA_W = 64;
  localparam int OUT_W  = 512;
  localparam int BPW    = DATA_W / 8;
  localparam byte unsigned PAD = 8'h01;

  logic              clk = 0, rst_n = 0;
  logic              in_valid = 0, in_ready, in_last = 0;
  logic [DATA_W-1:0] in_data = '0;
  logic [3:0]        in_bytes = '0;
  logic              blk_valid, blk_final, blk_take = 0;
  logic [RATE-1:0]   blk;
  logic [OUT_W-1:0]  rstate, hash;
  int                checks = 0, failures = 0;
  int                padonly_blocks = 0;

  bytes_t msgs[$];

  keccak_buffer #(.RATE(RATE), .DATA_W(DATA_W), .OUT_W(OUT_W), .PAD_BYTE(PAD)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
    .blk_valid_o(blk_valid), .blk_final_o(blk_final), .blk_o(blk), .blk_take_i(blk_take),
    .rate_state_i(rstate), .squeeze_capture_i(1'b0), .hash_o(hash));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bytes_t make_msg(int n);
    bytes_t m;
    for (int i = 0; i < n; i++) m.push_back(byte'($urandom));
    return m;
  endfunction

  // no word is accepted while a block waits for the core
  always @(posedge clk)
    if (rst_n && blk_valid && in_ready) begin
      failures++;
      $display("FAIL in_ready high while a block waits");
    end

  task automatic drive();
    foreach (msgs[m]) begin
      int n = msgs[m].size();
      int nw = (n == 0) ? 1 : (n + BPW - 1) / BPW;
      for (int w = 0; w < nw; w++) begin
        logic [DATA_W-1:0] word = '0;
        for (int b = 0; b < BPW; b++) begin
          int p = w * BPW + b;
          word[8*b +: 8] = (p < n) ? msgs[m][p] : 8'($urandom);  // junk past the end
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
        @(negedge clk);
        in_valid = 1;
        in_data  = word;
        in_last  = (w == nw - 1);
        in_bytes = (w == nw - 1) ? 4'(n - w * BPW) : 4'(BPW);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    end
  endtask

  task automatic consume();
    foreach (msgs[m]) begin
      int nblk = ref_num_blocks(msgs[m].size(), RATE);
      for (int k = 0; k < nblk; k++) begin
        flat_t e = ref_block(msgs[m], RATE, PAD, k);
        @(posedge clk);
        while (!blk_valid) @(posedge clk);
        repeat ($urandom_range(0, 30)) @(posedge clk);
        #1;
        checks++;
        if (blk !== e[RATE-1:0] || blk_final !== (k == nblk - 1)) begin
          failures++;
          $display("FAIL message %0d (len %0d) block %0d final=%0d", m, msgs[m].size(), k, blk_final);
        end
        if (k == nblk - 1 && msgs[m].size() % (RATE / 8) == 0 && msgs[m].size() != 0)
          padonly_blocks++;
        @(negedge clk);
        blk_take = 1;
        @(negedge clk);
        blk_take = 0;
      end
    end
  endtask

  initial begin
    int lens[$] = '{0, 1, 7, 8, 9, 120, 127, 128, 129, 255, 256, 257, 300};
    foreach (lens[i]) msgs.push_back(make_msg(lens[i]));
    for (int i = 0; i < 20; i++) msgs.push_back(make_msg($urandom_range(0, 400)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      drive();
      consume();
    join
    for (int i = 0; i < 4; i++) begin
      rstate = {16{$urandom}};
      #1;
      checks++;
      if (hash !== rstate) begin failures++; $display("FAIL hash output"); end
    end
    checks++;
    if (padonly_blocks == 0) begin failures++; $display("FAIL no padding-only block seen"); end
    $display("padding-only blocks: %0d", padonly_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
