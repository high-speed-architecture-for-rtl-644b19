// tb_keccak_top - end-to-end testbench of keccak_top at its default
// configuration (rate 1024, capacity 576, 512-bit hash, 64-bit words,
// Keccak padding).
//
// Messages of many lengths are streamed in with random gaps, digests are
// taken with random back-pressure, and every digest is compared with the
// reference sponge of keccak_ref_pkg. It also checks the timing: each message
// must keep the core busy for exactly 23 cycles per padded block (rounds
// 1..23; round 0 runs in the cycle the block is taken, while the core still
// reports idle), and a single-block
// message sent to an idle core must give its digest 25 cycles after its last
// word is accepted (one cycle in the buffer, then 24 rounds).
// Counted mechanisms (each must occur): multi-block absorb, padding-only
// block, empty message, words accepted while a permutation runs, input
// stall (buffer full), digest back-pressure.
module tb_keccak_top;
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
  logic              hash_valid, hash_ready = 0, busy;
  logic [OUT_W-1:0]  hash;
  int                checks = 0, failures = 0;
  longint            cycle = 0;

  int n_multiblock = 0, n_padonly = 0, n_empty = 0, n_overlap = 0;
  int n_in_stall = 0, n_hash_stall = 0, n_latency = 0;
  int perm_cycles = 0;
  longint last_accept[$];     // cycle of the last word, or -1 if not timed

  bytes_t msgs[$];

  keccak_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
                  .hash_valid, .hash_ready, .hash, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready && busy)  n_overlap++;
      if (in_valid && !in_ready)         n_in_stall++;
      if (hash_valid && !hash_ready)     n_hash_stall++;
      if (busy && !hash_valid)           perm_cycles++;
    end
  end

  task automatic drive();
    foreach (msgs[m]) begin
      int n = msgs[m].size();
      int nw = (n == 0) ? 1 : (n + BPW - 1) / BPW;
      // every fourth message waits until the core is idle, for the latency check
      bit timed = (m % 4 == 3) && (n < RATE / 8);
      if (timed) begin
        @(negedge clk);
        while (busy || hash_valid || !in_ready) @(negedge clk);
      end
      for (int w = 0; w < nw; w++) begin
        logic [DATA_W-1:0] word = '0;
        for (int b = 0; b < BPW; b++) begin
          int p = w * BPW + b;
          word[8*b +: 8] = (p < n) ? msgs[m][p] : 8'($urandom);
        end
        if (!timed) repeat ($urandom_range(0, 1)) @(negedge clk);
        @(negedge clk);
        in_valid = 1;
        in_data  = word;
        in_last  = (w == nw - 1);
        in_bytes = (w == nw - 1) ? 4'(n - w * BPW) : 4'(BPW);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (w == nw - 1) last_accept.push_back(timed ? cycle : -1);
        @(negedge clk);
        in_valid = 0;
      end
    end
  endtask

  task automatic receive();
    foreach (msgs[m]) begin
      flat_t  e = ref_sponge(msgs[m], RATE, PAD);
      int     nblk = ref_num_blocks(msgs[m].size(), RATE);
      longint t0;
      int     p0 = perm_cycles;
      @(negedge clk);
      while (!hash_valid) @(negedge clk);
      t0 = last_accept.pop_front();
      if (t0 >= 0) begin
        checks++;
        n_latency++;
        if (cycle - t0 != 25) begin
          failures++;
          $display("FAIL message %0d: digest after %0d cycles, expected 25", m, cycle - t0);
        end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++;
      if (hash !== e[OUT_W-1:0]) begin
        failures++;
        $display("FAIL message %0d (len %0d): digest mismatch", m, msgs[m].size());
      end
      checks++;
      if (perm_cycles - p0 != 23 * nblk) begin
        failures++;
        $display("FAIL message %0d: %0d permutation cycles, expected %0d", m, perm_cycles - p0, 23 * nblk);
      end
      if (nblk > 1) n_multiblock++;
      if (msgs[m].size() != 0 && msgs[m].size() % (RATE / 8) == 0) n_padonly++;
      if (msgs[m].size() == 0) n_empty++;
      hash_ready = 1;
      @(negedge clk);
      hash_ready = 0;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
    $display("  %-32s %0d", what, n);
  endtask

  int lens[$] = '{0, 3, 8, 100, 127, 128, 129, 200, 255, 256, 300, 5, 64};

  initial begin
    foreach (lens[i]) msgs.push_back(make_msg(lens[i]));
    for (int i = 0; i < 8; i++) msgs.push_back(make_msg($urandom_range(0, 400)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      drive();
      // digests are compared in a separate, ordered consumer
      receive();
    join
    $display("mechanisms:");
    need("multi-block messages", n_multiblock);
    need("padding-only blocks", n_padonly);
    need("empty messages", n_empty);
    need("words taken during a permutation", n_overlap);
    need("input stall cycles", n_in_stall);
    need("digest back-pressure cycles", n_hash_stall);
    need("latency checks", n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
