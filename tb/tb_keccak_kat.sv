// tb_keccak_kat - known-answer tests of keccak_top in several configurations.
//
// Published digests of the empty message and of "abc" are checked for
// Keccak-256 (rate 1088, Keccak padding), SHA3-256 (rate 1088, FIPS 202
// padding) and SHA3-512 (rate 576, FIPS 202 padding). The default rate of
// 1024 with 256-bit input words is checked against the reference sponge,
// since that configuration has no published test vectors. A 1536-bit output
// at rate 576 (three output blocks, two extra squeeze permutations) is
// checked against the reference squeeze, its first 512 bits against the
// published SHA3-512 digest, and its latency (two more 24-cycle permutations than a
// one-block output).
module tb_keccak_kat;
  import keccak_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_kat_runner #(.RATE(1088), .OUT_W(256), .DATA_W(64),  .PAD_BYTE(8'h01)) k256 (.clk, .rst_n);
  keccak_kat_runner #(.RATE(1088), .OUT_W(256), .DATA_W(64),  .PAD_BYTE(8'h06)) s256 (.clk, .rst_n);
  keccak_kat_runner #(.RATE(576),  .OUT_W(512), .DATA_W(64),  .PAD_BYTE(8'h06)) s512 (.clk, .rst_n);
  keccak_kat_runner #(.RATE(1024), .OUT_W(512), .DATA_W(256), .PAD_BYTE(8'h01)) w256 (.clk, .rst_n);
  keccak_kat_runner #(.RATE(576),  .OUT_W(1536), .DATA_W(64), .PAD_BYTE(8'h06)) sq3  (.clk, .rst_n);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    sq3.hash_msg(empty_msg, d, cyc);
    compare("rate 576, 1536-bit output, '' (first 512 bits = SHA3-512(''))", {1536'b0, d[511:0]},
            from_hex(512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26, 64));
    compare("rate 576, 1536-bit output, ''", d, {512'b0, ref_squeeze(empty_msg, 576, 8'h06, 1536)[1535:0]});
    // two extra output blocks: two more permutations of 24 cycles each
    checks++;
    if (cyc != cyc_one + 2 * 24) begin
      failures++;
      $display("FAIL three-block squeeze took %0d cycles, expected %0d", cyc, cyc_one + 2 * 24);
    end
    sq3.hash_msg(long_msg, d, cyc);
    compare("rate 576, 1536-bit output, 333 bytes", d, {512'b0, ref_squeeze(long_msg, 576, 8'h06, 1536)[1535:0]});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digest written as a hex string (first byte leftmost) -> bit vector with
  // the first byte in bits [7:0]
  function automatic logic [2047:0] from_hex(logic [2047:0] v, int nbytes);
    logic [2047:0] r = '0;
    for (int i = 0; i < nbytes; i++) r[8*i +: 8] = v[8*(nbytes-1-i) +: 8];
    return r;
  endfunction

  task automatic compare(string name, logic [2047:0] got, logic [2047:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s\n  got  %h\n  want %h", name, got, want);
    end
  endtask

  bytes_t empty_msg, abc_msg, long_msg;
  logic [2047:0] d;
  int cyc, cyc_one;

  initial begin
    abc_msg = '{8'h61, 8'h62, 8'h63};
    for (int i = 0; i < 333; i++) long_msg.push_back(byte'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1;

    k256.hash_msg(empty_msg, d, cyc);
    compare("Keccak-256('')", d, from_hex(256'hc5d2460186f7233c927e7db2dcc703c0e500b653ca82273b7bfad8045d85a470, 32));
    k256.hash_msg(abc_msg, d, cyc);
    compare("Keccak-256('abc')", d, from_hex(256'h4e03657aea45a94fc7d47ba826c8d667c0d1e6e33a64a036ec44f58fa12d6c45, 32));

    s256.hash_msg(empty_msg, d, cyc);
    compare("SHA3-256('')", d, from_hex(256'ha7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a, 32));
    s256.hash_msg(abc_msg, d, cyc);
    compare("SHA3-256('abc')", d, from_hex(256'h3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532, 32));

    s512.hash_msg(empty_msg, d, cyc);
    cyc_one = cyc;
    compare("SHA3-512('')", d, from_hex(512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26, 64));
    s512.hash_msg(abc_msg, d, cyc);
    compare("SHA3-512('abc')", d, from_hex(512'hb751850b1a57168a5693cd924b6b096e08f621827444f70d884f5d0240d2712e10e116e9192af3c91a7ec57647e3934057340b4cf408d5a56592f8274eec53f0, 64));

    w256.hash_msg(abc_msg, d, cyc);
    compare("rate 1024, 256-bit words, 'abc'", d, {1536'b0, ref_sponge(abc_msg, 1024, 8'h01)[511:0]});
    w256.hash_msg(long_msg, d, cyc);
    compare("rate 1024, 256-bit words, 333 bytes", d, {1536'b0, ref_sponge(long_msg, 1024, 8'h01)[511:0]});

    sq3.hash_msg(empty_msg, d, cyc);
    compare("rate 576, 1536-bit output, '' (first 512 bits = SHA3-512(''))", {1536'b0, d[511:0]},
            from_hex(512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26, 64));
    compare("rate 576, 1536-bit output, ''", d, {512'b0, ref_squeeze(empty_msg, 576, 8'h06, 1536)[1535:0]});
    // two extra output blocks: two more permutations of 24 cycles each
    checks++;
    if (cyc != cyc_one + 2 * 24) begin
      failures++;
      $display("FAIL three-block squeeze took %0d cycles, expected %0d", cyc, cyc_one + 2 * 24);
    end
    sq3.hash_msg(long_msg, d, cyc);
    compare("rate 576, 1536-bit output, 333 bytes", d, {512'b0, ref_squeeze(long_msg, 576, 8'h06, 1536)[1535:0]});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
