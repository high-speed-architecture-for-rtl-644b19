// tb_keccak_round - self-checking testbench of keccak_round.
//
// Random states and round indices are compared with the reference round of
// keccak_ref_pkg. Then the round is iterated 24 times on the all-zero state
// and the first two lanes are compared with the published Keccak-f[1600]
// result F1258F7940E1DDE7, 84D5CCF933C0478A.
module tb_keccak_round;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  state_t din, dout;
  lane_t  rc;
  flat_t  a, s;
  int     checks = 0, failures = 0;

  keccak_round dut (.state_i(din), .rc_i(rc), .state_o(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 48; n++) begin
      for (int w = 0; w < 50; w++) a[32*w +: 32] = $urandom;
      din = a;
      rc  = ref_rc(n % 24);
      #1;
      checks++;
      if (flat_t'(dout) !== ref_round(a, n % 24)) begin
        failures++;
        $display("FAIL round %0d", n % 24);
      end
    end
    s = '0;
    for (int ir = 0; ir < 24; ir++) begin
      din = s;
      rc  = ref_rc(ir);
      #1;
      s = dout;
    end
    checks++;
    if (s[63:0] !== 64'hF1258F7940E1DDE7 || s[127:64] !== 64'h84D5CCF933C0478A) begin
      failures++;
      $display("FAIL permutation of zero state: %h %h", s[63:0], s[127:64]);
    end
    checks++;
    if (s !== ref_permute('0)) begin
      failures++;
      $display("FAIL permutation of zero state differs from reference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
