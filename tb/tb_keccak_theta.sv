// tb_keccak_theta - self-checking testbench of keccak_theta.
//
// Applies directed and random 1600-bit states and compares the output with
// the bit-level reference model of keccak_ref_pkg.
module tb_keccak_theta;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  state_t  din, dout;
  flat_t   a, expected;
  lane_t   rc;
  int      checks = 0, failures = 0;
  keccak_theta dut (.state_i(din), .state_o(dout));
  task automatic check_one(flat_t v, lane_t k);
    din = v;
    a   = v;
    rc  = k;
    #1;
    expected = ref_theta(a);
    checks++;
    if (flat_t'(dout) !== expected) begin
      failures++;
      $display("FAIL keccak_theta: input %h", v[63:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0);
    check_one('1, 64'h1);
    check_one({1600{1'b1}}, 64'h8000000080008008);
    for (int i = 0; i < 25*64; i += 97) check_one(flat_t'(1) << i, 64'h1 << (i % 64));
    for (int n = 0; n < 40; n++) begin
      for (int w = 0; w < 50; w++) a[32*w +: 32] = $urandom;
      check_one(a, {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
