// tb_keccak_round_constant - self-checking testbench of keccak_round_constant.
//
// Every round index 0..23 is compared with the constant produced by the
// Keccak LFSR in keccak_ref_pkg; indices 24..31 must give zero.
module tb_keccak_round_constant;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  round_idx_t idx;
  lane_t      rc;
  int         checks = 0, failures = 0;

  keccak_round_constant dut (.round_i(idx), .rc_o(rc));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      word64_t exp_rc;
      idx = round_idx_t'(i);
      #1;
      exp_rc = (i < 24) ? ref_rc(i) : '0;
      checks++;
      if (rc !== exp_rc) begin
        failures++;
        $display("FAIL RC[%0d] = %h, expected %h", i, rc, exp_rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
