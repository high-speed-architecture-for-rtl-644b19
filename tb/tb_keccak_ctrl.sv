// tb_keccak_ctrl - self-checking testbench of keccak_ctrl.
//
// Offers blocks (some final, some not) and follows the controller cycle by
// cycle: the block must be taken at once with absorb and round 0, rounds
// 1..23 must follow on consecutive cycles with load asserted, a non-final
// block must return to idle after exactly 24 cycles, and a final block must
// raise hash_valid, hold it while hash_ready is low and clear the state on
// the handshake.
module tb_keccak_ctrl;
  import keccak_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       blk_valid = 0, blk_final = 0, blk_take, absorb, load, init, capture;
  logic       hash_valid, hash_ready = 0, busy;
  round_idx_t round;
  int         checks = 0, failures = 0;
  int         stalls = 0;

  keccak_ctrl dut (.clk, .rst_n, .blk_valid_i(blk_valid), .blk_final_i(blk_final),
                   .blk_take_o(blk_take), .round_o(round), .absorb_o(absorb),
                   .load_o(load), .init_o(init), .squeeze_capture_o(capture), .hash_valid_o(hash_valid),
                   .hash_ready_i(hash_ready), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // with one output block there is never an extra squeeze permutation
  always @(posedge clk)
    if (rst_n && capture) begin
      failures++;
      $display("FAIL squeeze capture with a single output block");
    end

  task automatic expect_sig(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d at %0t", what, got, want, $time);
    end
  endtask

  task automatic one_block(bit fin);
    int cycles;
    @(negedge clk);
    expect_sig("idle busy", busy, 1'b0);
    expect_sig("idle take", blk_take, 1'b0);
    blk_valid = 1;
    blk_final = fin;
    #1;
    expect_sig("take", blk_take, 1'b1);
    expect_sig("absorb", absorb, 1'b1);
    expect_sig("load r0", load, 1'b1);
    checks++;
    if (round !== 0) begin failures++; $display("FAIL round 0"); end
    cycles = 1;
    @(negedge clk);
    blk_valid = 0;
    for (int r = 1; r < NUM_ROUNDS; r++) begin
      expect_sig("load", load, 1'b1);
      expect_sig("absorb off", absorb, 1'b0);
      expect_sig("no take", blk_take, 1'b0);
      checks++;
      if (round !== round_idx_t'(r)) begin failures++; $display("FAIL round %0d got %0d", r, round); end
      cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != 24) begin failures++; $display("FAIL permutation took %0d cycles", cycles); end
    expect_sig("load after", load, 1'b0);
    expect_sig("hash_valid", hash_valid, fin);
    if (fin) begin
      int wait_c = $urandom_range(0, 5);
      repeat (wait_c) begin
        expect_sig("hold", hash_valid, 1'b1);
        expect_sig("no init", init, 1'b0);
        stalls++;
        @(negedge clk);
      end
      hash_ready = 1;
      #1;
      expect_sig("init", init, 1'b1);
      @(negedge clk);
      hash_ready = 0;
      expect_sig("hash_valid off", hash_valid, 1'b0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) one_block($urandom_range(0, 2) == 0 || i == 3);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL hash stall never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
