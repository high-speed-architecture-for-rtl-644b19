// tb_keccak_state - self-checking testbench of keccak_state.
//
// Checks reset to zero, load, hold when neither load nor init is asserted,
// synchronous clear, and that clear wins over load.
module tb_keccak_state;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic   clk = 0, rst_n = 0, init = 0, load = 0;
  state_t d, q;
  flat_t  v, model;
  int     checks = 0, failures = 0;

  keccak_state dut (.clk, .rst_n, .init_i(init), .load_i(load), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 200; n++) begin
      for (int w = 0; w < 50; w++) v[32*w +: 32] = $urandom;
      @(negedge clk);
      d    = v;
      load = $urandom_range(0, 1);
      init = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (init)      model = '0;
      else if (load) model = v;
      #1;
      checks++;
      if (flat_t'(q) !== model) begin
        failures++;
        $display("FAIL cycle %0d load=%0d init=%0d", n, load, init);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
