// keccak_state - the 1600-bit sponge state register.
//
// Holds the 5x5 array of 64-bit lanes between rounds. A synchronous clear
// (init_i) zeroes every bit, which is the initialisation phase of the sponge;
// load_i writes the output of the round datapath. Clear wins over load. The
// asynchronous active-low reset also zeroes the state.
//
// Interface: clk, rst_n, init_i, load_i, d_i -> q_o (registered).
module keccak_state
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init_i,
  input  logic   load_i,
  input  state_t d_i,
  output state_t q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q_o <= '0;
    else if (init_i) q_o <= '0;
    else if (load_i) q_o <= d_i;
  end

endmodule
