// keccak_iota - the iota step of Keccak-f[1600] (purely combinational).
//
// The round constant of the current round is XORed into lane A[0,0]; the
// other 24 lanes pass unchanged. The constant comes from keccak_round_constant.
//
// Interface: state_i, rc_i (64 bits) -> state_o.
module keccak_iota
  import keccak_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  always_comb begin
    state_o       = state_i;
    state_o[0][0] = state_i[0][0] ^ rc_i;
  end

endmodule
