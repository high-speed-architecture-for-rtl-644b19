// keccak_round - one complete round of Keccak-f[1600] (combinational).
//
// The round is the chain theta -> rho/pi -> chi -> iota applied to a 1600-bit
// state, with the round constant of the current round fed to iota. The core
// instantiates one such round and feeds its output back to the state register,
// so the 24-round permutation takes 24 clock cycles.
//
// Interface: state_i, rc_i -> state_o. Critical path: theta (3 XOR levels),
// chi (NOT/AND/XOR), iota (one XOR on lane 0); rho/pi is wiring.
module keccak_round
  import keccak_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  state_t after_theta;
  state_t after_rho_pi;
  state_t after_chi;

  keccak_theta  u_theta  (.state_i(state_i),      .state_o(after_theta));
  keccak_rho_pi u_rho_pi (.state_i(after_theta),  .state_o(after_rho_pi));
  keccak_chi    u_chi    (.state_i(after_rho_pi), .state_o(after_chi));
  keccak_iota   u_iota   (.state_i(after_chi), .rc_i(rc_i), .state_o(state_o));

endmodule
