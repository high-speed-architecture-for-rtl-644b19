// keccak_round_constant - round constant ROM of Keccak-f[1600].
//
// Maps the round index 0..23 to the 64-bit constant that the iota step XORs
// into lane A[0,0]. It is a 24-entry table (a small combinational ROM); an
// index outside 0..23 returns zero.
//
// Interface: round_i (5 bits) -> rc_o (64 bits), combinational.
module keccak_round_constant
  import keccak_pkg::*;
(
  input  round_idx_t round_i,
  output lane_t      rc_o
);

  always_comb begin
    if (round_i < round_idx_t'(NUM_ROUNDS))
      rc_o = RC_TABLE[round_i];
    else
      rc_o = '0;
  end

endmodule
