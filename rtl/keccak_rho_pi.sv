// keccak_rho_pi - the rho and pi steps of Keccak-f[1600], merged
// (purely combinational, wiring only).
//
// Rho rotates lane A[x,y] by the constant offset r[x,y] towards higher bit
// index; pi moves the rotated lane to position B[y, 2x+3y] (indices mod 5).
// Both are fixed permutations of the 1600 wires, so the module contains no
// gates at all.
//
// Interface: state_i (A) -> state_o (B), both [y][x] lane arrays.
module keccak_rho_pi
  import keccak_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        // B[X=y, Y=2x+3y] = ROT(A[x,y], r[x,y])
        state_o[(2 * x + 3 * y) % 5][y] = rotl(state_i[y][x], RHO_OFFSET[y][x]);
  end

endmodule
