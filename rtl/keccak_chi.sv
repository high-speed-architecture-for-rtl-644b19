// keccak_chi - the chi step of Keccak-f[1600] (purely combinational).
//
// The only non-linear step: along each row, A[x,y] = B[x,y] ^ (~B[x+1,y] &
// B[x+2,y]), indices mod 5. Per bit this is one inverter, one AND and one XOR.
//
// Interface: state_i (B) -> state_o (A), both [y][x] lane arrays.
module keccak_chi
  import keccak_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        state_o[y][x] = state_i[y][x] ^ (~state_i[y][(x + 1) % 5] & state_i[y][(x + 2) % 5]);
  end

endmodule
