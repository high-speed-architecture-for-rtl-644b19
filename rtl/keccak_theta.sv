// keccak_theta - the theta step of Keccak-f[1600] (purely combinational).
//
// Each column x is folded to one parity lane C[x] = A[x,0]^A[x,1]^...^A[x,4].
// The correction lane is D[x] = C[x-1] ^ ROT(C[x+1],1), indices mod 5, and
// every lane of column x is XORed with D[x]. In hardware this is a 5-input XOR
// tree per column, a fixed one-position rotation (wiring only) and one more
// 2-input and 2-input XOR level per bit: three XOR levels in total.
//
// Interface: state_i (1600 bits, [y][x] lanes) -> state_o. No clock; the step
// is one stage of the single-cycle round datapath.
module keccak_theta
  import keccak_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  lane_t c [5];
  lane_t d [5];

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = state_i[0][x] ^ state_i[1][x] ^ state_i[2][x] ^ state_i[3][x] ^ state_i[4][x];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        state_o[y][x] = state_i[y][x] ^ d[x];
  end

endmodule
