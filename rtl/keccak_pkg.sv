// keccak_pkg - shared types and constants of the Keccak-f[1600] hash core.
//
// The 1600-bit state is a 5x5 array of 64-bit lanes. A state is stored as a
// packed array indexed [y][x], so lane (x,y) sits at bits 64*(5*y+x) +: 64 of
// the flat vector; the first R bits of the state (the rate part that the
// sponge XORs message blocks into) are therefore lanes 0,1,2,... in the usual
// Keccak lane order. Bit z of a lane is bit z of the 64-bit word.
//
// The round constants and the rotation offsets are the standard Keccak values
// (24 rounds, lane width 64). The rotation offsets are held per (x,y) as in the
// offset table of the design; rotations are towards higher bit index ("ROT"
// of the round equations).
package keccak_pkg;

  localparam int unsigned LANE_W    = 64;   // w: lane width in bits
  localparam int unsigned STATE_W   = 1600; // b = 25*w
  localparam int unsigned NUM_ROUNDS = 24;  // rounds of Keccak-f[1600]

  typedef logic [LANE_W-1:0]  lane_t;
  typedef lane_t [4:0]        plane_t;   // five lanes of one y, indexed [x]
  typedef plane_t [4:0]       state_t;   // full state, indexed [y][x]
  typedef logic [4:0]         round_idx_t;

  // Round constants RC[0..23].
  localparam lane_t RC_TABLE [NUM_ROUNDS] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // Rotation offsets r[x,y], indexed [y][x].
  localparam int unsigned RHO_OFFSET [5][5] = '{
    '{ 0,  1, 62, 28, 27},   // y = 0 : x = 0..4
    '{36, 44,  6, 55, 20},   // y = 1
    '{ 3, 10, 43, 25, 39},   // y = 2
    '{41, 45, 15, 21,  8},   // y = 3
    '{18,  2, 61, 56, 14}    // y = 4
  };

  // Left rotation of a lane by a constant number of bit positions.
  function automatic lane_t rotl(input lane_t v, input int unsigned n);
    lane_t r;
    for (int unsigned z = 0; z < LANE_W; z++)
      r[(z + n) % LANE_W] = v[z];
    return r;
  endfunction

endpackage
