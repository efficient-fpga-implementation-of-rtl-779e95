// keccak_theta: the theta step-mapping on the whole 1600-bit state.
// Every bit is XORed with the parity of the column to its left (same
// slice) and of the column to its right in the slice below (z-1).
// Purely combinational. First half of the round function of the unfolded
// structures; the pipelined structure puts its pipeline register after it.
module keccak_theta
  import sha3_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  lane_t [4:0] c;

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = din[x] ^ din[x+5] ^ din[x+10] ^ din[x+15] ^ din[x+20];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        dout[x + 5*y] = din[x + 5*y] ^ c[(x + 4) % 5]
                      ^ {c[(x + 1) % 5][LANE_W-2:0], c[(x + 1) % 5][LANE_W-1]};
  end
endmodule
