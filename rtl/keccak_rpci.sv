// keccak_rpci: rho, pi, chi and iota on the whole 1600-bit state, the
// second half of the round function of the unfolded structures. Rho
// rotates each lane by its fixed offset, pi moves lane (x,y) to
// (y, 2x+3y), chi combines the five lanes of a plane row-wise, iota XORs
// the round constant rc into lane (0,0). Purely combinational.
module keccak_rpci
  import sha3_pkg::*;
(
  input  state_t din,
  input  lane_t  rc,
  output state_t dout
);
  state_t b;

  always_comb begin
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) begin
        lane_t v;
        int unsigned r;
        v = din[x + 5*y];
        r = rho_off(x + 5*y);
        b[y + 5*((2*x + 3*y) % 5)] = (r == 0) ? v : ((v << r) | (v >> (LANE_W - r)));
      end
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        dout[x + 5*y] = b[x + 5*y] ^ (~b[((x + 1) % 5) + 5*y] & b[((x + 2) % 5) + 5*y]);
    dout[0] = dout[0] ^ rc;
  end
endmodule
