// keccak_round: one complete Keccak-f[1600] round, iota(chi(pi(rho(theta)))),
// as combinational logic: the round function of the basic structure, which
// computes one round per clock cycle.
module keccak_round
  import sha3_pkg::*;
(
  input  state_t din,
  input  lane_t  rc,
  output state_t dout
);
  state_t t;
  keccak_theta u_theta (.din (din), .dout (t));
  keccak_rpci  u_rpci  (.din (t), .rc (rc), .dout (dout));
endmodule
