// keccak_rc_rom: the 24 iota round constants of Keccak-f[1600], stored as a
// hard-coded table and selected by the round counter (a multiplexer rather
// than an on-the-fly LFSR). Combinational; out-of-range indices give 0.
module keccak_rc_rom
  import sha3_pkg::*;
(
  input  logic [4:0] rnd,
  output lane_t      rc
);
  always_comb rc = round_const(rnd);
endmodule
