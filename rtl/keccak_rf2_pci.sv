// keccak_rf2_pci: RF2 of the folded structure, the pi, chi and iota
// step-mappings applied to NS consecutive slices (one fold).
//
// After the round is rescheduled so that rho happens in the state memory,
// pi, chi and iota all act inside a single slice: pi moves bits between
// lanes, chi combines the five bits of a row, iota flips the bit of lane
// (0,0) where the round constant has a one. So the fold is just NS copies
// of the same 25-bit slice function. Purely combinational.
//
//   din/dout  [l][i]  lane l = x+5y, slice i of the fold
//   rc        the round-constant bits of the fold's slices
module keccak_rf2_pci
  import sha3_pkg::*;
#(
  parameter int unsigned NS = FW
) (
  input  logic [LANES-1:0][NS-1:0] din,
  input  logic [NS-1:0]            rc,
  output logic [LANES-1:0][NS-1:0] dout
);

  always_comb begin
    logic [LANES-1:0] s, o;
    for (int i = 0; i < int'(NS); i++) begin
      for (int l = 0; l < int'(LANES); l++) s[l] = din[l][i];
      o = slice_pci(s, rc[i]);
      for (int l = 0; l < int'(LANES); l++) dout[l][i] = o[l];
    end
  end

endmodule
