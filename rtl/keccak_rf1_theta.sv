// keccak_rf1_theta: RF1 of the folded structure, the theta step-mapping
// applied to NS consecutive slices (one fold, NS = 16 for a folding factor
// of 4).
//
// Theta adds to every bit the parity of the column to its left in the same
// slice and the parity of the column to its right in the slice below
// (z-1). Inside the fold all of that is local; the slice below slice 0 lies
// in another fold, so its five column parities come in on prev_par. The
// parities of the fold's top slice leave on top_par so that the caller can
// hold them in a register for the next fold. Purely combinational.
//
//   din/dout  [l][i]  lane l = x+5y, slice i of the fold
//   prev_par  column parities of the slice below slice 0
//   top_par   column parities of din slice NS-1
module keccak_rf1_theta
  import sha3_pkg::*;
#(
  parameter int unsigned NS = FW
) (
  input  logic [LANES-1:0][NS-1:0] din,
  input  colpar_t                  prev_par,
  output logic [LANES-1:0][NS-1:0] dout,
  output colpar_t                  top_par
);

  logic [4:0][NS-1:0] c;   // c[x][i]: parity of column x in slice i

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = din[x] ^ din[x+5] ^ din[x+10] ^ din[x+15] ^ din[x+20];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int i = 0; i < int'(NS); i++)
          dout[x + 5*y][i] = din[x + 5*y][i] ^ c[(x + 4) % 5][i]
                           ^ ((i == 0) ? prev_par[(x + 1) % 5] : c[(x + 1) % 5][(i + NS - 1) % NS]);
    for (int x = 0; x < 5; x++)
      top_par[x] = c[x][NS-1];
  end

endmodule
