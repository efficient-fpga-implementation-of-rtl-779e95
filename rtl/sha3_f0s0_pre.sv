// sha3_f0s0_pre: "F0S0 pre-processing" of the folded structure.
//
// Theta of slice 0 in fold 0 needs the column parities of slice 63, the
// top slice of fold 3, which the normal fold-to-fold parity register only
// delivers at the end of a pass. Instead, while a pass writes the new state,
// this unit picks out the 25 bits that rho will move into slice 63 (lane l
// contributes its pre-rho bit (63 - r_l) mod 64, taken in the cycle in
// which that bit's fold is written). At the start of the next pass the
// register therefore holds slice 63 exactly as the state memory will return
// it; pushing it through the slice function of RF2 (pi, chi, iota with the
// round constant's bit 63) gives the slice 63 that RF1 will see, and its
// column parities go to theta of fold 0.
//
// When a message block enters, the block's own slice-63 bits (captured by
// the input buffer as the block was loaded) are added, since theta is
// linear: par = par(RF2 slice) ^ par(block slice).
//
// Timing: cap_en/fold/theta are sampled on the rising clock edge; par_out
// is combinational from the register and the select inputs.
module sha3_f0s0_pre
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES = RATE_LANES_512
) (
  input  logic                  clk,
  input  logic                  cap_en,     // a pass writes fold `fold` this cycle
  input  logic [1:0]            fold,
  input  fold_t                 theta,      // RF1 output being written
  input  logic                  use_rf2,    // next RF1 input includes RF2 output
  input  logic                  rc63,       // bit 63 of that RF2's round constant
  input  logic                  use_blk,    // next RF1 input includes a message block
  input  logic [RATE_LANES-1:0] blk_s63,    // slice 63 of that block
  output colpar_t               par_out
);

  logic [LANES-1:0] cap;

  for (genvar l = 0; l < int'(LANES); l++) begin : g_cap
    localparam int unsigned Z = (LANE_W - 1 + LANE_W - rho_off(l)) % LANE_W;
    always_ff @(posedge clk)
      if (cap_en && fold == 2'(Z / FW)) cap[l] <= theta[l][Z % FW];
  end

  always_comb begin
    colpar_t p_rf2, p_blk;
    p_rf2 = slice_par(slice_pci(cap, rc63));
    p_blk = slice_par(LANES'(blk_s63));
    par_out = (use_rf2 ? p_rf2 : 5'd0) ^ (use_blk ? p_blk : 5'd0);
  end

endmodule
