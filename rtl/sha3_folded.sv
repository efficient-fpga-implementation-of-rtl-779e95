// sha3_folded: complete folded SHA-3 structure (SHA3-512 by default) with
// a folding factor of 4: 16 slices of the 1600-bit state are processed per
// clock cycle, a round takes 4 cycles and a message block 96 cycles.
//
// Datapath of one cycle (fold f of a pass):
//   state memory (rho by addressing) -> RF2 (pi, chi, iota)
//   -> mux: RF2 output, message block, or their XOR
//   -> RF1 (theta, with the parities of the slice below) -> state memory
// The parities of the slice below fold f's slice 0 come from a register
// holding the top slice of fold f-1, or, for fold 0, from the F0S0
// pre-processing unit, which has gathered slice 63 of this pass's input
// during the previous pass. The digest (8 lanes) is taken from RF2's
// output during the final pass of a message and held in a register.
//
// Interface: see sha3_io_buffer for the host input (16-bit words, padded
// blocks, in_last on the last block of a message). digest_valid pulses for
// one cycle when digest holds a new result (lane i in bits 64i+63:64i,
// message byte order as in FIPS 202); digest stays stable until the next
// message's final pass, at least 96 cycles later. There is no back-pressure
// on the digest.
//
// The wrapper's input buffer, the state memories and the round constant
// table follow the structure described for this design; the companion
// RAMs for the bits that rho moves across a fold boundary, the 16-bit host
// interface and the digest register are choices of this implementation.
module sha3_folded
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES   = RATE_LANES_512,
  parameter int unsigned DIGEST_LANES = DIGEST_LANES_512
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [FW-1:0]                     in_data,
  input  logic                              in_last,
  output logic                              digest_valid,
  output logic [DIGEST_LANES*LANE_W-1:0]    digest,
  output logic                              busy
);

  // control
  logic       act, rd_inst, wr_inst, we, use_rf2, use_blk, do_digest;
  logic       buf_release, digest_done;
  logic [1:0] fold;
  logic [4:0] rc_idx;

  // buffer
  logic                          blk_avail, blk_last;
  logic [RATE_LANES-1:0]         blk_s63;
  logic [RATE_LANES-1:0][FW-1:0] blk_data;

  // datapath
  fold_t   st_rd, rf2_out, blk_ext, rf1_in, theta;
  lane_t   rc;
  colpar_t pre_par, prev_par, top_par, par_q;

  sha3_io_buffer #(.RATE_LANES(RATE_LANES)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .blk_avail, .blk_last, .blk_s63,
    .rd_en       (use_blk),
    .rd_fold     (fold),
    .rd_data     (blk_data),
    .release_blk (buf_release)
  );

  sha3_folded_ctrl u_ctrl (
    .clk, .rst_n, .blk_avail, .blk_last,
    .act, .fold, .rd_inst, .wr_inst, .we, .use_rf2, .use_blk, .do_digest,
    .rc_idx, .buf_release, .digest_done, .busy
  );

  sha3_folded_state u_state (
    .clk,
    .we, .wr_inst, .wr_fold (fold), .wdata (theta),
    .rd_inst, .rd_fold (fold), .rdata (st_rd)
  );

  keccak_rc_rom u_rc (.rnd (rc_idx), .rc);

  keccak_rf2_pci #(.NS(FW)) u_rf2 (
    .din  (st_rd),
    .rc   (rc[16*fold +: 16]),
    .dout (rf2_out)
  );

  always_comb begin
    blk_ext = '0;
    for (int k = 0; k < int'(RATE_LANES); k++) blk_ext[k] = blk_data[k];
    rf1_in = (use_rf2 ? rf2_out : '0) ^ (use_blk ? blk_ext : '0);
  end

  sha3_f0s0_pre #(.RATE_LANES(RATE_LANES)) u_pre (
    .clk,
    .cap_en  (we),
    .fold,
    .theta,
    .use_rf2,
    .rc63    (rc[LANE_W-1]),
    .use_blk,
    .blk_s63,
    .par_out (pre_par)
  );

  assign prev_par = (fold == 2'd0) ? pre_par : par_q;

  keccak_rf1_theta #(.NS(FW)) u_rf1 (
    .din      (rf1_in),
    .prev_par,
    .dout     (theta),
    .top_par
  );

  always_ff @(posedge clk)
    if (act) par_q <= top_par;

  // digest: lanes 0..DIGEST_LANES-1 of the final state, one fold per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      digest       <= '0;
      digest_valid <= 1'b0;
    end else begin
      digest_valid <= digest_done;
      if (do_digest)
        for (int k = 0; k < int'(DIGEST_LANES); k++)
          digest[k*LANE_W + 16*fold +: 16] <= rf2_out[k];
    end
  end

endmodule
