// sha3_pipelined: the pipelined (unfolded) SHA-3 structure, SHA3-512 by
// default. It is the basic structure with a pipeline register between
// theta and the rest of the round (rho, pi, chi, iota), and it keeps two
// independent messages in flight, one in each pipeline stage. Every cycle
// the two messages swap stages, so each advances one round per two cycles:
// a block takes 48 cycles, but two blocks finish per 48 cycles, i.e. one
// block per 24 cycles overall.
//
// The two messages come from two input channels (in_ch selects which one
// the host is loading); sha3_pipe_buffer holds one block per channel in
// the depth of its lane RAMs, and is read at the channel in stage 1. The stage-1 slot of
// a channel absorbs a block (round 0) by feeding theta with the block, or
// with the block XORed with the state when it continues a message. If a
// continuing block is not yet there, the channel's state is carried
// through both stages unchanged until it arrives. After round 23 of a
// message's last block, its digest is copied to the digest register and
// digest_ch says which channel it belongs to.
//
// Interface: 64-bit lanes as for sha3_basic, per channel; in_ready refers
// to the channel selected by in_ch. digest_valid pulses for one cycle.
module sha3_pipelined
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES   = RATE_LANES_512,
  parameter int unsigned DIGEST_LANES = DIGEST_LANES_512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_ch,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  lane_t                          in_data,
  input  logic                           in_last,
  output logic                           digest_valid,
  output logic                           digest_ch,
  output logic [DIGEST_LANES*LANE_W-1:0] digest,
  output logic                           busy
);

  logic                        t;         // channel in stage 1 this cycle

  // input buffer: one block per channel, in the depth of the lane RAMs
  logic [1:0]                  f_avail, f_last, f_pop;
  logic [RATE_LANES-1:0][63:0] f_blk;     // block of the channel in stage 1

  sha3_pipe_buffer #(.RATE_LANES(RATE_LANES)) u_buf (
    .clk, .rst_n, .in_ch, .in_valid, .in_ready, .in_data, .in_last,
    .avail    (f_avail),
    .blk_last (f_last),
    .rd_ch    (t),
    .blk      (f_blk),
    .pop      (f_pop)
  );

  // per-channel message status (updated in the channel's stage-1 slot)
  logic [1:0]      act;            // a message is in progress
  logic [1:0]      last;           // its current block is the last
  logic [1:0][4:0] rnd;            // next round (1..23), 24 = block done, waiting

  // pipeline
  state_t s, p, th_in, th_out, r_out, blk_ext;
  logic   p_valid, p_pass, p_final, p_ch;
  logic [4:0] p_rnd;
  lane_t  rc;

  // stage-1 decision for channel t
  logic   s1_run, s1_absorb, s1_new, s1_hold;
  always_comb begin
    s1_run    = act[t] && rnd[t] != 5'd24;
    s1_absorb = act[t] && rnd[t] == 5'd24 && f_avail[t];
    s1_hold   = act[t] && rnd[t] == 5'd24 && !f_avail[t];
    s1_new    = !act[t] && f_avail[t];
    blk_ext = '0;
    for (int k = 0; k < int'(RATE_LANES); k++) blk_ext[k] = f_blk[k];
    th_in = s1_new ? blk_ext : (s1_absorb ? (s ^ blk_ext) : s);
    f_pop = '0;
    f_pop[t] = s1_absorb || s1_new;
  end

  keccak_theta  u_theta (.din (th_in), .dout (th_out));
  keccak_rc_rom u_rc    (.rnd (p_rnd), .rc);
  keccak_rpci   u_rpci  (.din (p), .rc, .dout (r_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t            <= 1'b0;
      act          <= '0;
      last         <= '0;
      rnd          <= '0;
      p_valid      <= 1'b0;
      p_pass       <= 1'b0;
      p_final      <= 1'b0;
      p_ch         <= 1'b0;
      p_rnd        <= '0;
      digest_valid <= 1'b0;
      digest_ch    <= 1'b0;
      digest       <= '0;
    end else begin
      t <= ~t;
      // stage 1 bookkeeping
      p_valid <= s1_run || s1_absorb || s1_new;
      p_pass  <= s1_hold;
      p_ch    <= t;
      p_final <= 1'b0;
      if (s1_absorb || s1_new) begin
        act[t]  <= 1'b1;
        last[t] <= f_last[t];
        rnd[t]  <= 5'd1;
        p_rnd   <= 5'd0;
      end else if (s1_run) begin
        p_rnd  <= rnd[t];
        rnd[t] <= rnd[t] + 5'd1;
        if (rnd[t] == 5'd23) begin
          p_final <= last[t];
          if (last[t]) act[t] <= 1'b0;
        end
      end
      // stage 2: digest
      digest_valid <= p_valid && p_final;
      if (p_valid && p_final) begin
        digest_ch <= p_ch;
        for (int k = 0; k < int'(DIGEST_LANES); k++) digest[k*LANE_W +: LANE_W] <= r_out[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    p <= s1_hold ? s : th_out;
    s <= p_pass ? p : r_out;
  end

  assign busy = |act || p_valid;

endmodule
