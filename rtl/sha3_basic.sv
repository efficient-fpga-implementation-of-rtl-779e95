// sha3_basic: the basic (unfolded) SHA-3 structure, SHA3-512 by default.
// One complete Keccak-f round is computed per clock cycle, so a message
// block takes 24 cycles.
//
// The 1600-bit state register feeds the round function. A multiplexer
// driven by the round counter chooses the round function's input: the
// state (rounds 1-23), or, in the cycle that absorbs a block (round 0),
// the block from the input buffer, XORed with the state when the block
// continues a message. A new block can start in the cycle after round 23,
// so blocks follow each other without gaps. After round 23 of a message's
// last block the first DIGEST_LANES lanes of the round output are copied
// into the digest register (the output IO-buffer), so the digest can be
// read while the next message is already being processed.
//
// Interface: host lanes through sha3_lane_fifo (64-bit words, lane 0
// first, in_last with the final lane of a message's last block, padding
// done by the host). digest_valid pulses for one cycle with a new digest
// (lane i in bits 64i+63:64i); digest then stays stable until the next
// digest_valid, at least 24 cycles later.
module sha3_basic
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES   = RATE_LANES_512,
  parameter int unsigned DIGEST_LANES = DIGEST_LANES_512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  lane_t                          in_data,
  input  logic                           in_last,
  output logic                           digest_valid,
  output logic [DIGEST_LANES*LANE_W-1:0] digest,
  output logic                           busy
);

  logic                        blk_avail, blk_last, pop;
  logic [RATE_LANES-1:0][63:0] blk;
  state_t                      s, blk_ext, rin, rout;
  lane_t                       rc;
  logic [4:0]                  rnd;       // round computed this cycle while running
  logic                        running;   // rounds 1..23 of a block in progress
  logic                        pend;      // s holds a finished block of an unfinished message
  logic                        cur_last;  // the block in progress is its message's last
  logic                        start;

  sha3_lane_fifo #(.RATE_LANES(RATE_LANES)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
    .blk_avail, .blk_last, .blk, .pop
  );

  assign start = !running && blk_avail;
  assign pop   = start;

  always_comb begin
    blk_ext = '0;
    for (int k = 0; k < int'(RATE_LANES); k++) blk_ext[k] = blk[k];
    rin = running ? s : (pend ? (s ^ blk_ext) : blk_ext);
  end

  keccak_rc_rom u_rc (.rnd (running ? rnd : 5'd0), .rc);
  keccak_round  u_round (.din (rin), .rc, .dout (rout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd          <= '0;
      running      <= 1'b0;
      pend         <= 1'b0;
      cur_last     <= 1'b0;
      digest_valid <= 1'b0;
      digest       <= '0;
    end else begin
      digest_valid <= 1'b0;
      if (running) begin
        rnd <= rnd + 5'd1;
        if (rnd == 5'd23) begin
          running <= 1'b0;
          pend    <= !cur_last;
          if (cur_last) begin
            digest_valid <= 1'b1;
            for (int k = 0; k < int'(DIGEST_LANES); k++) digest[k*LANE_W +: LANE_W] <= rout[k];
          end
        end
      end else if (start) begin
        rnd      <= 5'd1;
        running  <= 1'b1;
        cur_last <= blk_last;
      end
    end
  end

  always_ff @(posedge clk)
    if (running || start) s <= rout;

  assign busy = running || pend;

endmodule
