// sha3_folded_ctrl: control of the folded SHA-3 structure (folding factor 4).
//
// Work is done in passes of four cycles, one per fold (the sub-round
// counter `fold`). In a pass the datapath reads the live state instance,
// runs RF2 (pi, chi, iota), optionally adds a message block, runs RF1
// (theta) and writes the other instance with rho applied by addressing.
// Because the round is rescheduled as theta first and pi/chi/iota last, a
// block takes 24 passes:
//   pass 0      RF1 only on the block (new message), or RF2 of round 23 of
//               the previous block XOR the block (same message)
//   pass n      RF2 with round constant n-1, then RF1   (n = 1..23)
// After pass 23 the state waits for the next block's pass 0, which also
// finishes round 23. When the finished block was the last of its message,
// that pass drives the digest out of RF2, and a new message's first block
// (if one is waiting) enters RF1 in the same pass; otherwise the pass only
// produces the digest. A message of N blocks thus takes 96*N cycles plus a
// 4-cycle digest pass that overlaps the next message.
//
// The pass type is decided in the cycle that starts it (fold 0) from the
// input buffer's status and held in registers for folds 1-3. A pass that
// needs a block waits at fold 0 until one is available.
module sha3_folded_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_avail,   // input buffer holds a complete block
  input  logic       blk_last,    // ... and it is the last of its message
  output logic       act,         // datapath works this cycle
  output logic [1:0] fold,        // sub-round: fold being processed
  output logic       rd_inst,     // state instance read
  output logic       wr_inst,     // state instance written
  output logic       we,          // write RF1 output to the state memory
  output logic       use_rf2,     // RF1 input includes RF2 output (feedback)
  output logic       use_blk,     // RF1 input includes the message block
  output logic       do_digest,   // RF2 output is the final state of a message
  output logic [4:0] rc_idx,      // round constant used by RF2
  output logic       buf_release, // free the input buffer bank
  output logic       digest_done, // last fold of the digest this cycle
  output logic       busy
);

  typedef struct packed {
    logic       rf2;
    logic       blk;
    logic       dig;
    logic       wr;
    logic       last;
    logic [4:0] rc;
  } pass_t;

  logic       in_pass;   // folds 1..3 of a pass remain
  logic       perm;      // the state memory holds a message state
  logic [4:0] nr;        // number of the next pass for that state (1..24)
  logic       perm_last; // that state's block was its message's last
  logic       inst;      // instance holding the live state
  pass_t      held, start, cur;
  logic       go;

  // decision for a pass starting this cycle
  always_comb begin
    start = '0;
    go    = 1'b0;
    if (!perm) begin
      if (blk_avail) begin
        go = 1'b1; start.blk = 1'b1; start.wr = 1'b1; start.last = blk_last;
        start.rc = 5'd23;
      end
    end else if (nr != 5'd24) begin
      go = 1'b1; start.rf2 = 1'b1; start.wr = 1'b1; start.rc = nr - 5'd1;
    end else if (!perm_last) begin
      if (blk_avail) begin
        go = 1'b1; start.rf2 = 1'b1; start.blk = 1'b1; start.wr = 1'b1;
        start.last = blk_last; start.rc = 5'd23;
      end
    end else begin
      // RF2 output goes to the digest only; a waiting block starts a new message
      go = 1'b1; start.dig = 1'b1; start.rc = 5'd23;
      start.blk = blk_avail; start.wr = blk_avail; start.last = blk_last;
    end
  end

  assign cur = in_pass ? held : start;
  assign act = in_pass || go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pass   <= 1'b0;
      fold      <= 2'd0;
      perm      <= 1'b0;
      nr        <= 5'd0;
      perm_last <= 1'b0;
      inst      <= 1'b0;
      held      <= '0;
    end else if (act) begin
      fold <= fold + 2'd1;
      if (!in_pass) held <= start;
      in_pass <= (fold != 2'd3);
      if (fold == 2'd3) begin
        if (cur.wr) inst <= ~inst;
        if (cur.blk) begin
          perm      <= 1'b1;
          nr        <= 5'd1;
          perm_last <= cur.last;
        end else if (cur.dig) begin
          perm <= 1'b0;
        end else begin
          nr <= nr + 5'd1;
        end
      end
    end
  end

  assign rd_inst     = inst;
  assign wr_inst     = ~inst;
  assign we          = act && cur.wr;
  assign use_rf2     = cur.rf2;
  assign use_blk     = act && cur.blk;
  assign do_digest   = act && cur.dig;
  assign rc_idx      = cur.rc;
  assign buf_release = act && cur.blk && fold == 2'd3;
  assign digest_done = act && cur.dig && fold == 2'd3;
  assign busy        = perm || in_pass;

  // a pass starts only at fold 0
  always_ff @(posedge clk)
    if (!in_pass) assert (fold == 2'd0) else $error("ctrl: pass out of step");

endmodule
