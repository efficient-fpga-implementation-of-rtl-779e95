// tb_sha3_folded_ctrl: the pass scheduling of the folded structure. A
// simple buffer model offers blocks of messages of 1-3 blocks, sometimes
// late. The test follows the passes and checks: every pass lasts 4 cycles
// with fold counting 0..3; a message's first block gets a block-only pass,
// every block then 23 passes with RF2 and round constants 0..22 in order;
// the next pass uses constant 23 and either absorbs the next block of the
// same message (RF2 XOR block) or produces the digest, starting a waiting
// new message in the same pass; read and write instances alternate; the
// buffer is freed at the end of each block pass; the time from a block's
// first pass to the pass that completes its round 23 is 96 cycles.
module tb_sha3_folded_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       blk_avail, blk_last;
  logic       act, rd_inst, wr_inst, we, use_rf2, use_blk, do_digest;
  logic       buf_release, digest_done, busy;
  logic [1:0] fold;
  logic [4:0] rc_idx;
  int checks = 0, failures = 0;

  sha3_folded_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  // buffer model: a list of block "last" flags; a block becomes available
  // after a random delay once the previous one is released
  logic [199:0] lasts = '0;   // last flag of block i
  int   nblk = 0, hd = 0;
  int   delay = 0;
  always @(posedge clk) begin
    if (buf_release) begin
      hd    <= hd + 1;
      delay <= $urandom % 200;
    end else if (delay > 0) delay <= delay - 1;
  end
  assign blk_avail = (hd < nblk) && (delay == 0);
  assign blk_last  = lasts[hd];

  // pass follower
  int   exp_rc;         // round constant expected in the next RF2 pass
  logic in_msg = 1'b0;  // a message state is live
  logic cur_last = 1'b0;
  int   blk_start, n_digest = 0, n_chain = 0, n_newdig = 0;
  int   cyc = 0;
  logic swap_exp = 1'b0;
  int   n_pass = 0, waited = 0, n_wait = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int nmsg = 40;
    for (int m = 0; m < nmsg; m++) begin
      int nb;
      nb = 1 + $urandom % 3;
      for (int b = 0; b < nb; b++) lasts[nblk++] = (b == nb - 1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #1;
    while (hd < nblk || busy) begin
      if (act) begin
        chk(fold == 2'd0, "pass starts off fold 0");
        // classify the pass at fold 0
        if (!in_msg) begin
          chk(use_blk && !use_rf2 && !do_digest && we, "new message pass");
          in_msg = 1'b1; cur_last = blk_last; exp_rc = 0; blk_start = cyc; waited = 0;
        end else if (exp_rc < 23) begin
          chk(use_rf2 && !use_blk && !do_digest && we, "round pass");
          chk(rc_idx == 5'(exp_rc), "round constant order");
          exp_rc++;
        end else begin
          chk(rc_idx == 5'd23, "final round constant");
          chk(cyc - blk_start - waited == 96, "96 cycles per block, not counting waits for a block");
          if (!cur_last) begin
            chk(use_rf2 && use_blk && !do_digest && we, "absorb pass");
            n_chain++;
            cur_last = blk_last; exp_rc = 0; blk_start = cyc; waited = 0;
          end else begin
            chk(do_digest && !use_rf2, "digest pass");
            chk(use_blk == blk_avail && we == blk_avail, "digest pass starts waiting message");
            n_digest++;
            if (use_blk) begin
              n_newdig++;
              cur_last = blk_last; exp_rc = 0; blk_start = cyc; waited = 0;
            end else in_msg = 1'b0;
          end
        end
        chk(rd_inst != wr_inst, "instances differ");
        if (n_pass++ > 0) chk(rd_inst == swap_exp, "instance swap after a writing pass");
        for (int f = 1; f < 4; f++) begin
          chk(buf_release == 1'b0 && digest_done == 1'b0, "early release/digest");
          @(negedge clk);
          chk(act && fold == 2'(f), "fold sequence");
        end
        chk(buf_release == use_blk, "release at last fold");
        chk(digest_done == do_digest, "digest_done at last fold");
        swap_exp = we ? ~rd_inst : rd_inst;
      end else if (in_msg) begin
        waited++;
        n_wait++;
      end
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    chk(n_digest == nmsg, "one digest per message");
    chk(n_chain > 0 && n_newdig > 0 && n_wait > 0, "absorb, overlapped digest and wait all seen");
    $display("digests=%0d absorbs=%0d overlapped=%0d", n_digest, n_chain, n_newdig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
