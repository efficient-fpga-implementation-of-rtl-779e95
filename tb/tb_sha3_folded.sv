// tb_sha3_folded: end-to-end test of the folded SHA3-512 structure at its
// default parameters.
//
// A series of messages (the empty string and "abc" with their published
// digests, then messages of 1 to 3 blocks with pseudo-random contents and
// lengths) is padded, cut into 16-bit words and fed to the host port,
// partly back to back and partly with idle gaps. Every digest is compared
// with the behavioural sponge in sha3_ref_pkg. Also checked:
//   - a stream of single-block messages yields one digest per 96 cycles;
//   - one single-block message from its last input word to digest_valid
//     takes 24 passes of 4 cycles plus the digest pass;
// and every mechanism of the structure is counted and must have occurred:
// a new-message pass, a same-message absorb (RF2 XOR block), a digest pass
// that starts the next message, a digest-only pass, a pass waiting for a
// block, and host back-pressure while the core reads the buffer.
module tb_sha3_folded;
  import sha3_ref_pkg::*;

  localparam int RATE_BYTES = 72;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  logic [15:0]  in_data = '0;
  logic         in_last = 1'b0;
  logic         digest_valid;
  logic [511:0] digest;
  logic         busy;

  int checks = 0, failures = 0;
  longint cyc = 0;

  sha3_folded dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d, %0d digests outstanding", cyc, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- scoreboard
  logic [511:0] exp_q[$];
  longint       dig_cyc[$];

  always @(posedge clk) if (rst_n) begin
    if (digest_valid) begin
      logic [511:0] e;
      dig_cyc.push_back(cyc);
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected digest");
      end else begin
        e = exp_q.pop_front();
        if (digest !== e) begin
          failures++;
          $display("digest mismatch at cycle %0d:\n got %h\n exp %h", cyc, digest, e);
        end
      end
    end
  end

  // ----------------------------------------------------- mechanism counters
  int n_new, n_chain, n_dig_new, n_dig_only, n_wait, n_backp;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.act && dut.fold == 2'd0) begin
      if (dut.use_blk && !dut.use_rf2 && !dut.do_digest) n_new++;
      if (dut.use_blk && dut.use_rf2 && !dut.do_digest) n_chain++;
      if (dut.do_digest && dut.use_blk) n_dig_new++;
      if (dut.do_digest && !dut.use_blk) n_dig_only++;
    end
    if (dut.u_ctrl.perm && dut.u_ctrl.nr == 5'd24 && !dut.u_ctrl.perm_last
        && !dut.u_ctrl.in_pass && !dut.blk_avail) n_wait++;
    if (in_valid && !in_ready && dut.use_blk) n_backp++;
  end

  // ----------------------------------------------------------------- driver
  task automatic send_msg(input byte unsigned msg[$], input int gap_pct);
    byte unsigned p[$];
    pad_msg(msg, RATE_BYTES, p);
    exp_q.push_back(sha3_ref(msg, RATE_BYTES, 8));
    // inputs change on the falling edge; a word is taken on the rising
    // edge when in_ready was high just before it
    for (int w = 0; w < p.size() / 2; w++) begin
      @(negedge clk);
      if (gap_pct > 0 && ($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        repeat (1 + $urandom % 40) @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = {p[2*w+1], p[2*w]};
      in_last  = (w == p.size() / 2 - 1);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  function automatic void rand_msg(input int len, output byte unsigned m[$]);
    m = {};
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
  endfunction

  task automatic wait_idle();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    byte unsigned m[$];
    longint t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // known answers
    m = {};
    send_msg(m, 0);
    wait_idle();
    checks++;
    if (digest !== 512'h26cd1d2886857501e3d3b6959d1900f558c53a2c40e9e3114cf9f5f13a12b215a6805c47c1dcd1e05958e24f1682c9976e755a18dc67b5c8c59a3aa2cc739fa6) begin
      failures++; $display("SHA3-512('') wrong: %h", digest);
    end
    m = {8'h61, 8'h62, 8'h63};
    send_msg(m, 0);
    t0 = cyc;   // cycle after the last word was accepted
    wait_idle();
    checks++;
    if (digest !== 512'hf053ec4e27f89265a5d508f44c0b34574093e34776c57e1ac9f32a19e916e1102e71d240025d4f880df744748221f6086e096b4b92cd93568a16571a0b8551b7) begin
      failures++; $display("SHA3-512('abc') wrong: %h", digest);
    end
    // latency: 24 passes of 4 cycles and the 4-cycle digest pass between
    // the edge that takes the last word and the edge that sees digest_valid
    checks++;
    if (dig_cyc[$] - t0 != 100) begin
      failures++; $display("single-block latency %0d, expected 100", dig_cyc[$] - t0);
    end

    // a stream of single-block messages, back to back
    dig_cyc = {};
    for (int i = 0; i < 6; i++) begin rand_msg($urandom % 72, m); send_msg(m, 0); end
    wait_idle();
    for (int i = 1; i < dig_cyc.size(); i++) begin
      checks++;
      if (dig_cyc[i] - dig_cyc[i-1] != 96) begin
        failures++; $display("block interval %0d, expected 96", dig_cyc[i] - dig_cyc[i-1]);
      end
    end

    // multi-block messages, with and without gaps
    for (int i = 0; i < 8; i++) begin
      rand_msg($urandom % 220, m);
      send_msg(m, (i % 2 == 1) ? 10 : 0);
      if (i % 3 == 2) wait_idle();
    end
    // boundary lengths
    for (int i = 0; i < 4; i++) begin
      rand_msg((i < 2) ? 71 + i : 141 + i, m);
      send_msg(m, 0);
    end
    wait_idle();

    checks++;
    if (n_new == 0 || n_chain == 0 || n_dig_new == 0 || n_dig_only == 0 || n_wait == 0 || n_backp == 0) begin
      failures++;
      $display("mechanism never seen");
    end
    $display("new=%0d chain=%0d digest+new=%0d digest-only=%0d wait=%0d backpressure=%0d",
             n_new, n_chain, n_dig_new, n_dig_only, n_wait, n_backp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
