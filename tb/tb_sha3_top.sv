// tb_sha3_top: end-to-end test of the whole design at its default
// parameters: the same message list is hashed by the folded, the basic
// and the pipelined structure at once, and every digest is compared with
// the reference sponge (the empty message also with its published
// digest). Phase 1 streams single-block messages back to back and checks
// the block rates: one digest per 96 cycles (folded), per 24 cycles
// (basic) and per 48 cycles on each pipelined channel. Phase 2 sends
// messages of up to four blocks with idle gaps. Every mechanism of each
// structure is counted and must have occurred at least once:
//   folded:    block-only pass, RF2-XOR-block absorb, digest pass that
//              starts the next message, digest-only pass, wait for a
//              continuing block, host stall while the core reads the buffer
//   basic:     new message, XOR absorb, wait for a continuing block
//   pipelined: new message, XOR absorb, state held while a block is late
module tb_sha3_top;
  import sha3_ref_pkg::*;

  localparam int RATE_BYTES = 72;

  logic clk = 1'b0, rst_n = 1'b0;
  logic f_in_valid = 1'b0, f_in_ready, f_in_last = 1'b0, f_digest_valid, f_busy;
  logic [15:0] f_in_data = '0;
  logic [511:0] f_digest;
  logic b_in_valid = 1'b0, b_in_ready, b_in_last = 1'b0, b_digest_valid, b_busy;
  logic [63:0] b_in_data = '0;
  logic [511:0] b_digest;
  logic p_in_ch = 1'b0, p_in_valid = 1'b0, p_in_ready, p_in_last = 1'b0;
  logic p_digest_valid, p_digest_ch, p_busy;
  logic [63:0] p_in_data = '0;
  logic [511:0] p_digest;

  int checks = 0, failures = 0;
  longint cyc = 0;

  sha3_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scoreboards
  logic [511:0] fe[$], be[$], pe0[$], pe1[$];
  longint fc[$], bc[$], pc0[$], pc1[$];

  task automatic score(input string who, inout logic [511:0] q[$], input logic [511:0] d);
    checks++;
    if (q.size() == 0) begin failures++; $display("%s: unexpected digest", who); end
    else if (d !== q.pop_front()) begin failures++; $display("%s: digest mismatch at %0d", who, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (f_digest_valid) begin fc.push_back(cyc); score("folded", fe, f_digest); end
    if (b_digest_valid) begin bc.push_back(cyc); score("basic", be, b_digest); end
    if (p_digest_valid) begin
      if (p_digest_ch) begin pc1.push_back(cyc); score("pipelined ch1", pe1, p_digest); end
      else             begin pc0.push_back(cyc); score("pipelined ch0", pe0, p_digest); end
    end
  end

  // ---------------------------------------------------------- mechanisms
  int f_new, f_chain, f_dnew, f_donly, f_wait, f_stall;
  int b_new, b_chain, b_wait;
  int p_new, p_chain, p_hold;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_folded.u_ctrl.act && dut.u_folded.fold == 2'd0) begin
      if (dut.u_folded.use_blk && !dut.u_folded.use_rf2 && !dut.u_folded.do_digest) f_new++;
      if (dut.u_folded.use_blk && dut.u_folded.use_rf2) f_chain++;
      if (dut.u_folded.do_digest && dut.u_folded.use_blk) f_dnew++;
      if (dut.u_folded.do_digest && !dut.u_folded.use_blk) f_donly++;
    end
    if (dut.u_folded.u_ctrl.perm && dut.u_folded.u_ctrl.nr == 5'd24 && !dut.u_folded.u_ctrl.perm_last
        && !dut.u_folded.u_ctrl.in_pass && !dut.u_folded.blk_avail) f_wait++;
    if (f_in_valid && !f_in_ready && dut.u_folded.use_blk) f_stall++;
    if (dut.u_basic.start && !dut.u_basic.pend) b_new++;
    if (dut.u_basic.start && dut.u_basic.pend) b_chain++;
    if (!dut.u_basic.running && dut.u_basic.pend && !dut.u_basic.blk_avail) b_wait++;
    if (dut.u_pipelined.s1_new) p_new++;
    if (dut.u_pipelined.s1_absorb) p_chain++;
    if (dut.u_pipelined.s1_hold) p_hold++;
  end

  // --------------------------------------------------------------- drivers
  // words to send: {last, data}; each driver has its own queue
  logic [16:0] fq[$];
  logic [64:0] bq[$], pq0[$], pq1[$];
  int gap_pct = 0;
  int nmsg = 0;

  task automatic queue_msg(input byte unsigned msg[$]);
    byte unsigned p[$];
    logic [511:0] e;
    logic [63:0] w;
    pad_msg(msg, RATE_BYTES, p);
    e = sha3_ref(msg, RATE_BYTES, 8);
    fe.push_back(e);
    be.push_back(e);
    if (nmsg % 2 == 1) pe1.push_back(e); else pe0.push_back(e);
    for (int i = 0; i < p.size() / 2; i++)
      fq.push_back({i == p.size() / 2 - 1, p[2*i+1], p[2*i]});
    for (int i = 0; i < p.size() / 8; i++) begin
      for (int b = 0; b < 8; b++) w[8*b +: 8] = p[8*i + b];
      bq.push_back({i == p.size() / 8 - 1, w});
      if (nmsg % 2 == 1) pq1.push_back({i == p.size() / 8 - 1, w});
      else               pq0.push_back({i == p.size() / 8 - 1, w});
    end
    nmsg++;
  endtask

  function automatic bit skip();
    return gap_pct > 0 && ($urandom % 100) < gap_pct;
  endfunction

  // inputs change on the falling edge; the word is taken on the next
  // rising edge if in_ready is high, which is looked at after the change
  initial begin : drv_f
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      f_in_valid = 1'b0;
      if (fq.size() == 0) continue;
      if (skip()) begin repeat ($urandom % 80) @(negedge clk); continue; end
      f_in_valid = 1'b1; f_in_data = fq[0][15:0]; f_in_last = fq[0][16];
      #1;
      if (f_in_ready) void'(fq.pop_front());
    end
  end

  initial begin : drv_b
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      b_in_valid = 1'b0;
      if (bq.size() == 0) continue;
      if (skip()) begin repeat ($urandom % 80) @(negedge clk); continue; end
      b_in_valid = 1'b1; b_in_data = bq[0][63:0]; b_in_last = bq[0][64];
      #1;
      if (b_in_ready) void'(bq.pop_front());
    end
  end

  initial begin : drv_p
    logic [64:0] x;
    bit pick, sent;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      p_in_valid = 1'b0;
      if (skip()) begin repeat ($urandom % 80) @(negedge clk); continue; end
      sent = 0;
      for (int tr = 0; tr < 2 && !sent; tr++) begin
        pick = 1'(cyc + tr);
        if ((pick ? pq1.size() : pq0.size()) == 0) continue;
        p_in_ch = pick;
        #1;
        if (!p_in_ready) continue;
        x = pick ? pq1[0] : pq0[0];
        p_in_valid = 1'b1; p_in_data = x[63:0]; p_in_last = x[64];
        if (pick) void'(pq1.pop_front()); else void'(pq0.pop_front());
        sent = 1;
      end
    end
  end

  function automatic void rand_msg(input int len, output byte unsigned m[$]);
    m = {};
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
  endfunction

  task automatic wait_idle();
    while (fe.size() + be.size() + pe0.size() + pe1.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  task automatic check_rate(input string who, input longint t[$], input int per);
    for (int i = 1; i < t.size(); i++) begin
      checks++;
      if (t[i] - t[i-1] != longint'(per)) begin
        failures++; $display("%s: %0d cycles between digests, expected %0d", who, t[i] - t[i-1], per);
      end
    end
  endtask

  initial begin
    byte unsigned m[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // the empty message
    m = {};
    queue_msg(m);
    wait_idle();
    checks += 3;
    if (f_digest !== 512'h26cd1d2886857501e3d3b6959d1900f558c53a2c40e9e3114cf9f5f13a12b215a6805c47c1dcd1e05958e24f1682c9976e755a18dc67b5c8c59a3aa2cc739fa6) failures++;
    if (b_digest !== f_digest) failures++;
    if (p_digest !== f_digest) failures++;

    // phase 1: single-block stream, block rates
    fc = {}; bc = {}; pc0 = {}; pc1 = {};
    for (int i = 0; i < 10; i++) begin rand_msg($urandom % 72, m); queue_msg(m); end
    wait_idle();
    check_rate("folded", fc, 96);
    check_rate("basic", bc, 24);
    check_rate("pipelined ch0", pc0, 48);
    check_rate("pipelined ch1", pc1, 48);

    // phase 2: multi-block messages with gaps, then without
    gap_pct = 5;
    for (int i = 0; i < 12; i++) begin rand_msg($urandom % 290, m); queue_msg(m); end
    wait_idle();
    gap_pct = 0;
    for (int i = 0; i < 12; i++) begin rand_msg($urandom % 290, m); queue_msg(m); end
    wait_idle();

    $display("folded: new=%0d absorb=%0d digest+new=%0d digest-only=%0d wait=%0d stall=%0d",
             f_new, f_chain, f_dnew, f_donly, f_wait, f_stall);
    $display("basic: new=%0d absorb=%0d wait=%0d", b_new, b_chain, b_wait);
    $display("pipelined: new=%0d absorb=%0d hold=%0d", p_new, p_chain, p_hold);
    checks++;
    if (f_new == 0 || f_chain == 0 || f_dnew == 0 || f_donly == 0 || f_wait == 0 || f_stall == 0 ||
        b_new == 0 || b_chain == 0 || b_wait == 0 || p_new == 0 || p_chain == 0 || p_hold == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
