// tb_sha3_pipelined: end-to-end test of the pipelined SHA3-512 structure
// with its two message channels. Messages for both channels are padded and
// their lanes interleaved on the host port; each digest is compared with
// the reference sponge, in order per channel. Checked as well: with both
// channels streaming single-block messages, each channel gives one digest
// per 48 cycles (two blocks per 48 cycles in total); and a new message, a
// continuing block (XOR absorb) and a continuing block that arrives late
// (state carried through the pipeline unchanged) all occur.
module tb_sha3_pipelined;
  import sha3_ref_pkg::*;

  localparam int RATE_BYTES = 72;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_ch = 1'b0, in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [63:0]  in_data = '0;
  logic         digest_valid, digest_ch, busy;
  logic [511:0] digest;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sha3_pipelined dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] exp0[$], exp1[$];
  longint       dc0[$], dc1[$];
  always @(posedge clk) if (rst_n && digest_valid) begin
    logic [511:0] e;
    checks++;
    if (digest_ch) dc1.push_back(cyc); else dc0.push_back(cyc);
    if ((digest_ch ? exp1.size() : exp0.size()) == 0) begin
      failures++; $display("unexpected digest on channel %0d", digest_ch);
    end else begin
      e = digest_ch ? exp1.pop_front() : exp0.pop_front();
      if (digest !== e) begin failures++; $display("digest mismatch ch %0d at %0d", digest_ch, cyc); end
    end
  end

  int n_new = 0, n_chain = 0, n_hold = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.s1_new) n_new++;
    if (dut.s1_absorb) n_chain++;
    if (dut.s1_hold) n_hold++;
  end

  // lanes waiting to be sent, per channel: {last, data}
  logic [64:0] wq0[$], wq1[$];
  int gap_pct = 0;

  task automatic queue_msg(input bit ch, input byte unsigned msg[$]);
    byte unsigned p[$];
    logic [63:0] w;
    pad_msg(msg, RATE_BYTES, p);
    if (ch) exp1.push_back(sha3_ref(msg, RATE_BYTES, 8));
    else    exp0.push_back(sha3_ref(msg, RATE_BYTES, 8));
    for (int i = 0; i < p.size() / 8; i++) begin
      for (int b = 0; b < 8; b++) w[8*b +: 8] = p[8*i + b];
      if (ch) wq1.push_back({i == p.size() / 8 - 1, w});
      else    wq0.push_back({i == p.size() / 8 - 1, w});
    end
  endtask

  // host driver: each cycle offers a lane of a channel whose buffer has room
  initial begin
    logic [64:0] x;
    bit pick;
    bit sent;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      in_valid = 1'b0;
      if (gap_pct > 0 && ($urandom % 100) < gap_pct) continue;
      sent = 0;
      for (int tr = 0; tr < 2 && !sent; tr++) begin
        pick = 1'(cyc + tr);
        if ((pick ? wq1.size() : wq0.size()) == 0) continue;
        in_ch = pick;
        #1;
        if (!in_ready) continue;
        x = pick ? wq1[0] : wq0[0];
        in_valid = 1'b1; in_data = x[63:0]; in_last = x[64];
        if (pick) void'(wq1.pop_front()); else void'(wq0.pop_front());
        sent = 1;
      end
    end
  end

  function automatic void rand_msg(input int len, output byte unsigned m[$]);
    m = {};
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
  endfunction

  task automatic wait_idle();
    while (exp0.size() + exp1.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    byte unsigned m[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = {};
    queue_msg(0, m);
    wait_idle();
    checks++;
    if (digest !== 512'h26cd1d2886857501e3d3b6959d1900f558c53a2c40e9e3114cf9f5f13a12b215a6805c47c1dcd1e05958e24f1682c9976e755a18dc67b5c8c59a3aa2cc739fa6) begin
      failures++; $display("SHA3-512('') wrong");
    end
    // both channels streaming single-block messages
    dc0 = {}; dc1 = {};
    for (int i = 0; i < 8; i++) begin
      rand_msg($urandom % 72, m); queue_msg(0, m);
      rand_msg($urandom % 72, m); queue_msg(1, m);
    end
    wait_idle();
    for (int i = 1; i < dc0.size(); i++) begin
      checks++;
      if (dc0[i] - dc0[i-1] != 48) begin failures++; $display("ch0 interval %0d", dc0[i] - dc0[i-1]); end
    end
    for (int i = 1; i < dc1.size(); i++) begin
      checks++;
      if (dc1[i] - dc1[i-1] != 48) begin failures++; $display("ch1 interval %0d", dc1[i] - dc1[i-1]); end
    end
    // multi-block messages on both channels, with gaps
    gap_pct = 60;
    for (int i = 0; i < 10; i++) begin
      rand_msg($urandom % 220, m); queue_msg(1'(i), m);
    end
    wait_idle();
    gap_pct = 0;
    for (int i = 0; i < 6; i++) begin
      rand_msg($urandom % 220, m); queue_msg(1'($urandom), m);
    end
    wait_idle();
    checks++;
    if (n_new == 0 || n_chain == 0 || n_hold == 0) begin failures++; $display("mechanism never seen"); end
    $display("new=%0d absorb=%0d hold=%0d", n_new, n_chain, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
