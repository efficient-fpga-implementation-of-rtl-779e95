// tb_sha3_basic: end-to-end test of the basic (one round per cycle)
// SHA3-512 structure. Messages of 0 to 3 blocks, including the empty
// string with its published digest, are padded and fed as 64-bit lanes,
// back to back or with gaps; each digest is compared with the reference
// sponge. Checked as well: a stream of single-block messages gives one
// digest per 24 cycles, and both a continuing block absorbed with XOR
// and a continuing block that arrives late (the state waits) occur.
module tb_sha3_basic;
  import sha3_ref_pkg::*;

  localparam int RATE_BYTES = 72;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [63:0]  in_data = '0;
  logic         digest_valid, busy;
  logic [511:0] digest;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sha3_basic dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] exp_q[$];
  longint       dig_cyc[$];
  always @(posedge clk) if (rst_n && digest_valid) begin
    logic [511:0] e;
    dig_cyc.push_back(cyc);
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected digest"); end
    else begin
      e = exp_q.pop_front();
      if (digest !== e) begin failures++; $display("digest mismatch at %0d", cyc); end
    end
  end

  // mechanisms
  int n_chain = 0, n_wait = 0, n_new = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.start && dut.pend) n_chain++;
    if (dut.start && !dut.pend) n_new++;
    if (!dut.running && dut.pend && !dut.blk_avail) n_wait++;
  end

  task automatic send_msg(input byte unsigned msg[$], input int gap_pct);
    byte unsigned p[$];
    pad_msg(msg, RATE_BYTES, p);
    exp_q.push_back(sha3_ref(msg, RATE_BYTES, 8));
    for (int w = 0; w < p.size() / 8; w++) begin
      @(negedge clk);
      if (gap_pct > 0 && ($urandom % 100) < gap_pct) begin
        in_valid = 1'b0;
        repeat (1 + $urandom % 30) @(negedge clk);
      end
      in_valid = 1'b1;
      for (int b = 0; b < 8; b++) in_data[8*b +: 8] = p[8*w + b];
      in_last = (w == p.size() / 8 - 1);
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
    repeat (3) @(posedge clk);
  endtask

  initial begin
    byte unsigned m[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m = {};
    send_msg(m, 0);
    wait_idle();
    checks++;
    if (digest !== 512'h26cd1d2886857501e3d3b6959d1900f558c53a2c40e9e3114cf9f5f13a12b215a6805c47c1dcd1e05958e24f1682c9976e755a18dc67b5c8c59a3aa2cc739fa6) begin
      failures++; $display("SHA3-512('') wrong");
    end
    // stream of single-block messages: the host delivers a block (9 lanes)
    // within the 24 cycles of the previous one, so digests come every 24
    dig_cyc = {};
    for (int i = 0; i < 8; i++) begin rand_msg($urandom % 72, m); send_msg(m, 0); end
    wait_idle();
    for (int i = 1; i < dig_cyc.size(); i++) begin
      checks++;
      if (dig_cyc[i] - dig_cyc[i-1] != 24) begin
        failures++; $display("interval %0d, expected 24", dig_cyc[i] - dig_cyc[i-1]);
      end
    end
    for (int i = 0; i < 12; i++) begin
      rand_msg($urandom % 220, m);
      send_msg(m, (i % 2 == 1) ? 30 : 0);
    end
    wait_idle();
    checks++;
    if (n_chain == 0 || n_wait == 0 || n_new == 0) begin failures++; $display("mechanism never seen"); end
    $display("new=%0d chain=%0d wait=%0d", n_new, n_chain, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
