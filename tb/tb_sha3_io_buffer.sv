// tb_sha3_io_buffer: a producer writes random blocks of 36 16-bit words
// (with random gaps and random in_last) while a consumer, with random
// delays, reads each complete block fold by fold and frees it. Checked:
// block contents per lane and fold, the last flag, the slice-63 bits, that
// blocks come out in order, that in_ready is low while the core reads and
// while both banks are full, and that two blocks can be held at once.
module tb_sha3_io_buffer;
  import sha3_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [15:0]          in_data = '0;
  logic                 blk_avail, blk_last;
  logic [8:0]           blk_s63;
  logic                 rd_en = 1'b0, release_blk = 1'b0;
  logic [1:0]           rd_fold = '0;
  logic [8:0][15:0]     rd_data;
  int checks = 0, failures = 0;
  int n_full = 0;

  typedef struct { logic [35:0][15:0] w; logic last; } blk_t;
  blk_t q[$];

  sha3_io_buffer #(.RATE_LANES(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-pressure rules, checked on every falling edge
  always @(negedge clk) if (rst_n) begin
    if (rd_en) begin
      checks++;
      if (in_ready) begin failures++; $display("in_ready high during a core read"); end
    end
    if (dut.full == 2'b11) begin
      n_full++;
      checks++;
      if (in_ready) begin failures++; $display("in_ready high with both banks full"); end
    end
  end

  // producer
  initial begin
    blk_t b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      for (int w = 0; w < 36; w++) b.w[w] = 16'($urandom);
      b.last = 1'($urandom);
      for (int w = 0; w < 36; w++) begin
        @(negedge clk);
        if (n % 3 == 1 && ($urandom % 4) == 0) begin
          in_valid = 1'b0;
          repeat ($urandom % 5) @(negedge clk);
        end
        in_valid = 1'b1; in_data = b.w[w]; in_last = (w == 35) ? b.last : 1'($urandom);
        // look at in_ready once the consumer has set up this cycle
        #2;
        while (!in_ready) begin @(negedge clk); #2; end
        @(posedge clk);
        if (w == 35) q.push_back(b);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  end

  // consumer
  initial begin
    blk_t e;
    int got = 0;
    @(posedge rst_n);
    while (got < 60) begin
      @(negedge clk);
      if (blk_avail && ($urandom % 3 != 0 || got > 40)) begin
        checks += 2;
        if (q.size() == 0) begin failures++; $display("block available too early"); continue; end
        e = q.pop_front();
        if (blk_last !== e.last) begin failures++; $display("block %0d last flag", got); end
        for (int k = 0; k < 9; k++)
          if (blk_s63[k] !== e.w[4*k+3][15]) begin failures++; $display("block %0d s63 lane %0d", got, k); end
        for (int f = 0; f < 4; f++) begin
          rd_en = 1'b1; rd_fold = 2'(f); release_blk = (f == 3);
          #1;
          for (int k = 0; k < 9; k++) begin
            checks++;
            if (rd_data[k] !== e.w[4*k+f]) begin
              failures++;
              $display("block %0d lane %0d fold %0d: %h, expected %h", got, k, f, rd_data[k], e.w[4*k+f]);
            end
          end
          @(negedge clk);
        end
        rd_en = 1'b0; release_blk = 1'b0;
        got++;
      end else if ($urandom % 2 == 0) begin
        repeat (20) @(negedge clk);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("both banks never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
