// tb_sha3_lane_fifo: blocks of 9 random lanes are written with random gaps
// and popped with random delays. Checked: the block appears complete and
// in order on blk with its last flag, in_ready is low exactly while a
// complete block waits, and a new block can be loaded right after a pop.
module tb_sha3_lane_fifo;
  import sha3_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, in_ready, in_last = 1'b0;
  lane_t             in_data = '0;
  logic              blk_avail, blk_last, pop = 1'b0;
  logic [8:0][63:0]  blk;
  int checks = 0, failures = 0;

  sha3_lane_fifo #(.RATE_LANES(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0][63:0] e;
    logic el;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < 9; k++) e[k] = {$urandom, $urandom};
      el = 1'($urandom);
      for (int k = 0; k < 9; k++) begin
        if (n % 2 == 1) begin
          in_valid = 1'b0;
          repeat ($urandom % 3) @(negedge clk);
        end
        checks++;
        if (!in_ready || blk_avail) begin failures++; $display("not ready while filling"); end
        in_valid = 1'b1; in_data = e[k]; in_last = (k == 8) ? el : 1'($urandom);
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat ($urandom % 4) begin
        checks++;
        if (in_ready) begin failures++; $display("ready while full"); end
        @(negedge clk);
      end
      checks += 3;
      if (!blk_avail) begin failures++; $display("block %0d not available", n); end
      if (blk !== e) begin failures++; $display("block %0d contents", n); end
      if (blk_last !== el) begin failures++; $display("block %0d last", n); end
      pop = 1'b1;
      @(negedge clk);
      pop = 1'b0;
      checks++;
      if (blk_avail) begin failures++; $display("still available after pop"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
