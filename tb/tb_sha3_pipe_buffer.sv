// tb_sha3_pipe_buffer: the two-channel input buffer of the pipelined
// structure, driven with random lanes on randomly chosen channels, random
// read channel and random pops of complete blocks. A model keeps, per
// channel, the lanes written so far and the last flag. Checked every
// cycle: avail of both channels, in_ready for the selected channel, and
// the whole block and its last flag on the read channel when it is
// complete. Inputs change on the falling clock edge.
module tb_sha3_pipe_buffer;
  import sha3_pkg::*;

  localparam int unsigned RL = 9;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_ch = 1'b0, in_valid = 1'b0, in_ready, in_last = 1'b0;
  lane_t             in_data = '0;
  logic [1:0]        avail, blk_last, pop = '0;
  logic              rd_ch = 1'b0;
  logic [RL-1:0][63:0] blk;
  int checks = 0, failures = 0;

  sha3_pipe_buffer #(.RATE_LANES(RL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  logic [1:0][RL-1:0][63:0] m_blk;
  int                       m_cnt[2];
  logic [1:0]               m_last;
  int                       blocks[2];

  initial begin
    logic wr;
    m_cnt = '{0, 0};
    blocks = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30000; n++) begin
      // new inputs
      in_ch    = 1'($urandom);
      in_valid = ($urandom % 10) < 7;
      in_data  = {$urandom, $urandom};
      in_last  = 1'($urandom);
      rd_ch    = 1'($urandom);
      for (int c = 0; c < 2; c++) pop[c] = (m_cnt[c] == int'(RL)) && ($urandom % 4 == 0);
      #1;
      // outputs against the model
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (avail[c] !== (m_cnt[c] == int'(RL))) begin
          failures++; $display("cycle %0d: avail[%0d] wrong", n, c);
        end
      end
      checks++;
      if (in_ready !== (m_cnt[in_ch] != int'(RL))) begin failures++; $display("cycle %0d: in_ready wrong", n); end
      if (m_cnt[rd_ch] == int'(RL)) begin
        checks += 2;
        if (blk !== m_blk[rd_ch]) begin failures++; $display("cycle %0d: block of channel %0d wrong", n, rd_ch); end
        if (blk_last[rd_ch] !== m_last[rd_ch]) begin failures++; $display("cycle %0d: last flag wrong", n); end
      end
      // what the coming edge does
      wr = in_valid && (m_cnt[in_ch] != int'(RL));
      @(negedge clk);
      for (int c = 0; c < 2; c++)
        if (pop[c]) begin m_cnt[c] = 0; blocks[c]++; end
      if (wr) begin
        m_blk[in_ch][m_cnt[in_ch]] = in_data;
        if (m_cnt[in_ch] == int'(RL) - 1) m_last[in_ch] = in_last;
        m_cnt[in_ch]++;
      end
    end
    $display("blocks popped: channel 0 %0d, channel 1 %0d", blocks[0], blocks[1]);
    checks++;
    if (blocks[0] < 10 || blocks[1] < 10) begin failures++; $display("too few blocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
