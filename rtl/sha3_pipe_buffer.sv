// sha3_pipe_buffer: input IO-buffer of the pipelined structure, which keeps
// one message block for each of its two channels (two messages in flight).
//
// The two blocks share one distributed RAM per rate lane (9 lanes for
// SHA3-512), 64 bits wide, with the channel number as the address: the
// depth of the RAM holds the second message instead of a second set of
// flip-flops. The write port takes the host's lanes, the asynchronous read
// port presents all lanes of channel rd_ch's block in parallel to the
// round logic. Only the lane counters and last-block flags are registers.
//
// Host side: in_ch selects the channel being loaded; one lane per accepted
// cycle (in_valid & in_ready), lane 0 first, message byte 8k in bits 7:0;
// in_last with the final lane of a block marks the last block of a
// message. in_ready refers to channel in_ch and is low while that
// channel's block is complete and not yet taken.
// Core side: avail[c] / blk_last[c] describe channel c's block; blk is the
// block of channel rd_ch; pop[c] frees channel c (only with avail[c]); the
// host may load it again from the next cycle on.
// Organising this buffer in RAM depth follows the structure described for
// this design; the two-channel host interface is this design's own.
module sha3_pipe_buffer
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES = RATE_LANES_512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host
  input  logic                        in_ch,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  lane_t                       in_data,
  input  logic                        in_last,
  // core
  output logic [1:0]                  avail,
  output logic [1:0]                  blk_last,
  input  logic                        rd_ch,
  output logic [RATE_LANES-1:0][63:0] blk,
  input  logic [1:0]                  pop
);
  localparam int unsigned CW = $clog2(RATE_LANES + 1);

  logic [1:0][CW-1:0] cnt;   // lanes held per channel
  logic               wr;

  always_comb
    for (int c = 0; c < 2; c++) avail[c] = (cnt[c] == CW'(RATE_LANES));

  assign in_ready = !avail[in_ch];
  assign wr       = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      blk_last <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (pop[c]) begin
          cnt[c] <= '0;
        end else if (wr && in_ch == 1'(c)) begin
          cnt[c] <= cnt[c] + 1'b1;
          if (cnt[c] == CW'(RATE_LANES - 1)) blk_last[c] <= in_last;
        end
      end
    end
  end

  // one RAM per lane; address = channel
  for (genvar k = 0; k < int'(RATE_LANES); k++) begin : g_lane
    dist_ram_sdp #(.WIDTH(LANE_W), .DEPTH(2)) u_ram (
      .clk,
      .we    (wr && cnt[in_ch] == CW'(k)),
      .waddr (in_ch),
      .wdata (in_data),
      .raddr (rd_ch),
      .rdata (blk[k])
    );
  end

  always_ff @(posedge clk)
    for (int c = 0; c < 2; c++)
      if (pop[c]) assert (avail[c]) else $error("pipe_buffer: pop of an incomplete block");

endmodule
