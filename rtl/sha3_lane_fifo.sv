// sha3_lane_fifo: input IO-buffer of the unfolded structures, built from
// flip-flops. It collects one message block of RATE_LANES 64-bit lanes
// (9 for SHA3-512) from the host, one lane per accepted cycle, lane 0
// first; each lane holds message bytes 8k..8k+7 with byte 8k in bits 7:0.
// When the block is complete, blk_avail rises and the whole block is
// presented in parallel on blk; pop empties the buffer. The host may
// start loading the next block in the cycle after pop. in_last, given with
// the block's final lane, marks the last block of a message.
module sha3_lane_fifo
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES = RATE_LANES_512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  lane_t                       in_data,
  input  logic                        in_last,
  output logic                        blk_avail,
  output logic                        blk_last,
  output logic [RATE_LANES-1:0][63:0] blk,
  input  logic                        pop
);
  localparam int unsigned CW = $clog2(RATE_LANES + 1);

  logic [CW-1:0] cnt;   // lanes held

  assign blk_avail = (cnt == CW'(RATE_LANES));
  assign in_ready  = !blk_avail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      blk_last <= 1'b0;
    end else if (pop) begin
      cnt <= '0;
    end else if (in_valid && in_ready) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(RATE_LANES - 1)) blk_last <= in_last;
    end
  end

  // lane k is loaded when cnt == k
  always_ff @(posedge clk)
    if (in_valid && in_ready && !pop)
      for (int k = 0; k < int'(RATE_LANES); k++)
        if (cnt == CW'(k)) blk[k] <= in_data;

  always_ff @(posedge clk)
    if (pop) assert (blk_avail) else $error("lane_fifo: pop of an incomplete block");

endmodule
