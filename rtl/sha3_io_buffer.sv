// sha3_io_buffer: input side of the wrapper of the folded structure.
//
// Holds padded message blocks for the core, organised like the state: one
// 16 x 16 single port distributed RAM per rate lane (9 lanes for SHA3-512),
// word a = fold a of that lane. Two blocks fit (bank 0 at addresses 0-3,
// bank 1 at 4-7), so the host can load the next block while the core works
// on the current one.
//
// Host side: one 16-bit word per accepted cycle (in_valid & in_ready), in
// the order lane 0 fold 0..3, lane 1 fold 0..3, ..., i.e. message bytes
// 2k and 2k+1 of the block in bits 7:0 and 15:8 of word k (Keccak's
// little-endian lane order). in_last, given with the final word of a
// block, marks the last block of a message. Padding is done by the host.
// The RAMs have a single port, so in_ready drops in the cycles in which the
// core reads the buffer (rd_en).
//
// Core side: blk_avail says a complete block is waiting in the read bank;
// rd_fold selects the fold returned on rd_data (asynchronous read);
// release frees the bank. While a block is loaded the buffer also keeps bit
// 15 of every lane's fold 3 (slice 63 of the block), which the core needs
// before it reads fold 3.
module sha3_io_buffer
  import sha3_pkg::*;
#(
  parameter int unsigned RATE_LANES = RATE_LANES_512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [FW-1:0]                  in_data,
  input  logic                           in_last,
  // core
  output logic                           blk_avail,
  output logic                           blk_last,
  output logic [RATE_LANES-1:0]          blk_s63,
  input  logic                           rd_en,
  input  logic [1:0]                     rd_fold,
  output logic [RATE_LANES-1:0][FW-1:0]  rd_data,
  input  logic                           release_blk
);

  localparam int unsigned WORDS = RATE_LANES * FF;
  localparam int unsigned CW    = $clog2(WORDS);

  logic [CW-1:0]   cnt;            // word of the block being loaded
  logic            wr_bank, rd_bank;
  logic [1:0]      full, last;
  logic [1:0][RATE_LANES-1:0] s63;
  logic            push;
  logic [CW-3:0]   wr_lane;

  assign wr_lane  = cnt[CW-1:2];
  assign in_ready = !full[wr_bank] && !rd_en;
  assign push     = in_valid && in_ready;

  for (genvar k = 0; k < int'(RATE_LANES); k++) begin : g_ram
    logic [3:0] addr;
    assign addr = rd_en ? {1'b0, rd_bank, rd_fold} : {1'b0, wr_bank, cnt[1:0]};
    dist_ram_sp #(.WIDTH(FW), .DEPTH(16)) u_ram (
      .clk   (clk),
      .we    (push && wr_lane == (CW-2)'(k)),
      .addr  (addr),
      .wdata (in_data),
      .rdata (rd_data[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
      full    <= '0;
      last    <= '0;
      s63     <= '0;
    end else begin
      if (push) begin
        if (cnt[1:0] == 2'd3) s63[wr_bank][wr_lane] <= in_data[FW-1];
        if (cnt == CW'(WORDS - 1)) begin
          cnt           <= '0;
          full[wr_bank] <= 1'b1;
          last[wr_bank] <= in_last;
          wr_bank       <= ~wr_bank;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (release_blk) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= ~rd_bank;
      end
    end
  end

  assign blk_avail = full[rd_bank];
  assign blk_last  = last[rd_bank];
  assign blk_s63   = s63[rd_bank];

  // the core only reads or frees a bank that holds a complete block
  always_ff @(posedge clk)
    if (rd_en || release_blk)
      assert (full[rd_bank]) else $error("io_buffer: read of an empty bank");

endmodule
