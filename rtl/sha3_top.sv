// sha3_top: the three SHA3-512 structures side by side, each with its own
// ports (prefix f_ folded, b_ basic, p_ pipelined) and a shared clock and
// reset. They compute the same function at different cost and speed:
//   folded     (sha3_folded)     16 slices per cycle, 96 cycles per block,
//                                state in 25 lane RAMs; 16-bit host words
//   basic      (sha3_basic)      one round per cycle, 24 cycles per block;
//                                64-bit host lanes
//   pipelined  (sha3_pipelined)  theta | rho-pi-chi-iota pipeline, two
//                                messages in flight on two channels, 48
//                                cycles per block, 24 per block overall
// See each module for its interface and timing.
module sha3_top
  import sha3_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // folded structure
  input  logic          f_in_valid,
  output logic          f_in_ready,
  input  logic [15:0]   f_in_data,
  input  logic          f_in_last,
  output logic          f_digest_valid,
  output logic [511:0]  f_digest,
  output logic          f_busy,
  // basic structure
  input  logic          b_in_valid,
  output logic          b_in_ready,
  input  logic [63:0]   b_in_data,
  input  logic          b_in_last,
  output logic          b_digest_valid,
  output logic [511:0]  b_digest,
  output logic          b_busy,
  // pipelined structure
  input  logic          p_in_ch,
  input  logic          p_in_valid,
  output logic          p_in_ready,
  input  logic [63:0]   p_in_data,
  input  logic          p_in_last,
  output logic          p_digest_valid,
  output logic          p_digest_ch,
  output logic [511:0]  p_digest,
  output logic          p_busy
);

  sha3_folded u_folded (
    .clk, .rst_n,
    .in_valid     (f_in_valid),
    .in_ready     (f_in_ready),
    .in_data      (f_in_data),
    .in_last      (f_in_last),
    .digest_valid (f_digest_valid),
    .digest       (f_digest),
    .busy         (f_busy)
  );

  sha3_basic u_basic (
    .clk, .rst_n,
    .in_valid     (b_in_valid),
    .in_ready     (b_in_ready),
    .in_data      (b_in_data),
    .in_last      (b_in_last),
    .digest_valid (b_digest_valid),
    .digest       (b_digest),
    .busy         (b_busy)
  );

  sha3_pipelined u_pipelined (
    .clk, .rst_n,
    .in_ch        (p_in_ch),
    .in_valid     (p_in_valid),
    .in_ready     (p_in_ready),
    .in_data      (p_in_data),
    .in_last      (p_in_last),
    .digest_valid (p_digest_valid),
    .digest_ch    (p_digest_ch),
    .digest       (p_digest),
    .busy         (p_busy)
  );

endmodule
