// sha3_folded_state: state memory of the folded SHA-3 structure, with the
// rho step-mapping done by addressing.
//
// Every lane has its own 16 x 16 distributed RAM. Word a of a lane holds
// one fold (16 bits) of that lane; two copies of the state live side by
// side, instance 0 at addresses 0-3 and instance 1 at addresses 4-7. A pass
// reads one instance fold by fold (read address = sub-round) and writes its
// result into the other instance, so reads and writes never collide.
//
// Rho rotates lane l by r = 16q + s bits. A fold written at sub-round f
// therefore lands in folds f+q and f+q+1 of the rotated lane: the word is
// rotated by s inside 16 bits and written to the address of the fold that
// receives the majority of its bits (f+q when s <= 8, f+q+1 when s > 8).
// The minority of fewer than 8 bits, which belongs to the adjacent fold,
// is written in the same cycle into a narrow companion RAM of the lane, at
// the address of that adjacent fold. A read merges the two with a fixed
// mask, so the word read at address f is exactly fold f of the rotated
// lane. Lane (0,0) has r = 0 and no companion RAM.
//
// Timing: write on the rising edge when we = 1; read is asynchronous.
//   wdata   fold wr_fold of the new state before rho (theta output)
//   rdata   fold rd_fold of instance rd_inst, rho already applied
module sha3_folded_state
  import sha3_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic       wr_inst,
  input  logic [1:0] wr_fold,
  input  fold_t      wdata,
  input  logic       rd_inst,
  input  logic [1:0] rd_fold,
  output fold_t      rdata
);

  localparam int unsigned SPW = 8;   // width of a companion (spill) RAM

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    localparam int unsigned R  = rho_off(l);
    localparam int unsigned Q  = R / FW;
    localparam int unsigned S  = R % FW;
    localparam int unsigned QM = (S > FW/2) ? Q + 1 : Q;   // fold offset of the majority
    localparam int unsigned QS = (S > FW/2) ? Q : Q + 1;   // fold offset of the minority
    localparam logic [FW-1:0] LO_MASK = FW'((32'd1 << S) - 1);  // bits below s

    logic [FW-1:0] rot, main_rd;
    logic [1:0]    main_fold;
    logic [3:0]    main_waddr;

    assign rot        = (S == 0) ? wdata[l] : FW'((wdata[l] << S) | (wdata[l] >> (FW - S)));
    assign main_fold  = wr_fold + 2'(QM % 4);
    assign main_waddr = {1'b0, wr_inst, main_fold};

    dist_ram_sdp #(.WIDTH(FW), .DEPTH(16)) u_main (
      .clk   (clk),
      .we    (we),
      .waddr (main_waddr),
      .wdata (rot),
      .raddr ({1'b0, rd_inst, rd_fold}),
      .rdata (main_rd)
    );

    if (S == 0) begin : g_aligned
      assign rdata[l] = main_rd;
    end else begin : g_split
      logic [SPW-1:0] spill_wd, spill_rd;
      logic [FW-1:0]  spill_pos;   // companion bits moved to their place in the word
      logic [1:0]     spill_fold;
      assign spill_fold = wr_fold + 2'(QS % 4);

      if (S <= FW/2) begin : g_low
        // minority: rotated bits below s, they belong to the next fold
        assign spill_wd  = SPW'(rot & LO_MASK);
        assign spill_pos = FW'(spill_rd) & LO_MASK;
        assign rdata[l]  = (main_rd & ~LO_MASK) | spill_pos;
      end else begin : g_high
        // minority: rotated bits from s upwards, they belong to the previous fold
        assign spill_wd  = SPW'(rot >> S);
        assign spill_pos = FW'(FW'(spill_rd) << S) & ~LO_MASK;
        assign rdata[l]  = (main_rd & LO_MASK) | spill_pos;
      end

      dist_ram_sdp #(.WIDTH(SPW), .DEPTH(16)) u_spill (
        .clk   (clk),
        .we    (we),
        .waddr ({1'b0, wr_inst, spill_fold}),
        .wdata (spill_wd),
        .raddr ({1'b0, rd_inst, rd_fold}),
        .rdata (spill_rd)
      );
    end
  end

endmodule
