// sha3_pkg: constants, types and small helper functions shared by the
// SHA-3 (Keccak-f[1600]) structures in this directory.
//
// The state is 5x5 lanes of 64 bits. Lane (x,y) has the flat index
// l = x + 5*y. The folded structure splits every lane into FF = 4 folds of
// FW = 16 bits; fold f holds bits z = 16f .. 16f+15, so one fold of the
// whole state is 16 complete slices of 25 bits.
//
// The rotation offsets and round constants are the standard Keccak values,
// hard-coded here as tables (the round constants are not generated by an
// LFSR, which gives a smaller circuit on an FPGA).
package sha3_pkg;

  localparam int unsigned LANES   = 25;   // lanes in the state
  localparam int unsigned LANE_W  = 64;   // bits per lane
  localparam int unsigned FF      = 4;    // folding factor of the folded structure
  localparam int unsigned FW      = LANE_W / FF;  // bits of a lane in one fold (16)

  // SHA3-512: rate 576 bits = 9 lanes, digest 512 bits = 8 lanes
  localparam int unsigned RATE_LANES_512   = 9;
  localparam int unsigned DIGEST_LANES_512 = 8;

  typedef logic [LANE_W-1:0]             lane_t;
  typedef logic [LANES-1:0][LANE_W-1:0]  state_t;   // whole state, [l] = lane x+5y
  typedef logic [LANES-1:0][FW-1:0]      fold_t;    // one fold: 16 bits of every lane
  typedef logic [4:0]                    colpar_t;  // column parities of one slice

  // rho rotation offset of lane l = x + 5*y
  function automatic int unsigned rho_off(int unsigned l);
    case (l)
      0:  return 0;   1:  return 1;   2:  return 62;  3:  return 28;  4:  return 27;
      5:  return 36;  6:  return 44;  7:  return 6;   8:  return 55;  9:  return 20;
      10: return 3;   11: return 10;  12: return 43;  13: return 25;  14: return 39;
      15: return 41;  16: return 45;  17: return 15;  18: return 21;  19: return 8;
      20: return 18;  21: return 2;   22: return 61;  23: return 56;  24: return 14;
      default: return 0;
    endcase
  endfunction

  // iota round constant of round r (0..23)
  function automatic lane_t round_const(logic [4:0] r);
    case (r)
      5'd0:  return 64'h0000000000000001;
      5'd1:  return 64'h0000000000008082;
      5'd2:  return 64'h800000000000808A;
      5'd3:  return 64'h8000000080008000;
      5'd4:  return 64'h000000000000808B;
      5'd5:  return 64'h0000000080000001;
      5'd6:  return 64'h8000000080008081;
      5'd7:  return 64'h8000000000008009;
      5'd8:  return 64'h000000000000008A;
      5'd9:  return 64'h0000000000000088;
      5'd10: return 64'h0000000080008009;
      5'd11: return 64'h000000008000000A;
      5'd12: return 64'h000000008000808B;
      5'd13: return 64'h800000000000008B;
      5'd14: return 64'h8000000000008089;
      5'd15: return 64'h8000000000008003;
      5'd16: return 64'h8000000000008002;
      5'd17: return 64'h8000000000000080;
      5'd18: return 64'h000000000000800A;
      5'd19: return 64'h800000008000000A;
      5'd20: return 64'h8000000080008081;
      5'd21: return 64'h8000000000008080;
      5'd22: return 64'h0000000080000001;
      5'd23: return 64'h8000000080008008;
      default: return 64'h0;
    endcase
  endfunction

  // pi, chi and iota of one 25-bit slice; rc is the round-constant bit of
  // this slice (it only enters lane (0,0)). Bit l of s is lane x + 5*y.
  function automatic logic [LANES-1:0] slice_pci(logic [LANES-1:0] s, logic rc);
    logic [LANES-1:0] p, o;
    // pi: output lane (X,Y) is input lane ((X + 3Y) mod 5, X)
    for (int X = 0; X < 5; X++)
      for (int Y = 0; Y < 5; Y++)
        p[X + 5*Y] = s[((X + 3*Y) % 5) + 5*X];
    // chi along each row
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5*y] = p[x + 5*y] ^ (~p[((x + 1) % 5) + 5*y] & p[((x + 2) % 5) + 5*y]);
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  // column parities of one slice
  function automatic colpar_t slice_par(logic [LANES-1:0] s);
    colpar_t c;
    for (int x = 0; x < 5; x++)
      c[x] = s[x] ^ s[x+5] ^ s[x+10] ^ s[x+15] ^ s[x+20];
    return c;
  endfunction

endpackage
