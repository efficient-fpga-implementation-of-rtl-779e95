// tb_keccak_rc_rom: the round constant table against constants generated
// by the Keccak LFSR, for all 24 rounds, and 0 outside that range.
module tb_keccak_rc_rom;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic [4:0] rnd;
  lane_t      rc;
  int checks = 0, failures = 0;

  keccak_rc_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin
      rnd = 5'(r);
      #1;
      checks++;
      if (rc !== ((r < 24) ? rc_ref(r) : 64'h0)) begin
        failures++;
        $display("round %0d: %h", r, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
