// tb_keccak_rpci: whole-state rho, pi, chi and iota against the lane-level
// reference, for random states and all 24 round constants.
module tb_keccak_rpci;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout;
  lane_t  rc;
  int checks = 0, failures = 0;

  keccak_rpci dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t a, e;
    for (int n = 0; n < 240; n++) begin
      a = rand_st();
      din = a;
      rc = rc_ref(n % 24);
      #1;
      e = pci_st_ref(rho_st_ref(a), n % 24);
      for (int l = 0; l < 25; l++) begin
        checks++;
        if (dout[l] !== e[l]) begin
          failures++;
          if (failures < 10) $display("lane %0d: %h, expected %h", l, dout[l], e[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
