// tb_keccak_rf2_pci: RF2 (pi, chi, iota on one 16-slice fold) against a
// lane-level pi/chi/iota of a whole random state, for every round constant
// and every fold.
module tb_keccak_rf2_pci;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  fold_t       din, dout;
  logic [15:0] rc;
  int checks = 0, failures = 0;

  keccak_rf2_pci #(.NS(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t a, o;
    for (int n = 0; n < 48; n++) begin
      a = rand_st();
      o = pci_st_ref(a, n % 24);
      for (int f = 0; f < 4; f++) begin
        for (int l = 0; l < 25; l++) din[l] = a[l][16*f +: 16];
        rc = rc_ref(n % 24) >> (16*f);
        #1;
        for (int l = 0; l < 25; l++) begin
          checks++;
          if (dout[l] !== o[l][16*f +: 16]) begin
            failures++;
            if (failures < 10) $display("lane %0d fold %0d: %h, expected %h", l, f, dout[l], o[l][16*f +: 16]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
