// tb_keccak_rf1_theta: RF1 (theta on one 16-slice fold) against a
// lane-level theta of a whole random state. Fold f of the state is applied
// with the column parities of slice 16f-1 on prev_par; the result must be
// fold f of theta(state), and top_par the parities of slice 16f+15.
module tb_keccak_rf1_theta;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  fold_t   din, dout;
  colpar_t prev_par, top_par;
  int checks = 0, failures = 0;

  keccak_rf1_theta #(.NS(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t a, t;
    for (int n = 0; n < 200; n++) begin
      a = rand_st();
      t = theta_ref(a);
      for (int f = 0; f < 4; f++) begin
        for (int l = 0; l < 25; l++) din[l] = a[l][16*f +: 16];
        prev_par = colpar_ref(a, (16*f + 63) % 64);
        #1;
        for (int l = 0; l < 25; l++) begin
          checks++;
          if (dout[l] !== t[l][16*f +: 16]) begin
            failures++;
            if (failures < 10) $display("lane %0d fold %0d: %h, expected %h", l, f, dout[l], t[l][16*f +: 16]);
          end
        end
        checks++;
        if (top_par !== colpar_ref(a, 16*f + 15)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
