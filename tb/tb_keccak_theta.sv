// tb_keccak_theta: whole-state theta against the lane-level reference for
// random states.
module tb_keccak_theta;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  state_t din, dout;
  int checks = 0, failures = 0;

  keccak_theta dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t a, e;
    for (int n = 0; n < 200; n++) begin
      a = rand_st();
      din = a;
      #1;
      e = theta_ref(a);
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
