// tb_sha3_f0s0_pre: the F0S0 pre-processing unit. A random theta output is
// presented fold by fold with cap_en; afterwards par_out must equal the
// column parities of slice 63 of pi/chi/iota(rho(state)) (RF2 path), of
// the block's slice 63 (block path), of their XOR, or zero, as selected.
module tb_sha3_f0s0_pre;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic        clk = 1'b0;
  logic        cap_en = 1'b0;
  logic [1:0]  fold = '0;
  fold_t       theta;
  logic        use_rf2, rc63, use_blk;
  logic [8:0]  blk_s63;
  colpar_t     par_out;
  int checks = 0, failures = 0;

  sha3_f0s0_pre #(.RATE_LANES(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t t, g;
    logic [4:0] p_rf2, p_blk, exp_par;
    int r;
    for (int n = 0; n < 100; n++) begin
      t = rand_st();
      r = n % 24;
      for (int f = 0; f < 4; f++) begin
        @(negedge clk);
        cap_en = 1'b1; fold = 2'(f);
        for (int l = 0; l < 25; l++) theta[l] = t[l][16*f +: 16];
      end
      @(negedge clk);
      cap_en = 1'b0;
      // scribble on the data bus: nothing is captured without cap_en
      for (int f = 0; f < 4; f++) begin
        fold = 2'(f);
        for (int l = 0; l < 25; l++) theta[l] = 16'($urandom);
        @(negedge clk);
      end
      g = pci_st_ref(rho_st_ref(t), r);
      p_rf2 = colpar_ref(g, 63);
      blk_s63 = 9'($urandom);
      p_blk = '0;
      for (int k = 0; k < 9; k++) p_blk[k % 5] ^= blk_s63[k];
      rc63 = rc_ref(r) >> 63;
      for (int sel = 0; sel < 4; sel++) begin
        use_rf2 = sel[0]; use_blk = sel[1];
        #1;
        exp_par = (use_rf2 ? p_rf2 : 5'd0) ^ (use_blk ? p_blk : 5'd0);
        checks++;
        if (par_out !== exp_par) begin
          failures++;
          if (failures < 10) $display("n %0d sel %0d: %b, expected %b", n, sel, par_out, exp_par);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
