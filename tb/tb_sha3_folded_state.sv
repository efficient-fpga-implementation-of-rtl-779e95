// tb_sha3_folded_state: the state memory must apply rho by addressing.
// A random state is written fold by fold (as RF1 output) into one instance;
// reading that instance fold by fold must return rho(state), lane by lane.
// Writing the other instance must leave the first one intact.
module tb_sha3_folded_state;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic       clk = 1'b0;
  logic       we = 1'b0, wr_inst = 1'b0, rd_inst = 1'b0;
  logic [1:0] wr_fold = '0, rd_fold = '0;
  fold_t      wdata, rdata;
  int checks = 0, failures = 0;

  sha3_folded_state dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_state(input logic inst, input st_t s);
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      we = 1'b1; wr_inst = inst; wr_fold = 2'(f);
      for (int l = 0; l < 25; l++) wdata[l] = s[l][16*f +: 16];
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic check_state(input logic inst, input st_t s);
    st_t r;
    r = rho_st_ref(s);
    for (int f = 0; f < 4; f++) begin
      rd_inst = inst; rd_fold = 2'(f);
      #1;
      for (int l = 0; l < 25; l++) begin
        checks++;
        if (rdata[l] !== r[l][16*f +: 16]) begin
          failures++;
          if (failures < 10) $display("inst %0d lane %0d fold %0d: %h, expected %h",
                                      inst, l, f, rdata[l], r[l][16*f +: 16]);
        end
      end
    end
  endtask

  initial begin
    st_t s0, s1;
    for (int n = 0; n < 20; n++) begin
      s0 = rand_st();
      s1 = rand_st();
      write_state(1'b0, s0);
      check_state(1'b0, s0);
      write_state(1'b1, s1);
      check_state(1'b1, s1);
      check_state(1'b0, s0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
