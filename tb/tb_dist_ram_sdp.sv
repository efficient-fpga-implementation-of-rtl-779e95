// tb_dist_ram_sdp: random writes and reads of the 16 x 16 simple dual port
// RAM against an array model; the read port is asynchronous, so a word
// written on an edge is visible right after it.
module tb_dist_ram_sdp;
  logic        clk = 1'b0;
  logic        we;
  logic [3:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  dist_ram_sdp #(.WIDTH(16), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wdata = 16'($urandom); raddr = 4'(a);
      model[a] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) failures++;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = 16'($urandom); raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("addr %0d: %h, expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
