// tb_bram_sdp - random writes and reads on a 1012 x 32 bank: every read
// returns the last value written one cycle after the address, and a read of
// the address being written returns the old value.
module tb_bram_sdp;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we = 0;
  logic [9:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;

  bram_sdp dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [1012];
  bit          known [1012];

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_d;
    bit          exp_known;
    exp_known = 0;
    foreach (known[i]) known[i] = 0;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1) || n < 2000;
      waddr = 10'($urandom_range(0, 1011));
      wdata = $urandom;
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 10'($urandom_range(0, 1011));
      exp_known = known[raddr];
      exp_d = model[raddr];
      @(posedge clk);
      if (we) begin
        model[waddr] = wdata;
        known[waddr] = 1;
      end
      #1;
      if (exp_known) begin
        checks++;
        if (rdata !== exp_d) begin
          failures++;
          if (failures < 10) $display("FAIL: read %0d got %h exp %h", raddr, rdata, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
