// tb_control_unit - checks the sweep order of the control unit cycle by
// cycle: for each iteration, REGIONS x STEPS consecutive steps (region-major),
// then DRAIN idle cycles; last_iter only in the final iteration; busy from the
// start edge until done; done exactly once, after n_iter*(REGIONS*STEPS+DRAIN)
// cycles. A start with n_iter = 0 is ignored.
module tb_control_unit;
  import chambolle_pkg::*;

  localparam int ROWS = 22, COLS = 9;
  localparam int REGIONS = (ROWS + 1 + NPE - 1) / NPE;   // 4
  localparam int STEPS = COLS + NPE - 1;                 // 15
  localparam int DRAIN = 3 + PE_ARR_LAT;
  localparam int RW = $clog2(REGIONS + 1);
  localparam int SW = $clog2(STEPS + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [15:0] n_iter = 0;
  logic busy, done, step_valid, last_iter;
  logic [RW-1:0] region;
  logic [SW-1:0] step;

  control_unit #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    n_iter <= 16'(n);
    start  <= 1;
    @(posedge clk);
    start <= 0;
    for (int it = 0; it < n; it++) begin
      for (int r = 0; r < REGIONS; r++)
        for (int s = 0; s < STEPS; s++) begin
          @(posedge clk);
          #1;
          check(busy && step_valid && int'(region) == r && int'(step) == s && !done,
                $sformatf("iter %0d: expected step r%0d s%0d, got valid=%0d r%0d s%0d", it, r, s,
                          step_valid, region, step));
          check(last_iter == (it == n - 1), "last_iter");
        end
      for (int d = 0; d < DRAIN; d++) begin
        @(posedge clk);
        #1;
        check(!step_valid, "no step during drain");
        check(done == (it == n - 1 && d == DRAIN - 1), $sformatf("done at drain cycle %0d", d));
      end
    end
    check(!busy, "idle after done");
    @(posedge clk);
    #1;
    check(!done, "done is one pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!busy && !step_valid, "idle after reset");
    // n_iter = 0 is ignored
    n_iter <= 0;
    start  <= 1;
    @(posedge clk);
    start <= 0;
    repeat (3) @(posedge clk);
    #1;
    check(!busy && !step_valid, "start with zero iterations ignored");
    run(1);
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
