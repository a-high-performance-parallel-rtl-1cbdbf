// tb_chambolle_top - end-to-end test of the Chambolle core at a reduced
// window size (24 x 20: 4 regions of 7 rows, so the vertical rotation, the
// BRAM-Term bridge and the partial last region all occur).
//
// All four component engines (2 windows x u1/u2) are loaded through the host
// port with random v and with px/py either zero (as at the start of a level)
// or random. After N_ITER iterations the u stream of the last iteration and
// the px/py read back from the banks are compared with the reference model,
// element by element, and the run time is checked against
// N_ITER * (REGIONS * STEPS + DRAIN) cycles. The mechanisms the design names
// are counted and each must have happened at least once.
module tb_chambolle_top;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  localparam int ROWS   = 24;
  localparam int COLS   = 20;
  localparam int N_ITER = 6;
  localparam int REGIONS = (ROWS + 1 + NPE - 1) / NPE;
  localparam int STEPS   = COLS + NPE - 1;
  localparam int DRAIN   = 3 + PE_ARR_LAT;
  localparam int WATCHDOG = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [15:0] n_iter = 0;
  logic        busy, done;
  logic        host_we = 0, host_re = 0;
  logic [1:0]  host_sel = 0;
  coord_t      host_row = 0, host_col = 0;
  word_t       host_wdata = '0;
  logic        host_rvalid;
  word_t       host_rdata;
  u_out_t      u_out [4][NPE];

  chambolle_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  window_ref ref_w [4];
  int u_seen [4][ROWS][COLS];
  int cycles = 0, t_start = -1, t_done = -1;
  int run_cycles = -1;
  int n_bridge = 0, n_rot = 0, n_border = 0, n_iter_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter and u stream monitor
  logic [15:0] last_iter_cnt = 0;
  always @(posedge clk) begin
    cycles++;
    if (start) t_start = cycles;
    if (done && t_start >= 0 && run_cycles < 0) begin
      t_done = cycles;
      run_cycles = t_done - t_start;
    end
    if (dut.u_cu.step_valid && dut.u_cu.step == 0 && dut.u_cu.region != 0) n_rot++;
    if (dut.u_cu.step_valid && dut.u_cu.step == 0 && dut.u_cu.region == 0) n_iter_seen++;
    if (rst_n) for (int a = 0; a < 4; a++)
      for (int k = 0; k < NPE; k++)
        if (u_out[a][k].valid) begin
          int r, c;
          r = int'(u_out[a][k].row);
          c = int'(u_out[a][k].col);
          if (r < 0 || r >= ROWS || c < 0 || c >= COLS) begin
            check(0, $sformatf("u position out of window %0d,%0d", r, c));
          end else begin
            u_seen[a][r][c]++;
            check(longint'(u_out[a][k].u) == ref_w[a].u[r][c],
                  $sformatf("u arr %0d (%0d,%0d): got %0d exp %0d", a, r, c,
                            u_out[a][k].u, ref_w[a].u[r][c]));
          end
        end
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      ref_w[a] = new(ROWS, COLS);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          ref_w[a].v[i][j]  = longint'($signed($urandom_range(0, 4095))) - 2048;
          ref_w[a].px[i][j] = (a < 2) ? 0 : longint'($urandom_range(0, 256)) - 128;
          ref_w[a].py[i][j] = (a < 2) ? 0 : longint'($urandom_range(0, 256)) - 128;
          u_seen[a][i][j] = 0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // load the windows
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          host_we    <= 1;
          host_sel   <= 2'(a);
          host_row   <= coord_t'(i);
          host_col   <= coord_t'(j);
          host_wdata <= make_word(v_t'(ref_w[a].v[i][j]), p_t'(ref_w[a].px[i][j]),
                                  p_t'(ref_w[a].py[i][j]));
          @(posedge clk);
        end
    host_we <= 0;

    // read a few words back through the host port
    for (int a = 0; a < 4; a++) begin
      int i, j;
      i = $urandom_range(0, ROWS - 1);
      j = $urandom_range(0, COLS - 1);
      host_re  <= 1;
      host_sel <= 2'(a);
      host_row <= coord_t'(i);
      host_col <= coord_t'(j);
      @(posedge clk);
      host_re <= 0;
      @(posedge clk);
      check(host_rvalid && host_rdata.v == v_t'(ref_w[a].v[i][j]) &&
            host_rdata.px == p_t'(ref_w[a].px[i][j]), "host read-back before the run");
    end

    // reference
    for (int a = 0; a < 4; a++)
      for (int n = 0; n < N_ITER; n++) ref_w[a].iterate();
    check(n_sat > 0, "reference: divider saturation never occurred");
    check(n_shift > 0, "reference: square-root window never moved above bit 7");

    // run
    n_iter <= 16'(N_ITER);
    start  <= 1;
    @(posedge clk);
    start    <= 0;
    @(posedge clk);
    check(busy, "busy after start");
    wait (run_cycles >= 0);
    @(posedge clk);
    check(!busy, "idle after done");
    check(run_cycles == N_ITER * (REGIONS * STEPS + DRAIN) + 1,
          $sformatf("run took %0d cycles, expected %0d", run_cycles,
                    N_ITER * (REGIONS * STEPS + DRAIN) + 1));

    // done rises N_ITER*(REGIONS*STEPS+DRAIN) cycles after the edge that
    // accepts start; the monitor sees it one edge later, hence the +1.
    // every u reported exactly once
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          check(u_seen[a][i][j] == 1, $sformatf("u arr %0d (%0d,%0d) seen %0d times", a, i, j, u_seen[a][i][j]));

    // px/py read-back
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          host_re  <= 1;
          host_sel <= 2'(a);
          host_row <= coord_t'(i);
          host_col <= coord_t'(j);
          @(posedge clk);
          host_re <= 0;
          @(posedge clk);
          check(host_rvalid, "read valid");
          check(longint'(host_rdata.px) == ref_w[a].px[i][j] && longint'(host_rdata.py) == ref_w[a].py[i][j]
                && longint'(host_rdata.v) == ref_w[a].v[i][j],
                $sformatf("p arr %0d (%0d,%0d): got %0d,%0d exp %0d,%0d", a, i, j,
                          host_rdata.px, host_rdata.py, ref_w[a].px[i][j], ref_w[a].py[i][j]));
          if (i % NPE == NPE - 1) n_bridge++;
          if (i == 0 || j == 0 || i == ROWS - 1 || j == COLS - 1) n_border++;
        end

    $display("mechanisms: region rotations=%0d, iterations started=%0d, BRAM-Term bridged rows checked=%0d, border elements=%0d, divider saturations=%0d, shifted square roots=%0d",
             n_rot, n_iter_seen, n_bridge, n_border, n_sat, n_shift);
    check(n_rot > 0, "no region rotation happened");
    check(n_iter_seen == N_ITER, "iteration count");
    check(n_bridge > 0, "no BRAM-Term bridged row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
