// tb_component_engine - one component engine (8 banks, rotator, PE array)
// driven by the control unit on a 22 x 16 window: loaded through the host
// port with random v, px and py, five iterations, then the u stream of the
// last iteration and the px/py read back from the banks are compared with the
// reference for every element; the host port is also checked before the run.
module tb_component_engine;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  localparam int ROWS   = 22;
  localparam int COLS   = 16;
  localparam int N_ITER = 5;
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
  localparam int NA = 1;

  localparam int RW = $clog2(REGIONS + 1);
  localparam int SW = $clog2(COLS + NPE);
  logic          step_valid, last_iter;
  logic [RW-1:0] region;
  logic [SW-1:0] step;
  u_out_t        u1_out [NPE], u2_out [NPE];

  control_unit #(.ROWS(ROWS), .COLS(COLS)) u_cu (.*);
  component_engine #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .busy, .step_valid, .last_iter, .region, .step,
    .host_we, .host_re, .host_row, .host_col, .host_wdata,
    .host_rvalid, .host_rdata, .u_out(u1_out));
  assign u2_out = u1_out;
  always_comb
    for (int k = 0; k < NPE; k++) begin
      u_out[0][k] = u1_out[k];
      u_out[1][k] = u2_out[k];
      u_out[2][k] = '0;
      u_out[3][k] = '0;
    end

  int checks = 0, failures = 0;
  window_ref ref_w [NA];
  int u_seen [NA][ROWS][COLS];
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
    if (u_cu.step_valid && u_cu.step == 0 && u_cu.region != 0) n_rot++;
    if (u_cu.step_valid && u_cu.step == 0 && u_cu.region == 0) n_iter_seen++;
    if (rst_n) for (int a = 0; a < NA; a++)
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
    for (int a = 0; a < NA; a++) begin
      ref_w[a] = new(ROWS, COLS);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          ref_w[a].v[i][j]  = longint'($signed($urandom_range(0, 4095))) - 2048;
          ref_w[a].px[i][j] =  longint'($urandom_range(0, 256)) - 128;
          ref_w[a].py[i][j] =  longint'($urandom_range(0, 256)) - 128;
          u_seen[a][i][j] = 0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // load the windows
    for (int a = 0; a < NA; a++)
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
    for (int a = 0; a < NA; a++) begin
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
    for (int a = 0; a < NA; a++)
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
    for (int a = 0; a < NA; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          check(u_seen[a][i][j] == 1, $sformatf("u arr %0d (%0d,%0d) seen %0d times", a, i, j, u_seen[a][i][j]));

    // px/py read-back
    for (int a = 0; a < NA; a++)
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
