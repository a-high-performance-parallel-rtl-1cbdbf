// tb_overlap_windows - the sliding-window decomposition on the whole core.
//
// A 24 x 32 frame (both flow components) is split into two overlapping
// 24 x 20 sub-matrices, columns 0..19 for SW1 and 12..31 for SW2, which run
// in parallel for N_ITER = 3 iterations with px = py = 0 at the start. An
// element's result depends on neighbours at most one element further away
// per iteration, so the elements more than N_ITER columns away from a cut
// edge (the profitable ones) must equal the result of iterating the whole
// frame at once. SW1 supplies frame columns 0..15 and SW2 columns 16..31; the
// assembled u and px/py are compared with the whole-frame reference. The
// test also counts the non-profitable elements that differ, showing the cut
// edges do disturb the rest of the window.
module tb_overlap_windows;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  localparam int ROWS = 24, COLS = 20, FCOLS = 32, OFF2 = 12, N_ITER = 3;
  localparam int SPLIT = 16;   // first frame column taken from SW2

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

  window_ref frame [2];               // whole frame, u1 and u2
  longint    hw_u [4][ROWS][COLS];
  int checks = 0, failures = 0, n_profitable = 0, n_disturbed = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n)
      for (int a = 0; a < 4; a++)
        for (int k = 0; k < NPE; k++)
          if (u_out[a][k].valid) hw_u[a][u_out[a][k].row][u_out[a][k].col] = longint'(u_out[a][k].u);

  // array a = window*2 + component; window w starts at frame column w*OFF2
  function automatic int fcol(int a, int j);
    return (a / 2) * OFF2 + j;
  endfunction

  initial begin
    for (int c = 0; c < 2; c++) begin
      frame[c] = new(ROWS, FCOLS);
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < FCOLS; j++) begin
          frame[c].v[i][j]  = longint'($urandom_range(0, 4095)) - 2048;
          frame[c].px[i][j] = 0;
          frame[c].py[i][j] = 0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int a = 0; a < 4; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          host_we    <= 1;
          host_sel   <= 2'(a);
          host_row   <= coord_t'(i);
          host_col   <= coord_t'(j);
          host_wdata <= make_word(v_t'(frame[a % 2].v[i][fcol(a, j)]), '0, '0);
          @(posedge clk);
        end
    host_we <= 0;
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < N_ITER; n++) frame[c].iterate();

    n_iter <= 16'(N_ITER);
    start  <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    wait (done);
    @(posedge clk);

    for (int a = 0; a < 4; a++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          int fc;
          bit profitable, same;
          fc = fcol(a, j);
          profitable = (a < 2) ? (fc < SPLIT) : (fc >= SPLIT);
          host_re  <= 1;
          host_sel <= 2'(a);
          host_row <= coord_t'(i);
          host_col <= coord_t'(j);
          @(posedge clk);
          host_re <= 0;
          @(posedge clk);
          same = hw_u[a][i][j] == frame[a % 2].u[i][fc] &&
                 longint'(host_rdata.px) == frame[a % 2].px[i][fc] &&
                 longint'(host_rdata.py) == frame[a % 2].py[i][fc];
          if (profitable) begin
            n_profitable++;
            check(same, $sformatf("array %0d frame element (%0d,%0d) differs from the whole-frame result", a, i, fc));
          end else if (!same) begin
            n_disturbed++;
          end
        end
    $display("profitable elements checked=%0d, non-profitable elements disturbed by the cut=%0d",
             n_profitable, n_disturbed);
    check(n_profitable == 2 * ROWS * FCOLS, "profitable areas cover the frame exactly once per component");
    check(n_disturbed > 0, "cut edges never disturbed a non-profitable element");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
