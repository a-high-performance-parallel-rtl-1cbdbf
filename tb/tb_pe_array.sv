// tb_pe_array - the PE ladder alone, fed by a behavioural memory that plays
// the banks and the rotator: each cycle it presents the 8 lane words and
// positions of a ladder step and applies the PE-V write requests to its
// matrices. Three iterations on a 24 x 20 window (4 regions, so PE-V 1's
// BRAM-Term bridge is used between regions) are compared element by element
// with the reference: u of the last iteration and final px/py. The cycle at
// which each write request appears is checked against the 14-cycle
// Term+PE-V pipeline.
module tb_pe_array;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  localparam int ROWS = 24, COLS = 20, N_ITER = 3;
  localparam int REGIONS = (ROWS + 1 + NPE - 1) / NPE;
  localparam int STEPS = COLS + NPE - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t  lane_word [NPE+1];
  pos_t   lane_pos  [NPE+1];
  logic   last_iter = 0;
  wr_t    wr [NPE];
  u_out_t u_out [NPE];

  pe_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  window_ref ref_w;
  longint v [ROWS][COLS], px [ROWS][COLS], py [ROWS][COLS];
  int u_seen [ROWS][COLS];
  int checks = 0, failures = 0;
  int cyc = 0;
  int issue_cyc [ROWS][COLS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write-back and u monitor
  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int k = 0; k < NPE; k++) begin
      if (wr[k].valid) begin
        int r, c;
        r = int'(wr[k].row);
        c = int'(wr[k].col);
        // element (r,c) is finished by the PE-V one step after the PE-T
        // computing (r,c+1) - issued at step c+1+(k-1) for PE-V k > 1
        check(cyc - issue_cyc[r][c] == PE_T_LAT + PE_V_LAT + 1,
              $sformatf("write of (%0d,%0d) %0d cycles after its step", r, c, cyc - issue_cyc[r][c]));
        px[r][c] = longint'(wr[k].word.px);
        py[r][c] = longint'(wr[k].word.py);
        check(longint'(wr[k].word.v) == v[r][c], "v written back unchanged");
      end
      if (u_out[k].valid) begin
        int r, c;
        r = int'(u_out[k].row);
        c = int'(u_out[k].col);
        u_seen[r][c]++;
        check(longint'(u_out[k].u) == ref_w.u[r][c], $sformatf("u (%0d,%0d)", r, c));
      end
    end
  end

  task automatic present(bit sv, int r, int s);
    for (int j = 0; j <= NPE; j++) begin
      int row, col;
      row = NPE * r - 1 + j;
      col = (j == 0) ? s : s - (j - 1);
      lane_pos[j].row   = coord_t'(row);
      lane_pos[j].col   = coord_t'(col);
      lane_pos[j].valid = sv && row >= 0 && row < ROWS && col >= 0 && col < COLS;
      if (lane_pos[j].valid) begin
        lane_word[j] = make_word(v_t'(v[row][col]), p_t'(px[row][col]), p_t'(py[row][col]));
      end else begin
        lane_word[j] = word_t'($urandom);
      end
    end
    // the PE-V writing (row, col) is fed by this step: record its issue time
    // (the step in which the element's right neighbour's Term is issued)
    if (sv)
      for (int k = 1; k <= NPE; k++) begin
        int row, col;
        row = NPE * r + k - 2;
        col = (k == 1) ? s - 1 : s - k + 1;
        if (row >= 0 && row < ROWS && col >= 0 && col < COLS) issue_cyc[row][col] = cyc;
      end
  endtask

  initial begin
    ref_w = new(ROWS, COLS);
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        v[i][j]  = longint'($urandom_range(0, 4095)) - 2048;
        px[i][j] = longint'($urandom_range(0, 256)) - 128;
        py[i][j] = longint'($urandom_range(0, 256)) - 128;
        ref_w.v[i][j] = v[i][j]; ref_w.px[i][j] = px[i][j]; ref_w.py[i][j] = py[i][j];
        u_seen[i][j] = 0;
      end
    for (int n = 0; n < N_ITER; n++) ref_w.iterate();
    present(0, 0, 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < N_ITER; it++) begin
      for (int r = 0; r < REGIONS; r++)
        for (int s = 0; s < STEPS; s++) begin
          @(negedge clk);
          last_iter = (it == N_ITER - 1);
          present(1, r, s);
        end
      repeat (PE_ARR_LAT + 2) begin
        @(negedge clk);
        present(0, 0, 0);
      end
    end
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        check(px[i][j] == ref_w.px[i][j] && py[i][j] == ref_w.py[i][j],
              $sformatf("p (%0d,%0d) got %0d,%0d exp %0d,%0d", i, j, px[i][j], py[i][j],
                        ref_w.px[i][j], ref_w.py[i][j]));
        check(u_seen[i][j] == 1, "u reported once");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
