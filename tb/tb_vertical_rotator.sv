// tb_vertical_rotator - the rotator against behavioural banks filled with a
// word that encodes each element's row and column. For every region/step
// (all of them, plus idle cycles) it checks, two cycles later, that lane 0
// carries the row above the region at PE-T 1's column and lane k the element
// of PE-T k, with the right valid flag, and that the banks were addressed so
// the word matches. On the write side it sends 7 results for consecutive rows
// and checks each lands in bank row mod 8 at (row div 8)*COLS + col one cycle
// later.
module tb_vertical_rotator;
  import chambolle_pkg::*;

  localparam int ROWS = 88, COLS = 92;
  localparam int REGIONS = (ROWS + 1 + NPE - 1) / NPE;
  localparam int STEPS = COLS + NPE - 1;
  localparam int DEPTH = ((ROWS + NBANK - 1) / NBANK) * COLS;
  localparam int AW = $clog2(DEPTH);
  localparam int RW = $clog2(REGIONS + 1);
  localparam int SW = $clog2(COLS + NPE);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          step_valid = 0;
  logic [RW-1:0] region = 0;
  logic [SW-1:0] step = 0;
  logic [AW-1:0] raddr [NBANK];
  word_t         rdata [NBANK];
  word_t         lane_word [NPE+1];
  pos_t          lane_pos  [NPE+1];
  wr_t           wr [NPE];
  logic          bwe [NBANK];
  logic [AW-1:0] bwaddr [NBANK];
  word_t         bwdata [NBANK];

  vertical_rotator dut (.*);

  word_t mem [NBANK][DEPTH];
  always_ff @(posedge clk)
    for (int b = 0; b < NBANK; b++) rdata[b] <= mem[b][raddr[b]];

  function automatic word_t tag(int row, int col);
    return make_word(v_t'(row * 64 + col), p_t'(col), p_t'(row));
  endfunction

  int checks = 0, failures = 0;
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

  // expected lane contents, two cycles after the step
  typedef struct { bit sv; int r; int s; } stp_t;
  stp_t hist [$];

  always @(posedge clk) begin
    #1;
    if (hist.size() == 2) begin
      stp_t h;
      h = hist.pop_front();
      for (int j = 0; j <= NPE; j++) begin
        int row, col;
        bit val;
        row = NPE * h.r - 1 + j;
        col = (j == 0) ? h.s : h.s - (j - 1);
        val = h.sv && row >= 0 && row < ROWS && col >= 0 && col < COLS;
        check(lane_pos[j].valid == val, $sformatf("lane %0d valid r%0d s%0d", j, h.r, h.s));
        if (val) begin
          check(int'(lane_pos[j].row) == row && int'(lane_pos[j].col) == col, "lane position");
          check(lane_word[j] == tag(row, col), $sformatf("lane %0d word at (%0d,%0d)", j, row, col));
        end
      end
    end
  end

  initial begin
    int n_wr;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) mem[i % NBANK][(i / NBANK) * COLS + j] = tag(i, j);
    for (int k = 0; k < NPE; k++) wr[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // read side: full sweep with idle cycles between regions
    for (int r = 0; r < REGIONS; r++) begin
      for (int s = 0; s < STEPS; s++) begin
        @(negedge clk);
        step_valid = 1; region = RW'(r); step = SW'(s);
        hist.push_back('{1, r, s});
      end
      @(negedge clk);
      step_valid = 0;
      hist.push_back('{0, r, 0});
    end
    repeat (4) begin
      @(negedge clk);
      hist.push_back('{0, 0, 0});
    end
    @(negedge clk);
    hist.delete();
    // write side
    n_wr = 0;
    for (int n = 0; n < 300; n++) begin
      int base;
      int cols [NPE];
      @(negedge clk);
      base = $urandom_range(0, ROWS - NPE);
      for (int k = 0; k < NPE; k++) begin
        cols[k]       = $urandom_range(0, COLS - 1);
        wr[k].valid   = ($urandom_range(0, 3) != 0);
        wr[k].row     = coord_t'(base + k);
        wr[k].col     = coord_t'(cols[k]);
        wr[k].word    = word_t'($urandom);
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < NPE; k++) begin
        int b;
        b = (base + k) % NBANK;
        check(bwe[b] == wr[k].valid, "write enable of the row's bank");
        if (wr[k].valid) begin
          n_wr++;
          check(int'(bwaddr[b]) == ((base + k) / NBANK) * COLS + cols[k] && bwdata[b] == wr[k].word,
                "write address/data");
        end
      end
      check(bwe[(base + NPE) % NBANK] == 0, "no write to the eighth bank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
