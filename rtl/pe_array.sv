// pe_array - ladder of 7 PE-Ts and 7 PE-Vs with operand reuse.
//
// The array works on one region (7 rows) of the window at a time. At ladder
// step s, PE-T k (k = 1..7) computes Term of row 7*region+k-1, column
// s-(k-1): each row lags the row above by one column. Operands:
//   c_px, c_py  from the row's bank (rotator lane k);
//   l_px        the c_px this PE-T read in the previous step (0 in column 0);
//   a_py        PE-T 1: py of the row above the region (rotator lane 0),
//               0 on the top row; PE-T k > 1: the c_py PE-T k-1 read in the
//               previous step, which is the element right above.
// So the PE-Ts read 15 values per step instead of 28.
//
// Because of the skew, when PE-T k-1 produces Term(i, c+1), PE-T k produces
// Term(i+1, c) in the same cycle; with the Term of (i, c) from the cycle
// before (c_term) these are the three Terms PE-V k needs to update px/py of
// (i, c), i = 7*region+k-2. No memory is read for them. PE-V 1 handles the
// last row of the previous region (7*region-1): its centre/right Terms were
// produced by PE-T 7 during the previous region and kept in BRAM-Term
// (written by PE-T 7, read back one step ahead of use), its lower Term is
// PE-T 1's c_term, and its old px/py/v come from the lane-0 read of PE-T 1.
// PE-V k > 1 takes the old px/py/v of its element from PE-T k-1's carried
// word. The ladder, the reuse and BRAM-Term follow the design; the
// assignment of PE-V 1 to the previous region's last row follows its text.
//
// Timing (relative to the rotator output): Term and u after 2 cycles, new
// px/py after 2 + 12 = 14 cycles, registered into the banks by the rotator in
// cycle 15. u is reported only in the last iteration.
module pe_array
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 92,
  localparam int unsigned TAW = $clog2(COLS)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  word_t  lane_word [NPE+1],
  input  pos_t   lane_pos  [NPE+1],
  input  logic   last_iter,
  output wr_t    wr    [NPE],
  output u_out_t u_out [NPE]
);

  // ---- operand reuse registers (one step back) --------------------------
  p_t prev_px [NPE];
  p_t prev_py [NPE];
  always_ff @(posedge clk) begin
    for (int k = 0; k < NPE; k++) begin
      prev_px[k] <= lane_word[k+1].px;
      prev_py[k] <= lane_word[k+1].py;
    end
  end

  p_t l_px [NPE];
  p_t a_py [NPE];
  always_comb begin
    for (int k = 0; k < NPE; k++) begin
      l_px[k] = (lane_pos[k+1].col == 0) ? '0 : prev_px[k];
      if (k == 0) a_py[k] = lane_pos[0].valid ? lane_word[0].py : '0;
      else        a_py[k] = prev_py[k-1];
    end
  end

  // ---- PE-Ts -----------------------------------------------------------
  logic  t_valid [NPE];
  term_t t_term [NPE], t_cterm [NPE];
  u_t    t_u [NPE];
  v_t    t_v [NPE];
  p_t    t_px [NPE], t_py [NPE];

  for (genvar k = 0; k < NPE; k++) begin : g_pet
    pe_t u_pet (
      .clk, .rst_n,
      .in_valid (lane_pos[k+1].valid),
      .v        (lane_word[k+1].v),
      .c_px     (lane_word[k+1].px),
      .c_py     (lane_word[k+1].py),
      .l_px     (l_px[k]),
      .a_py     (a_py[k]),
      .out_valid(t_valid[k]),
      .term     (t_term[k]),
      .c_term   (t_cterm[k]),
      .u        (t_u[k]),
      .v_q      (t_v[k]),
      .px_q     (t_px[k]),
      .py_q     (t_py[k])
    );
  end

  // positions and flags alongside the PE-T pipeline
  pos_t  pos1 [NPE+1], pos2 [NPE+1];
  v_t    w0_v  [3];                   // lane 0 word, delayed to stage 3
  p_t    w0_px [3], w0_py [3];
  logic  last1, last2;
  v_t    cv [NPE];                    // carried word, one step back
  p_t    cpx [NPE], cpy [NPE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= NPE; j++) begin
        pos1[j] <= '0;
        pos2[j] <= '0;
      end
      last1 <= 1'b0;
      last2 <= 1'b0;
    end else begin
      for (int j = 0; j <= NPE; j++) begin
        pos1[j] <= lane_pos[j];
        pos2[j] <= pos1[j];
      end
      last1 <= last_iter;
      last2 <= last1;
    end
  end

  always_ff @(posedge clk) begin
    w0_v[0]  <= lane_word[0].v;
    w0_px[0] <= lane_word[0].px;
    w0_py[0] <= lane_word[0].py;
    for (int i = 1; i < 3; i++) begin
      w0_v[i]  <= w0_v[i-1];
      w0_px[i] <= w0_px[i-1];
      w0_py[i] <= w0_py[i-1];
    end
    for (int k = 0; k < NPE; k++) begin
      cv[k]  <= t_v[k];
      cpx[k] <= t_px[k];
      cpy[k] <= t_py[k];
    end
  end

  // ---- BRAM-Term: Term of the region's last row, for the next region ----
  term_t bt_rdata, bt_prev;
  logic [TAW-1:0] bt_raddr;

  assign bt_raddr = (pos1[1].col >= 0 && pos1[1].col < coord_t'(COLS)) ? TAW'(pos1[1].col) : '0;

  bram_sdp #(.DEPTH(COLS), .WIDTH(T_W)) u_bram_term (
    .clk,
    .we    (pos2[NPE].valid),
    .waddr (TAW'(pos2[NPE].col)),
    .wdata (t_term[NPE-1]),
    .raddr (bt_raddr),
    .rdata (bt_rdata)
  );

  always_ff @(posedge clk) bt_prev <= bt_rdata;

  // ---- PE-Vs -----------------------------------------------------------
  coord_t vrow [NPE], vcol [NPE];
  logic   vin  [NPE];
  term_t  vc [NPE], vr [NPE], vb [NPE];
  v_t     vv [NPE];
  p_t     vpx [NPE], vpy [NPE];

  always_comb begin
    for (int k = 0; k < NPE; k++) begin
      vrow[k] = pos2[k+1].row - 1;
      if (k == 0) begin
        vcol[k] = pos2[1].col - 1;
        vc[k]   = bt_prev;
        vr[k]   = bt_rdata;
        vb[k]   = t_cterm[0];
        vv[k]   = w0_v[2];
        vpx[k]  = w0_px[2];
        vpy[k]  = w0_py[2];
      end else begin
        vcol[k] = pos2[k+1].col;
        vc[k]   = t_cterm[k-1];
        vr[k]   = t_term[k-1];
        vb[k]   = t_term[k];
        vv[k]   = cv[k-1];
        vpx[k]  = cpx[k-1];
        vpy[k]  = cpy[k-1];
      end
      vin[k] = vrow[k] >= 0 && vrow[k] < coord_t'(ROWS) && vcol[k] >= 0 && vcol[k] < coord_t'(COLS);
    end
  end

  logic  v_valid [NPE];
  v_t    v_v [NPE];
  p_t    v_px [NPE], v_py [NPE];
  coord_t wrow_pipe [NPE][PE_V_LAT];
  coord_t wcol_pipe [NPE][PE_V_LAT];

  for (genvar k = 0; k < NPE; k++) begin : g_pev
    pe_v u_pev (
      .clk, .rst_n,
      .in_valid (vin[k]),
      .c_term   (vc[k]),
      .r_term   (vr[k]),
      .b_term   (vb[k]),
      .r_edge   (vcol[k] == coord_t'(COLS - 1)),
      .b_edge   (vrow[k] == coord_t'(ROWS - 1)),
      .v        (vv[k]),
      .px       (vpx[k]),
      .py       (vpy[k]),
      .out_valid(v_valid[k]),
      .v_q      (v_v[k]),
      .px_new   (v_px[k]),
      .py_new   (v_py[k])
    );

    always_ff @(posedge clk) begin
      wrow_pipe[k][0] <= vrow[k];
      wcol_pipe[k][0] <= vcol[k];
      for (int i = 1; i < PE_V_LAT; i++) begin
        wrow_pipe[k][i] <= wrow_pipe[k][i-1];
        wcol_pipe[k][i] <= wcol_pipe[k][i-1];
      end
    end

    always_comb begin
      wr[k].valid = v_valid[k];
      wr[k].row   = wrow_pipe[k][PE_V_LAT-1];
      wr[k].col   = wcol_pipe[k][PE_V_LAT-1];
      wr[k].word  = make_word(v_v[k], v_px[k], v_py[k]);
      u_out[k].valid = t_valid[k] && last2;
      u_out[k].row   = pos2[k+1].row;
      u_out[k].col   = pos2[k+1].col;
      u_out[k].u     = t_u[k];
    end
  end

endmodule
