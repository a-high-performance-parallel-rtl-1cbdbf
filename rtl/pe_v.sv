// pe_v - dual-variable processing element (PE-V) of the Chambolle ladder.
//
// For one matrix element per cycle it computes lines 4-8 of the Chambolle
// iteration:
//   Term1 = r_term - c_term            forward difference towards the right
//   Term2 = b_term - c_term            forward difference downwards
//   |grad| = sqrt(Term1^2 + Term2^2)   through sqrt_lut
//   px'   = (px + tau/theta * Term1) / (1 + tau/theta * |grad|)
//   py'   = (py + tau/theta * Term2) / (1 + tau/theta * |grad|)
// c_term, r_term and b_term are the Term values of the element, of its right
// neighbour and of the neighbour below. On the right edge (r_edge) Term1 is 0,
// on the bottom edge (b_edge) Term2 is 0, which keeps the dual variables of
// the last column/row at zero as in the usual Chambolle boundary treatment.
// The two forward differences run in parallel and the root comes from the
// table, as in the design. The divisions are a pipelined restoring divider
// (one quotient bit per stage) on magnitudes; a quotient of 1.0 or more is
// saturated to 1.0, which is the bound |p| <= 1 of the method. Divider,
// saturation and staging are this implementation's choice.
//
// Timing: PE_V_LAT = 12 register stages from inputs to px_new/py_new; the
// element's v is carried along for the write-back word.
module pe_v
  import chambolle_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  term_t  c_term,
  input  term_t  r_term,
  input  term_t  b_term,
  input  logic   r_edge,
  input  logic   b_edge,
  input  v_t     v,
  input  p_t     px,
  input  p_t     py,
  output logic   out_valid,
  output v_t     v_q,
  output p_t     px_new,
  output p_t     py_new
);

  localparam int unsigned NDIV = 7;           // quotient fraction bits = P_FRAC
  localparam int unsigned NUM_W = 29;         // signed numerator, K_FRAC fraction bits
  localparam int unsigned DW = 28;            // divider magnitude width

  typedef logic signed [T_W:0] diff_t;

  // valid pipeline
  logic [PE_V_LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[PE_V_LAT-2:0], in_valid};
  end
  assign out_valid = vld[PE_V_LAT-1];

  // v is only carried
  v_t v_pipe [PE_V_LAT];
  always_ff @(posedge clk) begin
    v_pipe[0] <= v;
    for (int i = 1; i < PE_V_LAT; i++) v_pipe[i] <= v_pipe[i-1];
  end
  assign v_q = v_pipe[PE_V_LAT-1];

  // stage 1: forward differences
  diff_t s1_t1, s1_t2;
  p_t    s1_px, s1_py;
  always_ff @(posedge clk) begin
    s1_t1 <= r_edge ? '0 : (T_W+1)'(r_term) - (T_W+1)'(c_term);
    s1_t2 <= b_edge ? '0 : (T_W+1)'(b_term) - (T_W+1)'(c_term);
    s1_px <= px;
    s1_py <= py;
  end

  // stage 2: squared magnitude (24.8) and numerators (K_FRAC fraction bits)
  logic signed [2*T_W+3:0] sq;
  logic signed [T_W+K_W+1:0] tx, ty;
  logic [SQ_IN_W-1:0]        s2_sq;
  logic signed [NUM_W-1:0]   s2_nx, s2_ny;
  always_comb begin
    sq = (2*T_W+4)'(s1_t1) * (2*T_W+4)'(s1_t1) + (2*T_W+4)'(s1_t2) * (2*T_W+4)'(s1_t2);
    tx = (T_W+K_W+2)'(s1_t1) * $signed({1'b0, TAU_THETA_Q});
    ty = (T_W+K_W+2)'(s1_t2) * $signed({1'b0, TAU_THETA_Q});
  end
  always_ff @(posedge clk) begin
    s2_sq <= SQ_IN_W'(sq >>> (2*T_FRAC - 8));
    s2_nx <= (NUM_W'(s1_px) <<< (K_FRAC - P_FRAC)) + NUM_W'(tx >>> T_FRAC);
    s2_ny <= (NUM_W'(s1_py) <<< (K_FRAC - P_FRAC)) + NUM_W'(ty >>> T_FRAC);
  end

  // stage 3: gradient magnitude
  logic [SQ_OUT_W-1:0] mag_d, s3_mag;
  logic signed [NUM_W-1:0] s3_nx, s3_ny;
  sqrt_lut u_sqrt (.x(s2_sq), .y(mag_d));
  always_ff @(posedge clk) begin
    s3_mag <= mag_d;
    s3_nx  <= s2_nx;
    s3_ny  <= s2_ny;
  end

  // stage 4: denominator 1 + tau/theta * |grad|
  logic [SQ_OUT_W+K_W-1:0] tm;
  logic [DW-1:0]           s4_den;
  logic signed [NUM_W-1:0] s4_nx, s4_ny;
  assign tm = (SQ_OUT_W+K_W)'(s3_mag) * (SQ_OUT_W+K_W)'(TAU_THETA_Q);
  always_ff @(posedge clk) begin
    s4_den <= (DW'(1) << K_FRAC) + DW'(tm >> 8);
    s4_nx  <= s3_nx;
    s4_ny  <= s3_ny;
  end

  // stages 5..12: magnitude/saturation, then one quotient bit per stage
  typedef struct packed {
    logic          neg;
    logic          sat;
    logic [DW-1:0] rem;
    logic [NDIV-1:0] q;
  } div_t;

  function automatic div_t div_start(logic signed [NUM_W-1:0] n, logic [DW-1:0] den);
    div_t d;
    logic [DW-1:0] mag;
    mag   = n[NUM_W-1] ? DW'(-n) : DW'(n);
    d.neg = n[NUM_W-1];
    d.sat = (mag >= den);
    d.rem = mag;
    d.q   = '0;
    return d;
  endfunction

  function automatic div_t div_step(div_t d, logic [DW-1:0] den, logic [2:0] bitpos);
    div_t o;
    logic [DW-1:0] r2;
    o  = d;
    r2 = d.rem << 1;
    if (r2 >= den) begin
      o.rem = r2 - den;
      o.q[bitpos] = 1'b1;
    end else begin
      o.rem = r2;
    end
    return o;
  endfunction

  function automatic p_t div_result(logic neg, logic sat, logic [NDIV-1:0] q);
    logic [P_W-1:0] mag;
    mag = sat ? P_W'(1 << P_FRAC) : P_W'(q);
    return neg ? -$signed(mag) : $signed(mag);
  endfunction

  div_t          dx [NDIV];
  div_t          dy [NDIV];
  logic [DW-1:0] dden [NDIV];

  // last quotient bit, combined with sign and saturation in the output stage
  logic [NDIV-1:0] qx_last, qy_last;
  always_comb begin
    qx_last = {dx[NDIV-1].q[NDIV-1:1], ((dx[NDIV-1].rem << 1) >= dden[NDIV-1])};
    qy_last = {dy[NDIV-1].q[NDIV-1:1], ((dy[NDIV-1].rem << 1) >= dden[NDIV-1])};
  end

  always_ff @(posedge clk) begin
    dx[0]   <= div_start(s4_nx, s4_den);
    dy[0]   <= div_start(s4_ny, s4_den);
    dden[0] <= s4_den;
    for (int i = 1; i < NDIV; i++) begin
      dx[i]   <= div_step(dx[i-1], dden[i-1], 3'(NDIV - i));
      dy[i]   <= div_step(dy[i-1], dden[i-1], 3'(NDIV - i));
      dden[i] <= dden[i-1];
    end
    px_new <= div_result(dx[NDIV-1].neg, dx[NDIV-1].sat, qx_last);
    py_new <= div_result(dy[NDIV-1].neg, dy[NDIV-1].sat, qy_last);
  end

endmodule
