// pe_t - Term processing element (PE-T) of the Chambolle ladder.
//
// For one matrix element per cycle it computes, following Algorithm 1 of the
// Chambolle iteration,
//   div p = (c_px - l_px) + (c_py - a_py)        backward differences
//   Term  = div p - v / theta
//   u     = v - theta * div p
// where c_px/c_py are the element's own dual variables, l_px is px of the left
// neighbour and a_py is py of the neighbour above (the caller feeds 0 on the
// left and top border). The two backward differences run in parallel, as in
// the design. Term is also delayed one more cycle as c_term, which the PE-V of
// the same row uses as its centre value. The element's v, px and py are
// carried along so the PE-V that updates this element receives them without a
// memory read.
//
// Timing: two register stages. Inputs valid in cycle n give term, u and the
// carried word in cycle n+2, and c_term in cycle n+3. Fixed-point formats are
// those of chambolle_pkg; the split into two stages is this implementation's
// choice.
module pe_t
  import chambolle_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  v_t     v,
  input  p_t     c_px,
  input  p_t     c_py,
  input  p_t     l_px,
  input  p_t     a_py,
  output logic   out_valid,
  output term_t  term,
  output term_t  c_term,
  output u_t     u,
  output v_t     v_q,
  output p_t     px_q,
  output p_t     py_q
);

  // stage 1
  logic                  s1_valid;
  logic signed [P_W:0]   s1_divx, s1_divy;
  logic signed [V_W+K_W:0] s1_vth;     // v / theta, V_FRAC + K_FRAC fraction bits
  v_t                    s1_v;
  p_t                    s1_px, s1_py;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_divx <= (P_W+1)'(c_px) - (P_W+1)'(l_px);
    s1_divy <= (P_W+1)'(c_py) - (P_W+1)'(a_py);
    s1_vth  <= (V_W+K_W+1)'(v) * $signed({1'b0, INV_THETA_Q});
    s1_v    <= v;
    s1_px   <= c_px;
    s1_py   <= c_py;
  end

  // stage 2
  logic signed [P_W+1:0]     divp;
  logic signed [P_W+K_W+2:0] theta_divp;  // P_FRAC + K_FRAC fraction bits
  term_t                     term_d;
  u_t                        u_d;

  always_comb begin
    divp       = (P_W+2)'(s1_divx) + (P_W+2)'(s1_divy);
    term_d     = T_W'(divp) - T_W'(s1_vth >>> (V_FRAC + K_FRAC - T_FRAC));
    theta_divp = (P_W+K_W+3)'(divp) * $signed({1'b0, THETA_Q});
    u_d        = U_W'(s1_v) - U_W'(theta_divp >>> (P_FRAC + K_FRAC - U_FRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    term   <= term_d;
    u      <= u_d;
    v_q    <= s1_v;
    px_q   <= s1_px;
    py_q   <= s1_py;
    c_term <= term;
  end

endmodule
