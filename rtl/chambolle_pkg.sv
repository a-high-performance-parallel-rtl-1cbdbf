// chambolle_pkg - shared widths, fixed-point formats and types of the
// Chambolle core.
//
// Number formats (all two's complement, truncating arithmetic shifts):
//   v     13 bits, V_FRAC  = 5 fraction bits  (range +-128)
//   px/py  9 bits, P_FRAC  = 7 fraction bits  (range +-2, kept within +-1)
//   Term  18 bits, T_FRAC  = 7 fraction bits
//   u     16 bits, U_FRAC  = 5 fraction bits
//   theta, 1/theta, tau/theta: unsigned, K_FRAC = 12 fraction bits
// The 13/9/9-bit split of the 32-bit memory word follows the design; the
// fraction-bit positions and the constants theta = 0.3, tau = 0.25 are this
// implementation's choice.
//
// Memory word (32 bits, one per matrix element): {v[12:0], px[8:0], py[8:0], 1'b0}.
package chambolle_pkg;

  localparam int unsigned V_W    = 13;
  localparam int unsigned P_W    = 9;
  localparam int unsigned T_W    = 18;
  localparam int unsigned U_W    = 16;
  localparam int unsigned WORD_W = 32;

  localparam int unsigned V_FRAC = 5;
  localparam int unsigned P_FRAC = 7;
  localparam int unsigned T_FRAC = 7;
  localparam int unsigned U_FRAC = 5;
  localparam int unsigned K_FRAC = 12;
  localparam int unsigned K_W    = 16;

  // theta = 0.3, tau = 0.25 (Q4.12)
  localparam logic [K_W-1:0] THETA_Q      = 16'd1229;   // 0.3
  localparam logic [K_W-1:0] INV_THETA_Q  = 16'd13653;  // 1/0.3
  localparam logic [K_W-1:0] TAU_THETA_Q  = 16'd3413;   // 0.25/0.3

  // Square-root unit: 24.8 input, result with 8 fraction bits.
  localparam int unsigned SQ_IN_W  = 32;
  localparam int unsigned SQ_OUT_W = 20;

  // Ladder geometry.
  localparam int unsigned NPE   = 7;   // PE-Ts (and PE-Vs) per array
  localparam int unsigned NBANK = 8;   // row-interleaved BRAM banks per array

  // Pipeline depths (cycles).
  localparam int unsigned PE_T_LAT   = 2;   // rotator output -> Term
  localparam int unsigned PE_V_LAT   = 12;  // Term -> px/py result
  localparam int unsigned PE_ARR_LAT = PE_T_LAT + PE_V_LAT + 1; // + BRAM write = 15

  // Element coordinates inside a window (signed: the ladder also visits
  // positions just outside it, which are marked invalid).
  localparam int unsigned COORD_W = 12;
  typedef logic signed [COORD_W-1:0] coord_t;

  typedef logic signed [V_W-1:0] v_t;
  typedef logic signed [P_W-1:0] p_t;
  typedef logic signed [T_W-1:0] term_t;
  typedef logic signed [U_W-1:0] u_t;

  typedef struct packed {
    v_t   v;
    p_t   px;
    p_t   py;
    logic pad;
  } word_t;

  // Position of the element a ladder lane works on.
  typedef struct packed {
    logic   valid;
    coord_t row;
    coord_t col;
  } pos_t;

  // Result of a PE-V, to be written back to its bank.
  typedef struct packed {
    logic   valid;
    coord_t row;
    coord_t col;
    word_t  word;
  } wr_t;

  // u of one element, produced by a PE-T in the last iteration.
  typedef struct packed {
    logic   valid;
    coord_t row;
    coord_t col;
    u_t     u;
  } u_out_t;

  function automatic word_t make_word(v_t v, p_t px, p_t py);
    word_t w;
    w.v = v; w.px = px; w.py = py; w.pad = 1'b0;
    return w;
  endfunction

endpackage
