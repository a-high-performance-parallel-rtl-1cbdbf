// chambolle_ref_pkg - reference model of the Chambolle core for the
// testbenches.
//
// Written as plain whole-matrix arithmetic on 64-bit integers, in the order of
// the algorithm (all Terms of an iteration first, then all px/py), with the
// number formats of chambolle_pkg. The square root uses real arithmetic for
// the table entry and a search over k for the window, the division uses an
// integer divide, so the checks do not share code with the RTL's ladder,
// leading-one detector or restoring divider.
package chambolle_ref_pkg;
  import chambolle_pkg::*;

  // sign-extend the low w bits of x
  function automatic longint sx(longint x, int w);
    longint m;
    m = (longint'(1) << w) - 1;
    x = x & m;
    if (x >= (longint'(1) << (w - 1))) x = x - (longint'(1) << w);
    return x;
  endfunction

  // statistics the testbenches report
  int unsigned n_sat;      // divider saturated at |p| = 1
  int unsigned n_shift;    // square root window above bit 7 (k > 0)

  function automatic longint sqrt_ref(longint x);
    int k;
    longint m, e;
    k = 0;
    while (x >= (longint'(1) << (2 * k + 8))) k++;
    if (k > 0) n_shift++;
    m = x >> (2 * k);
    e = longint'($rtoi(16.0 * $sqrt(real'(m)) + 0.5));
    if (e > 255) e = 255;
    return e << k;
  endfunction

  function automatic longint term_ref(longint v, longint cpx, longint lpx, longint cpy, longint apy);
    longint divp, vth;
    divp = (cpx - lpx) + (cpy - apy);
    vth  = v * longint'(INV_THETA_Q);
    return sx(divp - (vth >>> (V_FRAC + K_FRAC - T_FRAC)), T_W);
  endfunction

  function automatic longint u_ref(longint v, longint cpx, longint lpx, longint cpy, longint apy);
    longint divp;
    divp = (cpx - lpx) + (cpy - apy);
    return sx(v - sx((divp * longint'(THETA_Q)) >>> (P_FRAC + K_FRAC - U_FRAC), U_W), U_W);
  endfunction

  function automatic longint quot_ref(longint n, longint den);
    longint a, q;
    a = (n < 0) ? -n : n;
    if (a >= den) begin
      n_sat++;
      q = 128;
    end else begin
      q = (a * 128) / den;
    end
    return (n < 0) ? -q : q;
  endfunction

  // new (px, py) of one element from the three Terms
  function automatic void pev_ref(longint c, longint r, longint b, bit redge, bit bedge,
                                  longint px, longint py, output longint pxn, output longint pyn);
    longint t1, t2, sq, mag, den, nx, ny;
    t1  = redge ? 0 : r - c;
    t2  = bedge ? 0 : b - c;
    sq  = (t1 * t1 + t2 * t2) >>> (2 * T_FRAC - 8);
    mag = sqrt_ref(sq);
    den = 4096 + ((mag * longint'(TAU_THETA_Q)) >> 8);
    nx  = px * 32 + ((t1 * longint'(TAU_THETA_Q)) >>> T_FRAC);
    ny  = py * 32 + ((t2 * longint'(TAU_THETA_Q)) >>> T_FRAC);
    pxn = quot_ref(nx, den);
    pyn = quot_ref(ny, den);
  endfunction

  // One window, one component.
  class window_ref;
    int rows, cols;
    longint v  [][];
    longint px [][];
    longint py [][];
    longint u  [][];

    function new(int rows, int cols);
      this.rows = rows;
      this.cols = cols;
      v  = new[rows]; px = new[rows]; py = new[rows]; u = new[rows];
      foreach (v[i]) begin
        v[i] = new[cols]; px[i] = new[cols]; py[i] = new[cols]; u[i] = new[cols];
      end
    endfunction

    function void iterate();
      longint t [][];
      longint npx, npy;
      t = new[rows];
      foreach (t[i]) t[i] = new[cols];
      for (int i = 0; i < rows; i++)
        for (int j = 0; j < cols; j++) begin
          longint lpx, apy;
          lpx = (j == 0) ? 0 : px[i][j-1];
          apy = (i == 0) ? 0 : py[i-1][j];
          t[i][j] = term_ref(v[i][j], px[i][j], lpx, py[i][j], apy);
          u[i][j] = u_ref(v[i][j], px[i][j], lpx, py[i][j], apy);
        end
      for (int i = 0; i < rows; i++)
        for (int j = 0; j < cols; j++) begin
          pev_ref(t[i][j], (j + 1 < cols) ? t[i][j+1] : 0, (i + 1 < rows) ? t[i+1][j] : 0,
                  j == cols - 1, i == rows - 1, px[i][j], py[i][j], npx, npy);
          px[i][j] = npx;
          py[i][j] = npy;
        end
    endfunction
  endclass

endpackage
