// sqrt_lut - square root of a 24.8 fixed-point value from one 256-entry table.
//
// The gradient magnitude of the PE-V needs sqrt(Term1^2 + Term2^2). Instead of
// an iterative root, one 8-bit table is used. From the 32-bit input an 8-bit
// window is taken whose least significant bit sits on an even bit position
// 2k (counting from the right, from 0) and whose most significant bit is the
// leading one or the zero just above it. With m the window's value, the input
// is close to m * 4^k, so its root is sqrt(m) * 2^k: the table entry for m,
// shifted left by k. The bits below the window are dropped. This windowing
// and the single 256-entry table follow the design; the table contents,
// round(16 * sqrt(m)) saturated at 255 (4 fraction bits), are this
// implementation's choice. Input values below 256 use the window [7:0], k = 0.
//
// Interface: x is 24.8 fixed point; y = sqrt(x) with 8 fraction bits
// (20 bits: 12 integer, 8 fraction). Purely combinational; the PE-V registers
// the result.
module sqrt_lut
  import chambolle_pkg::*;
(
  input  logic [SQ_IN_W-1:0]  x,
  output logic [SQ_OUT_W-1:0] y
);

  // round(sqrt(n)) for n < 2^16
  function automatic logic [7:0] root_entry(int unsigned m);
    int unsigned n, r;
    n = m * 256;
    r = 0;
    while ((r + 1) * (r + 1) <= n) r++;
    if (n - r * r > r) r++;
    if (r > 255) r = 255;
    return r[7:0];
  endfunction

  function automatic logic [255:0][7:0] build_table();
    logic [255:0][7:0] t;
    for (int unsigned m = 0; m < 256; m++) t[m] = root_entry(m);
    return t;
  endfunction

  localparam logic [255:0][7:0] ROOT_TABLE = build_table();

  logic [4:0] lead;    // position of the leading one
  logic [4:0] top;     // window MSB position (odd, >= 7)
  logic [3:0] k;       // window LSB position / 2
  logic [7:0] m;

  always_comb begin
    lead = '0;
    for (int i = 0; i < SQ_IN_W; i++)
      if (x[i]) lead = 5'(i);
    top = lead | 5'd1;
    if (top < 5'd7) top = 5'd7;
    k = 4'((top - 5'd7) >> 1);
    m = 8'(x >> (top - 5'd7));
    y = SQ_OUT_W'({12'd0, ROOT_TABLE[m]} << k);
  end

endmodule
