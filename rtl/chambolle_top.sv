// chambolle_top - parallel Chambolle core: one control unit and two sliding
// windows (SW1, SW2) working in parallel, each updating u1 and u2.
//
// The core runs n_iter iterations of the Chambolle fixed-point scheme on two
// 88 x 92 sub-matrices at once - 4 PE arrays, 28 PE-Ts and 28 PE-Vs, 36 BRAMs
// - computing 28 elements per cycle. Before a run the host writes each
// element's word {v, px, py} (see chambolle_pkg) through the host port
// (host_sel: bit 1 = window, bit 0 = component u1/u2); after the run it can
// read px/py back the same way. During the last iteration every element's
// u = v - theta * div p leaves on u_out[window*2 + component][lane], 7 lanes
// per array, tagged with its row and column in the window.
//
// start is accepted when idle with n_iter > 0; busy stays high until the last
// px/py write-back, then done pulses. The host port must only be used while
// busy is low; reads return one cycle after host_re. A run takes
// n_iter * (REGIONS*STEPS + DRAIN) cycles; at the default 88 x 92 size that is
// 13 regions x 98 steps + 18 = 1292 cycles per iteration. Moving the windows
// across a frame and the TV-L1 thresholding step between levels are left to
// the system around the core.
module chambolle_top
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 92
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] n_iter,
  output logic        busy,
  output logic        done,
  input  logic        host_we,
  input  logic        host_re,
  input  logic [1:0]  host_sel,
  input  coord_t      host_row,
  input  coord_t      host_col,
  input  word_t       host_wdata,
  output logic        host_rvalid,
  output word_t       host_rdata,
  output u_out_t      u_out [4][NPE]
);

  localparam int unsigned REGIONS = (ROWS + 1 + NPE - 1) / NPE;
  localparam int unsigned RW = $clog2(REGIONS + 1);
  localparam int unsigned SW = $clog2(COLS + NPE);

  logic          step_valid, last_iter;
  logic [RW-1:0] region;
  logic [SW-1:0] step;

  control_unit #(.ROWS(ROWS), .COLS(COLS)) u_cu (
    .clk, .rst_n, .start, .n_iter, .busy, .done,
    .step_valid, .last_iter, .region, .step
  );

  logic  sw_rvalid [2];
  word_t sw_rdata  [2];
  logic  win_q;

  for (genvar w = 0; w < 2; w++) begin : g_sw
    sliding_window #(.ROWS(ROWS), .COLS(COLS)) u_sw (
      .clk, .rst_n, .busy, .step_valid, .last_iter, .region, .step,
      .host_we    (host_we && host_sel[1] == 1'(w)),
      .host_re    (host_re && host_sel[1] == 1'(w)),
      .host_comp  (host_sel[0]),
      .host_row, .host_col, .host_wdata,
      .host_rvalid(sw_rvalid[w]),
      .host_rdata (sw_rdata[w]),
      .u1_out     (u_out[2*w]),
      .u2_out     (u_out[2*w+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_q <= 1'b0;
    else        win_q <= host_sel[1];
  end

  assign host_rvalid = sw_rvalid[0] || sw_rvalid[1];
  assign host_rdata  = sw_rdata[win_q];

endmodule
