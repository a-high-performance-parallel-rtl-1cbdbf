// sliding_window - one sliding window (SW) of the Chambolle core.
//
// A window holds one 88 x 92 sub-matrix of the frame and updates both
// components of the flow on it at once: one component engine for u1
// (with v1, px_u1, py_u1) and one for u2 (v2, px_u2, py_u2). The two engines
// share the control unit's step, so each cycle the window works on 7 elements
// of u1 and 7 of u2. The host port addresses one engine through host_comp
// (0 = u1, 1 = u2); reads return the word one cycle later. This pairing
// follows the design; the host port is this implementation's choice.
module sliding_window
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 92,
  localparam int unsigned RW = $clog2((ROWS + 1 + NPE - 1) / NPE + 1),
  localparam int unsigned SW = $clog2(COLS + NPE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          busy,
  input  logic          step_valid,
  input  logic          last_iter,
  input  logic [RW-1:0] region,
  input  logic [SW-1:0] step,
  input  logic          host_we,
  input  logic          host_re,
  input  logic          host_comp,
  input  coord_t        host_row,
  input  coord_t        host_col,
  input  word_t         host_wdata,
  output logic          host_rvalid,
  output word_t         host_rdata,
  output u_out_t        u1_out [NPE],
  output u_out_t        u2_out [NPE]
);

  logic  rvalid [2];
  word_t rdata  [2];
  logic  comp_q;

  component_engine #(.ROWS(ROWS), .COLS(COLS)) u_comp1 (
    .clk, .rst_n, .busy, .step_valid, .last_iter, .region, .step,
    .host_we    (host_we && !host_comp),
    .host_re    (host_re && !host_comp),
    .host_row, .host_col, .host_wdata,
    .host_rvalid(rvalid[0]),
    .host_rdata (rdata[0]),
    .u_out      (u1_out)
  );

  component_engine #(.ROWS(ROWS), .COLS(COLS)) u_comp2 (
    .clk, .rst_n, .busy, .step_valid, .last_iter, .region, .step,
    .host_we    (host_we && host_comp),
    .host_re    (host_re && host_comp),
    .host_row, .host_col, .host_wdata,
    .host_rvalid(rvalid[1]),
    .host_rdata (rdata[1]),
    .u_out      (u2_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) comp_q <= 1'b0;
    else        comp_q <= host_comp;
  end

  assign host_rvalid = rvalid[0] || rvalid[1];
  assign host_rdata  = rdata[comp_q];

endmodule
