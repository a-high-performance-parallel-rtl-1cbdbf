// bram_sdp - simple dual-port block RAM: one write port, one synchronous
// read port, one clock.
//
// Each PE array uses eight of these, 1012 x 32 bit, to hold v, px and py of
// every eighth row of its 88 x 92 window, plus one more (BRAM-Term) that keeps
// the Term values of the last row of a region for the next region. The read
// port returns mem[raddr] one cycle after raddr is presented (read-first when
// the same address is written in that cycle). The contents are not reset;
// the window is loaded before a run. Written as an array so synthesis maps it
// onto block RAM.
module bram_sdp #(
  parameter int unsigned DEPTH = 1012,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
