// component_engine - everything that computes one component of u in one
// sliding window (e.g. u1 of SW1): eight row-interleaved BRAM banks holding
// v, px and py of the 88 x 92 window, the vertical rotator, and the PE array
// with its BRAM-Term.
//
// While the control unit runs (busy), the rotator owns the bank ports: read
// ports feed the PE-Ts, write ports take the PE-V results, so px/py are
// overwritten in place iteration after iteration. While idle, the host port
// owns them: host writes store a full word {v, px, py} at (row, col) - this
// is how a window is initialised - and host reads return the word at
// (row, col) one cycle later. Row i is in bank i mod 8, address
// (i div 8)*COLS + col. The host port and its timing are this
// implementation's choice; the banks, rotator and array follow the design.
//
// u of every element is streamed out on u_out (7 lanes) during the last
// iteration, 4 cycles after the step appears on the control unit's outputs
// (bank read, rotator, two PE-T stages); the new px/py reach the bank write
// ports 15 cycles after the rotator output.
module component_engine
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 92,
  localparam int unsigned DEPTH = ((ROWS + NBANK - 1) / NBANK) * COLS,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned RW = $clog2((ROWS + 1 + NPE - 1) / NPE + 1),
  localparam int unsigned SW = $clog2(COLS + NPE)
) (
  input  logic          clk,
  input  logic          rst_n,
  // control unit
  input  logic          busy,
  input  logic          step_valid,
  input  logic          last_iter,
  input  logic [RW-1:0] region,
  input  logic [SW-1:0] step,
  // host access (only while not busy)
  input  logic          host_we,
  input  logic          host_re,
  input  coord_t        host_row,
  input  coord_t        host_col,
  input  word_t         host_wdata,
  output logic          host_rvalid,
  output word_t         host_rdata,
  // results
  output u_out_t        u_out [NPE]
);

  logic [AW-1:0] rot_raddr [NBANK];
  word_t         rdata     [NBANK];
  logic          rot_we    [NBANK];
  logic [AW-1:0] rot_waddr [NBANK];
  word_t         rot_wdata [NBANK];
  word_t         lane_word [NPE+1];
  pos_t          lane_pos  [NPE+1];
  wr_t           wr        [NPE];

  vertical_rotator #(.ROWS(ROWS), .COLS(COLS)) u_rot (
    .clk, .rst_n,
    .step_valid, .region, .step,
    .raddr (rot_raddr),
    .rdata (rdata),
    .lane_word, .lane_pos,
    .wr,
    .bwe    (rot_we),
    .bwaddr (rot_waddr),
    .bwdata (rot_wdata)
  );

  logic last_d1, last_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_d1 <= 1'b0;
      last_d2 <= 1'b0;
    end else begin
      last_d1 <= last_iter;
      last_d2 <= last_d1;
    end
  end

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_arr (
    .clk, .rst_n,
    .lane_word, .lane_pos,
    .last_iter (last_d2),
    .wr,
    .u_out
  );

  // ---- banks with host access -------------------------------------------
  logic [AW-1:0] host_addr;
  logic [2:0]    host_bank, host_bank_q;

  assign host_addr = AW'(32'(unsigned'(host_row >>> 3)) * COLS + 32'(unsigned'(host_col)));
  assign host_bank = host_row[2:0];

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic          we;
    logic [AW-1:0] waddr, raddr;
    word_t         wdata;
    always_comb begin
      if (busy) begin
        we    = rot_we[b];
        waddr = rot_waddr[b];
        wdata = rot_wdata[b];
        raddr = rot_raddr[b];
      end else begin
        we    = host_we && host_bank == 3'(b);
        waddr = host_addr;
        wdata = host_wdata;
        raddr = host_addr;
      end
    end
    bram_sdp #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_bank (
      .clk, .we, .waddr, .wdata, .raddr, .rdata(rdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0;
      host_bank_q <= '0;
    end else begin
      host_rvalid <= host_re && !busy;
      host_bank_q <= host_bank;
    end
  end
  assign host_rdata = rdata[host_bank_q];

  // The host port belongs to the rotator while the control unit runs.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) (host_we || host_re) |-> !busy)
    else $error("host access while the core is busy");
  a_host_window: assert property (@(posedge clk) disable iff (!rst_n)
      (host_we || host_re) |-> (host_row >= 0 && host_row < coord_t'(ROWS) && host_col >= 0 && host_col < coord_t'(COLS)))
    else $error("host access outside the window");

endmodule
