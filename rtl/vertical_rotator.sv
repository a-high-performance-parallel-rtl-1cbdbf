// vertical_rotator - connects the eight row-interleaved BRAM banks of a PE
// array to the rows of the current region.
//
// Row i of the window lives in bank i mod 8 at address (i div 8)*COLS + col,
// so eight consecutive rows - the 7 rows of a region plus the row above it,
// whose py the first PE-T needs - always sit in eight different banks and can
// be read in one cycle. Moving to the next region shifts the row-to-bank
// assignment by one (7 = -1 mod 8) and moves the banks that wrap to the next
// block of rows, i.e. adds COLS (92) to their address; this is the rotation
// and the 92-address offset of the design. The mapping formulas are this
// implementation's way of realising them.
//
// Read side: from the control unit's region/step it forms the eight bank
// addresses (combinational, registered inside the banks) and, one cycle after
// the banks answer, presents the words re-ordered by lane: lane 0 is the row
// above the region at the column of PE-T 1, lane k (1..7) is the row and
// column of PE-T k in the ladder. Lane positions are delayed alongside, with
// valid cleared outside the window. Latency: 2 cycles from region/step to
// lane words (bank read + rotator register).
// Write side: each PE-V lane's result goes to bank row mod 8, registered one
// cycle. The seven PE-V rows are consecutive, so they never collide.
module vertical_rotator
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS = 88,
  parameter int unsigned COLS = 92,
  localparam int unsigned DEPTH = ((ROWS + NBANK - 1) / NBANK) * COLS,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned RW = $clog2((ROWS + 1 + NPE - 1) / NPE + 1),
  localparam int unsigned SW = $clog2(COLS + NPE)
) (
  input  logic            clk,
  input  logic            rst_n,
  // control unit step
  input  logic            step_valid,
  input  logic [RW-1:0]   region,
  input  logic [SW-1:0]   step,
  // bank read ports
  output logic [AW-1:0]   raddr [NBANK],
  input  word_t           rdata [NBANK],
  // rotated lanes (lane 0 = row above the region)
  output word_t           lane_word [NPE+1],
  output pos_t            lane_pos  [NPE+1],
  // PE-V write requests
  input  wr_t             wr [NPE],
  // bank write ports
  output logic            bwe    [NBANK],
  output logic [AW-1:0]   bwaddr [NBANK],
  output word_t           bwdata [NBANK]
);

  function automatic logic [AW-1:0] elem_addr(coord_t row, coord_t col);
    return AW'(32'(unsigned'(row >>> 3)) * COLS + 32'(unsigned'(col)));
  endfunction

  // ---- read side --------------------------------------------------------
  pos_t       pos_d [NPE+1];
  logic [2:0] bank_d [NPE+1];

  always_comb begin
    for (int j = 0; j <= NPE; j++) begin
      pos_d[j].row   = coord_t'(NPE * region) - 1 + coord_t'(j);
      pos_d[j].col   = (j == 0) ? coord_t'(step) : coord_t'(step) - coord_t'(j - 1);
      pos_d[j].valid = step_valid && pos_d[j].row >= 0 && pos_d[j].row < coord_t'(ROWS)
                       && pos_d[j].col >= 0 && pos_d[j].col < coord_t'(COLS);
      bank_d[j]      = pos_d[j].row[2:0];
    end
    for (int b = 0; b < NBANK; b++) begin
      // the lane whose row falls in bank b
      automatic logic [2:0] j = 3'(b) + 3'(region) + 3'd1;
      raddr[b] = pos_d[j].valid ? elem_addr(pos_d[j].row, pos_d[j].col) : '0;
    end
  end

  // one cycle for the banks, one for the rotation register
  pos_t       pos_q  [NPE+1];
  logic [2:0] bank_q [NPE+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= NPE; j++) begin
        pos_q[j]    <= '0;
        lane_pos[j] <= '0;
      end
    end else begin
      for (int j = 0; j <= NPE; j++) begin
        pos_q[j]    <= pos_d[j];
        lane_pos[j] <= pos_q[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j <= NPE; j++) begin
      bank_q[j]    <= bank_d[j];
      lane_word[j] <= rdata[bank_q[j]];
    end
  end

  // ---- write side -------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) bwe[b] <= 1'b0;
    end else begin
      for (int b = 0; b < NBANK; b++) begin
        bwe[b] <= 1'b0;
        for (int k = 0; k < NPE; k++)
          if (wr[k].valid && wr[k].row[2:0] == 3'(b)) bwe[b] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NBANK; b++) begin
      for (int k = 0; k < NPE; k++)
        if (wr[k].valid && wr[k].row[2:0] == 3'(b)) begin
          bwaddr[b] <= elem_addr(wr[k].row, wr[k].col);
          bwdata[b] <= wr[k].word;
        end
    end
  end

  // The PE-V rows of one step are distinct modulo 8: no two results may
  // address the same bank in one cycle.
  for (genvar k1 = 0; k1 < NPE; k1++) begin : g_chk
    for (genvar k2 = k1 + 1; k2 < NPE; k2++) begin : g_pair
      a_bank_conflict: assert property (@(posedge clk) disable iff (!rst_n)
          !(wr[k1].valid && wr[k2].valid && wr[k1].row[2:0] == wr[k2].row[2:0]))
        else $error("two PE-V results for bank %0d in one cycle", wr[k1].row[2:0]);
    end
  end

endmodule
