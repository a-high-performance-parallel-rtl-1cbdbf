// control_unit - sequencer shared by all PE arrays and BRAM banks.
//
// One run performs n_iter Chambolle iterations over the window. Each
// iteration sweeps the window region by region (a region is the 7 rows held
// by the 7 PE-Ts) and each region column by column in ladder steps: at step s
// PE-T k (k = 1..7) works on column s-(k-1) of row 7*region+k-1, so the array
// needs COLS+6 steps to fill and empty the ladder. Regions needed:
// ceil((ROWS+1)/7), so that the PE-Vs, which trail the PE-Ts by one row, also
// reach the last row. Between two iterations, and after the last one, the
// unit waits DRAIN cycles for the pipeline to write back its last px/py, so
// an iteration always starts from the complete result of the previous one.
// The sweep order follows the design; the drain gap is this implementation's
// choice.
//
// Timing: one step is issued per cycle while running; the step outputs are
// registered (the design's one cycle of control unit latency). done pulses
// for one cycle when the last write-back has happened. A run takes
// n_iter*REGIONS*STEPS + n_iter*DRAIN cycles from start to done.
module control_unit
  import chambolle_pkg::*;
#(
  parameter int unsigned ROWS  = 88,
  parameter int unsigned COLS  = 92,
  parameter int unsigned DRAIN = 3 + PE_ARR_LAT,
  localparam int unsigned REGIONS = (ROWS + 1 + NPE - 1) / NPE,
  localparam int unsigned STEPS   = COLS + NPE - 1,
  localparam int unsigned RW = $clog2(REGIONS + 1),
  localparam int unsigned SW = $clog2(STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_iter,
  output logic          busy,
  output logic          done,
  output logic          step_valid,
  output logic          last_iter,
  output logic [RW-1:0] region,
  output logic [SW-1:0] step
);

  typedef enum logic [1:0] {IDLE, SWEEP, WAIT} state_t;

  state_t        state;
  logic [15:0]   iter, iters;
  logic [RW-1:0] r_cnt;
  logic [SW-1:0] s_cnt;
  logic [$clog2(DRAIN+1)-1:0] d_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      iter       <= '0;
      iters      <= '0;
      r_cnt      <= '0;
      s_cnt      <= '0;
      d_cnt      <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      step_valid <= 1'b0;
      last_iter  <= 1'b0;
      region     <= '0;
      step       <= '0;
    end else begin
      done       <= 1'b0;
      step_valid <= 1'b0;
      unique case (state)
        IDLE: if (start && n_iter != 0) begin
          state <= SWEEP;
          busy  <= 1'b1;
          iters <= n_iter;
          iter  <= '0;
          r_cnt <= '0;
          s_cnt <= '0;
        end
        SWEEP: begin
          step_valid <= 1'b1;
          region     <= r_cnt;
          step       <= s_cnt;
          last_iter  <= (iter == iters - 1);
          if (s_cnt == SW'(STEPS - 1)) begin
            s_cnt <= '0;
            if (r_cnt == RW'(REGIONS - 1)) begin
              r_cnt <= '0;
              d_cnt <= '0;
              state <= WAIT;
            end else begin
              r_cnt <= r_cnt + 1'b1;
            end
          end else begin
            s_cnt <= s_cnt + 1'b1;
          end
        end
        WAIT: begin
          if (d_cnt == ($clog2(DRAIN+1))'(DRAIN - 1)) begin
            if (iter == iters - 1) begin
              state <= IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end else begin
              iter  <= iter + 1'b1;
              state <= SWEEP;
            end
          end else begin
            d_cnt <= d_cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_step_in_run: assert property (@(posedge clk) disable iff (!rst_n) step_valid |-> busy)
    else $error("step issued outside a run");
  a_done_ends_run: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy && !step_valid)
    else $error("done while still running");

endmodule
