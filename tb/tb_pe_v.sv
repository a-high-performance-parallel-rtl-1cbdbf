// tb_pe_v - drives the PE-V with random Terms (including right and bottom
// edges) and random px/py every cycle and checks the new px/py and the
// carried v exactly PE_V_LAT = 12 cycles later against the reference.
module tb_pe_v;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  term_t c_term = 0, r_term = 0, b_term = 0;
  logic r_edge = 0, b_edge = 0;
  v_t v = 0;
  p_t px = 0, py = 0;
  logic out_valid;
  v_t v_q;
  p_t px_new, py_new;

  pe_v dut (.*);

  int checks = 0, failures = 0;
  longint e_px [$], e_py [$], e_v [$];
  bit     e_valid [$];

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic term_t rnd_term();
    case ($urandom_range(0, 2))
      0: return term_t'($urandom_range(0, 512) - 256);
      1: return term_t'($urandom_range(0, 32768) - 16384);
      default: return term_t'($urandom);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000 + PE_V_LAT; n++) begin
      @(negedge clk);
      if (n < 5000) begin
        longint xp, yp;
        in_valid = ($urandom_range(0, 7) != 0);
        c_term = rnd_term();
        r_term = rnd_term();
        b_term = rnd_term();
        r_edge = ($urandom_range(0, 9) == 0);
        b_edge = ($urandom_range(0, 9) == 0);
        v  = v_t'($urandom);
        px = p_t'($urandom_range(0, 256) - 128);
        py = p_t'($urandom_range(0, 256) - 128);
        pev_ref(c_term, r_term, b_term, r_edge, b_edge, px, py, xp, yp);
        e_px.push_back(xp);
        e_py.push_back(yp);
        e_v.push_back(v);
        e_valid.push_back(in_valid);
      end else begin
        in_valid = 0;
      end
      @(posedge clk);
      #1;
      if (n >= PE_V_LAT - 1 && e_px.size() > 0) begin
        longint xp, yp;
        bit ev;
        xp = e_px.pop_front();
        yp = e_py.pop_front();
        ev = e_valid.pop_front();
        check(out_valid == ev, "out_valid after 12 cycles");
        check(longint'(px_new) == xp && longint'(py_new) == yp,
              $sformatf("px/py got %0d,%0d exp %0d,%0d", px_new, py_new, xp, yp));
        check(longint'(v_q) == e_v.pop_front(), "v carried");
      end
    end
    $display("saturations %0d, shifted roots %0d", n_sat, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
