// tb_pe_t - drives the PE-T with a random operand every cycle and checks
// Term, u and the carried v/px/py two cycles later and c_term three cycles
// later against the reference formulas.
module tb_pe_t;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  v_t v = 0;
  p_t c_px = 0, c_py = 0, l_px = 0, a_py = 0;
  logic out_valid;
  term_t term, c_term;
  u_t u;
  v_t v_q;
  p_t px_q, py_q;

  pe_t dut (.*);

  int checks = 0, failures = 0;
  longint exp_term [$], exp_u [$], exp_v [$], exp_px [$], exp_py [$];
  longint prev_term;
  bit have_prev = 0;

  initial begin
    #200000;
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // drive
      @(negedge clk);
      in_valid = 1;
      v    = v_t'($urandom);
      c_px = p_t'($urandom_range(0, 256) - 128);
      c_py = p_t'($urandom_range(0, 256) - 128);
      l_px = p_t'($urandom_range(0, 256) - 128);
      a_py = p_t'($urandom_range(0, 256) - 128);
      exp_term.push_back(term_ref(v, c_px, l_px, c_py, a_py));
      exp_u.push_back(u_ref(v, c_px, l_px, c_py, a_py));
      exp_v.push_back(v);
      exp_px.push_back(c_px);
      exp_py.push_back(c_py);
      @(posedge clk);
      #1;
      // results of the operand applied two cycles ago
      if (n >= 1) begin
        longint et;
        et = exp_term.pop_front();
        check(out_valid, "out_valid");
        check(longint'(term) == et, $sformatf("term got %0d exp %0d", term, et));
        check(longint'(u) == exp_u.pop_front(), "u");
        check(longint'(v_q) == exp_v.pop_front(), "v carried");
        check(longint'(px_q) == exp_px.pop_front() && longint'(py_q) == exp_py.pop_front(), "px/py carried");
        if (have_prev) check(longint'(c_term) == prev_term, "c_term is Term one cycle later");
        prev_term = et;
        have_prev = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
