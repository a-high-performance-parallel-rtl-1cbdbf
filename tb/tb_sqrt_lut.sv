// tb_sqrt_lut - checks the table square root against the reference (real
// square root for the entry, search for the even-aligned window) for every
// input below 2^16 and for random 32-bit inputs, and checks the accuracy the
// method is meant to give: relative error below 1% for at least 90% of
// random samples.
module tb_sqrt_lut;
  import chambolle_pkg::*;
  import chambolle_ref_pkg::*;

  logic [SQ_IN_W-1:0]  x;
  logic [SQ_OUT_W-1:0] y;
  int checks = 0, failures = 0;

  sqrt_lut dut (.x, .y);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [31:0] val);
    longint e;
    x = val;
    #1;
    e = sqrt_ref(longint'(val));
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL: sqrt(%0d) got %0d exp %0d", val, y, e);
    end
  endtask

  initial begin
    int good, n;
    for (int i = 0; i < 65536; i++) one(32'(i));
    for (int i = 0; i < 20000; i++) one($urandom);
    one(32'hFFFF_FFFF);
    one(32'h8000_0000);
    // accuracy on random samples of realistic size (squared gradients)
    good = 0; n = 0;
    for (int i = 0; i < 20000; i++) begin
      real exact, got;
      logic [31:0] v;
      v = $urandom_range(256, 32'h00FF_FFFF) << $urandom_range(0, 7);
      x = v;
      #1;
      exact = $sqrt(real'(v) / 256.0);
      got   = real'(y) / 256.0;
      n++;
      if ((got - exact) / exact < 0.01 && (exact - got) / exact < 0.01) good++;
    end
    $display("relative error below 1%% for %0d of %0d samples", good, n);
    checks++;
    if (good * 10 < n * 9) begin
      failures++;
      $display("FAIL: accuracy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
