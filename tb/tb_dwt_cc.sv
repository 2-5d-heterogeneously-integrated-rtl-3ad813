// tb_dwt_cc: self-checking test of the lifting compute cell dwt_cc.
//
// The cell is combinational. The test applies the corner operands (largest
// and smallest data and coefficients, both saturation directions) and
// 4000 random operand sets, and compares out with a reference worked out
// in integers: out = sat10(x + floor(y*ci/16) + floor(z*cj/16)), where
// floor is the arithmetic shift of the product and sat10 clips to the
// signed 10-bit range. A clock is kept only for the watchdog.
module tb_dwt_cc;
  import neuro_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  dwt_data_t x, y, z, out; dwt_coef_t ci, cj;
  dwt_cc dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(int xv, int yv, int zv, int a, int b);
    int s;
    s = xv + ((yv * a) >>> 4) + ((zv * b) >>> 4);
    return s > 511 ? 511 : (s < -512 ? -512 : s);
  endfunction

  task automatic apply(int xv, int yv, int zv, int a, int b);
    int e;
    x = dwt_data_t'(xv); y = dwt_data_t'(yv); z = dwt_data_t'(zv);
    ci = dwt_coef_t'(a); cj = dwt_coef_t'(b);
    #1;
    e = ref_out(xv, yv, zv, a, b);
    checks++;
    if (int'(out) != e) begin
      failures++;
      $display("FAIL x=%0d y=%0d z=%0d ci=%0d cj=%0d: out %0d expected %0d", xv, yv, zv, a, b, out, e);
    end
  endtask

  initial begin
    apply(0, 0, 0, 0, 0);
    apply(100, 16, 0, 16, 0);          // 1.0 * 16 added to 100
    apply(-7, 3, 0, -16, 0);           // -3 - 7
    apply(0, 5, 0, 1, 0);              // 5/16 rounds down to 0
    apply(0, -5, 0, 1, 0);             // -5/16 rounds down to -1
    apply(511, 511, 511, 31, 31);      // positive saturation
    apply(-512, -512, -512, 31, 31);   // negative saturation
    apply(-512, -512, -512, -32, -32); // products of two negatives
    apply(300, 200, -100, -32, 20);
    repeat (4000)
      apply($signed($urandom_range(1023)) - 512, $signed($urandom_range(1023)) - 512,
            $signed($urandom_range(1023)) - 512, $signed($urandom_range(63)) - 32,
            $signed($urandom_range(63)) - 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
