// tb_hadc_coarse_encoder: self-checking test of the coarse (TDC) encoder.
//
// Drives every thermometer code 0..7 taps set, and also bubbled codes, on
// tdc with a sample pulse, and checks that one clock later valid is high
// for exactly one cycle and q equals the number of taps set. Between
// samples q must hold its value.
module tb_hadc_coarse_encoder;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sample = 0; logic [TDC_TAPS-1:0] tdc = '0;
  logic [COARSE_BITS-1:0] q; logic valid;
  hadc_coarse_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic conv(logic [TDC_TAPS-1:0] t);
    int n;
    n = $countones(t);
    @(negedge clk); tdc = t; sample = 1;
    @(negedge clk); sample = 0; tdc = ~t;     // tdc may move after sampling
    check(valid, $sformatf("valid one clock after sample (%b)", t));
    check(int'(q) == n, $sformatf("tdc %b: q %0d expected %0d", t, q, n));
    @(negedge clk);
    check(!valid, "valid lasts one clock");
    check(int'(q) == n, "q holds between samples");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= TDC_TAPS; k++) conv(TDC_TAPS'((1 << k) - 1));
    repeat (20) conv(TDC_TAPS'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
