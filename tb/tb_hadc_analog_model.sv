// tb_hadc_analog_model: self-checking test of the behavioural model of the
// hybrid ADC's analog half (sampling, TDC taps with the coarse offset,
// capacitive DAC and comparator).
//
// For a sweep of input voltages the test starts a coarse conversion and
// checks, one clock later, tdc_sample and the thermometer taps against
// tap k = (vin - OFFSET >= (k+1) * 8192). It then samples the input for
// the fine phase and requests comparisons against DAC levels above, below
// and near the held input: the decision must be vin >= 32 * {lift, trial}
// and the answer must come 2 clocks after the request when the level is
// far from the input and 5 clocks after when it is within 128 LSB of the
// 16-bit scale (the slow comparator decision near balance). The held
// input must not follow vin between samples.
module tb_hadc_analog_model;
  import neuro_pkg::*;
  localparam int OFFSET = 1092;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  volt_t vin = '0; logic coarse_start = 0, dac_sample = 0, cmp_req = 0;
  logic [TDC_TAPS-1:0] tdc; logic tdc_sample, cmp_done, cmp_out;
  logic [COARSE_BITS-1:0] lift = '0; logic [FINE_BITS-1:0] trial = '0;
  hadc_analog_model #(.OFFSET(OFFSET)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int v, int code);
    int lat, lvl;
    lvl = code * 32;
    @(negedge clk);
    {lift, trial} = 11'(code); cmp_req = 1;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!cmp_done);
    cmp_req = 0;
    check(cmp_out == (v >= lvl), $sformatf("vin %0d vs level %0d: %0d", v, lvl, cmp_out));
    check(lat == ((v - lvl < 128 && lvl - v < 128) ? 5 : 2),
          $sformatf("vin %0d vs level %0d: decision after %0d clocks", v, lvl, lat));
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      int v;
      logic [TDC_TAPS-1:0] e;
      v = (i < 8) ? i * 8192 + OFFSET + (i % 2) : int'($urandom_range(65535));
      // coarse phase
      @(negedge clk); vin = volt_t'(v); coarse_start = 1;
      @(negedge clk); coarse_start = 0; vin = ~vin;
      for (int k = 0; k < TDC_TAPS; k++) e[k] = (v - OFFSET) >= (k + 1) * 8192;
      check(tdc_sample, "tdc_sample one clock after coarse_start");
      check(tdc == e, $sformatf("vin %0d: taps %b expected %b", v, tdc, e));
      // fine phase
      @(negedge clk); vin = volt_t'(v); dac_sample = 1;
      @(negedge clk); dac_sample = 0; vin = 16'h0;
      compare(v, v / 32 + 40 > 2047 ? 2047 : v / 32 + 40);
      compare(v, v / 32 < 40 ? 0 : v / 32 - 40);
      compare(v, v / 32);
      compare(v, v / 32 + 1 > 2047 ? 2047 : v / 32 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
