// tb_hadc_sar_ctrl: self-checking test of the hybrid ADC control logic,
// run with the coarse encoder and the analog model around it.
//
// Converts every 5th code of the 11-bit range plus the edges of each
// 256-code block, and compares each result with the expected code worked
// out from the input voltage: floor(Vin/32) on the 16-bit scale, except
// where the fine tune lands exactly on 1111'1111 with a correct coarse
// block, in which case the re-comparison moves the code up by one (the
// known DNL spike of the scheme). Checks that the re-comparison ran when
// the coarse offset pointed one block low, and that a conversion fits in
// one 8 kS/s slot of an 800 kHz clock (100 cycles).
module tb_hadc_sar_ctrl;
  import neuro_pkg::*;
  localparam int OFFSET = 1092;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, coarse_start, coarse_valid, dac_sample, cmp_req, cmp_done, cmp_out;
  logic busy, done, recmp;
  logic [2:0] coarse_q, lift; logic [7:0] trial; logic [6:0] tdc; logic tdc_sample;
  adc_code_t code; volt_t vin = 0;

  hadc_sar_ctrl dut (.clk, .rst_n, .start, .coarse_start, .coarse_valid, .coarse_q,
    .lift, .trial, .dac_sample, .cmp_req, .cmp_done, .cmp_out, .busy, .done, .code, .recmp);
  hadc_coarse_encoder u_enc (.clk, .rst_n, .sample(tdc_sample), .tdc, .q(coarse_q), .valid(coarse_valid));
  hadc_analog_model #(.OFFSET(OFFSET)) u_ana (.clk, .rst_n, .vin, .coarse_start, .tdc, .tdc_sample,
    .lift, .trial, .dac_sample, .cmp_req, .cmp_done, .cmp_out);

  int checks = 0, failures = 0, n_recmp = 0, n_spike = 0, max_cyc = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input int v);
    int cyc, blk, cb, fine, exp_code;
    bit exp_re;
    @(negedge clk); vin = volt_t'(v); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (cyc > max_cyc) max_cyc = cyc;
    blk  = v / 8192;
    cb   = (v - OFFSET) < 0 ? 0 : (v - OFFSET) / 8192;
    fine = (v / 32) % 256;
    exp_re = 0;
    if (cb < blk) begin exp_code = v / 32; exp_re = 1; end
    else if (fine == 255 && blk < 7) begin exp_code = v / 32 + 1; exp_re = 1; n_spike++; end
    else exp_code = v / 32;
    if (exp_re) n_recmp++;
    check(int'(code) == exp_code && recmp == exp_re,
          $sformatf("vin=%0d code=%0d exp=%0d recmp=%0b/%0b", v, code, exp_code, recmp, exp_re));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 2048; c += 5) convert(c * 32 + 7);
    for (int b = 1; b < 8; b++) begin
      convert(b * 8192 - 32);      // top code of a block
      convert(b * 8192 + 10);      // just above a boundary: coarse one block low
      convert(b * 8192 + 1500);    // clear of the offset band
    end
    convert(0); convert(65535);
    check(n_recmp > 0 && n_spike > 0, "re-comparison exercised");
    check(max_cyc <= 100, $sformatf("conversion takes %0d cycles", max_cyc));
    $display("re-comparisons %0d, spikes %0d, longest conversion %0d cycles", n_recmp, n_spike, max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
