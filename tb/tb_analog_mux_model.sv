// tb_analog_mux_model: self-checking test of the behavioural model of the
// 4:1 analog multiplexer in front of each hybrid ADC.
//
// The four inputs carry distinct voltages. After each change of sel the
// output must keep its previous value for SETTLE clocks and follow the
// newly selected input from the (SETTLE+1)-th clock on; the test also
// changes the selected input's voltage while sel is steady and checks the
// output tracks it one clock later.
module tb_analog_mux_model;
  import neuro_pkg::*;
  localparam int SETTLE = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  volt_t afe [4]; logic [1:0] sel = 0; volt_t out;
  analog_mux_model #(.NIN(4), .SETTLE(SETTLE)) dut (.*);

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

  initial begin
    for (int i = 0; i < 4; i++) afe[i] = volt_t'(1000 * (i + 1));
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(out == afe[0], "input 0 after reset");
    for (int n = 0; n < 24; n++) begin
      volt_t prev;
      logic [1:0] s;
      s = 2'((n * 3 + 1) % 4);
      if (s == sel) s = s + 1'b1;
      prev = out;
      @(negedge clk) sel = s;
      for (int k = 0; k < SETTLE; k++) begin
        @(negedge clk);
        check(out == prev, $sformatf("output held %0d clocks after switching to %0d", k + 1, s));
      end
      @(negedge clk);
      check(out == afe[s], $sformatf("output follows input %0d after settling", s));
      afe[s] = afe[s] + 16'd7;
      @(negedge clk);
      check(out == afe[s], "output tracks the selected input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
