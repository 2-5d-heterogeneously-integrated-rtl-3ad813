// tb_acq_sequencer: self-checking test of the acquisition sequencer.
//
// Runs the sequencer at its default CONV_CYCLES (100) for 12 frames and
// checks: conv_start pulses exactly every CONV_CYCLES clocks; each pulse
// comes SETTLE clocks after mux_sel changed and carries the current
// mux_sel as conv_ch; the channels cycle 0,1,2,3; mux_sel stays steady
// from a conv_start until the conversion slot ends; frame_start pulses
// every NMUX*CONV_CYCLES clocks, when mux_sel returns to 0. With en low
// nothing moves.
module tb_acq_sequencer;
  localparam int NMUX = 4, CONV = 100, SETTLE = 4;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [1:0] mux_sel, conv_ch; logic conv_start, frame_start;
  acq_sequencer #(.NMUX(NMUX), .CONV_CYCLES(CONV), .SETTLE(SETTLE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_cs = -1, last_fs = -1, last_sel_change = -1, n_cs = 0, n_fs = 0;
  int exp_ch = 0;
  logic [1:0] sel_q = 0;
  always @(negedge clk) if (rst_n && en) begin
    cyc++;
    if (mux_sel != sel_q) begin
      check(mux_sel == sel_q + 2'd1, "mux_sel advances by one");
      check(cyc - last_sel_change == CONV || last_sel_change < 0, "slot length CONV_CYCLES");
      last_sel_change = cyc;
    end
    sel_q = mux_sel;
    if (conv_start) begin
      check(int'(conv_ch) == exp_ch && conv_ch == mux_sel, $sformatf("conv_ch %0d expected %0d", conv_ch, exp_ch));
      check(last_cs < 0 || cyc - last_cs == CONV, $sformatf("conv_start period %0d", cyc - last_cs));
      check(last_sel_change < 0 || cyc - last_sel_change == SETTLE,
            $sformatf("conv_start %0d clocks after the switch", cyc - last_sel_change));
      exp_ch = (exp_ch + 1) % NMUX;
      last_cs = cyc; n_cs++;
    end
    if (frame_start) begin
      check(mux_sel == 0, "frame_start when the mux returns to 0");
      check(last_fs < 0 || cyc - last_fs == NMUX * CONV, $sformatf("frame period %0d", cyc - last_fs));
      last_fs = cyc; n_fs++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(!conv_start && mux_sel == 0, "idle while en is low");
    en = 1;
    repeat (12 * NMUX * CONV) @(negedge clk);
    en = 0;
    begin
      logic [1:0] s;
      s = mux_sel;
      repeat (2 * CONV) begin
        @(negedge clk);
        if (conv_start || mux_sel != s) begin check(0, "moved while en is low"); break; end
      end
    end
    check(n_cs >= 12 * NMUX - 1 && n_fs >= 11, $sformatf("%0d conversions, %0d frames", n_cs, n_fs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
