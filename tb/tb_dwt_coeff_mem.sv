// tb_dwt_coeff_mem: self-checking test of the lifting coefficient store.
//
// After reset the test reads every step of every wavelet and compares the
// pair (Di, Dj) with the reset table written out here independently (Haar
// and D2 in Q2.4 as listed below, Sym4 and Sym6 zero). It then writes a
// Sym6 coefficient set through the write port, checks that the write
// lands one clock later in the addressed entry only, and that a second
// reset restores the defaults.
module tb_dwt_coeff_mem;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  wavelet_e wv = WV_HAAR, wwv = WV_HAAR; logic [2:0] step = 0, wstep = 0;
  dwt_coef_t ci, cj, wdata = '0; logic we = 0, wsel = 0;
  dwt_coeff_mem dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected table: [wavelet][step] = {Di, Dj} * 16
  int exp_t [4][8][2];
  task automatic set_defaults();
    int haar [8][2] = '{'{-16, 0}, '{8, 0}, '{0, 0}, '{0, 0}, '{0, 0}, '{0, 0}, '{11, 0}, '{23, 0}};
    int d2   [8][2] = '{'{-28, 0}, '{7, -1}, '{0, 16}, '{0, 0}, '{0, 0}, '{0, 0}, '{31, 0}, '{8, 0}};
    for (int s = 0; s < 8; s++)
      for (int j = 0; j < 2; j++) begin
        exp_t[0][s][j] = haar[s][j]; exp_t[1][s][j] = d2[s][j];
        exp_t[2][s][j] = 0; exp_t[3][s][j] = 0;
      end
  endtask

  task automatic read_all(string tag);
    for (int w = 0; w < 4; w++)
      for (int s = 0; s < 8; s++) begin
        wv = wavelet_e'(w); step = 3'(s);
        #1;
        checks++;
        if (int'(ci) != exp_t[w][s][0] || int'(cj) != exp_t[w][s][1]) begin
          failures++;
          $display("FAIL %s wv%0d step%0d: %0d/%0d expected %0d/%0d", tag, w, s + 1, ci, cj,
                   exp_t[w][s][0], exp_t[w][s][1]);
        end
      end
  endtask

  initial begin
    set_defaults();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    read_all("reset");
    // load a Sym6 set: Di = 3*step - 10, Dj = 5 - step
    for (int s = 0; s < 8; s++)
      for (int j = 0; j < 2; j++) begin
        @(negedge clk);
        we = 1; wwv = WV_SYM6; wstep = 3'(s); wsel = j[0];
        wdata = dwt_coef_t'(j == 0 ? 3 * s - 10 : 5 - s);
        exp_t[3][s][j] = j == 0 ? 3 * s - 10 : 5 - s;
      end
    @(negedge clk) we = 0;
    read_all("after load");
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    set_defaults();
    read_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
