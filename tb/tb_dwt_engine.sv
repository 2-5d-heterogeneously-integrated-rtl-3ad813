// tb_dwt_engine: self-checking test of the 4-channel 5-level lifting DWT.
//
// Feeds random 10-bit samples to all four channels for 64 sampling periods
// (channels 0,2 Haar, channels 1,3 D2), one period every 200 cycles, the
// minimum the schedule allows. A reference model recomputes every level
// from the non-causal lifting equations on whole sequences and each output
// of the engine is compared with it. Also checked: the schedule (which
// level runs in which period), the 10-cycle iteration, the number of
// clock-gated cycles and that odd periods are power gated, and that a
// tick arriving too early is reported as overrun.
module tb_dwt_engine;
  import neuro_pkg::*;
  localparam int NCH = 4, NLVL = 5, NPER = 64, PER = NCH * NLVL * DWT_IT_CYC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_we = 0; logic [1:0] in_ch = 0; dwt_data_t in_data = 0;
  logic sample_tick = 0;
  wavelet_e wv [NCH];
  logic out_valid; logic [1:0] out_ch; logic [2:0] out_lvl; dwt_data_t out_d, out_a;
  logic busy, cg_en, pg_sleep, overrun;

  dwt_engine dut (.clk, .rst_n, .in_we, .in_ch, .in_data, .sample_tick, .wv,
    .cw_we(1'b0), .cw_wv(WV_HAAR), .cw_step(3'd0), .cw_sel(1'b0), .cw_data('0),
    .out_valid, .out_ch, .out_lvl, .out_d, .out_a, .busy, .cg_en, .pg_sleep, .overrun);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // coefficient tables of the reference, x16
  int C [2][8][2] = '{
    '{'{-16,0}, '{8,0}, '{0,0}, '{0,0}, '{0,0}, '{0,0}, '{11,0}, '{23,0}},
    '{'{-28,0}, '{7,-1}, '{0,16}, '{0,0}, '{0,0}, '{0,0}, '{31,0}, '{8,0}}};

  function automatic int fl16(int v); return (v >= 0) ? v / 16 : -((-v + 15) / 16); endfunction
  function automatic int sat(int v); return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction
  function automatic int op(int w, int s, int x, int y, int z);
    return sat(x + fl16(C[w][s][0] * y) + fl16(C[w][s][1] * z));
  endfunction

  // reference sequences, index n+4 holds iteration n (n >= -4)
  localparam int MAXN = NPER / 2 + 8;
  int ref_in [NCH][NLVL][2*MAXN];      // level input sequence
  int ref_nin[NCH][NLVL];
  int ref_o  [NCH][NLVL][MAXN][2];     // engine-order outputs (d, a)

  task automatic run_ref(input int c, input int l, input int w);
    int n_it = ref_nin[c][l] / 2;
    int f[MAXN+6], h[MAXN+6], H[MAXN+6], I[MAXN+6], J[MAXN+6], K[MAXN+6], L[MAXN+6], A[MAXN+6];
    int d, a;
    for (int i = 0; i < MAXN+6; i++) begin f[i]=0; h[i]=0; H[i]=0; I[i]=0; J[i]=0; K[i]=0; L[i]=0; A[i]=0; end
    for (int n = 0; n < n_it; n++) begin f[n+4] = ref_in[c][l][2*n]; h[n+4] = ref_in[c][l][2*n+1]; end
    for (int i = 0; i < n_it + 4; i++) H[i] = op(w, 0, h[i], f[i], 0);
    for (int i = 0; i < n_it + 3; i++) I[i] = op(w, 1, f[i], H[i], H[i+1]);
    for (int i = 0; i < n_it + 3; i++) J[i] = op(w, 2, H[i], I[i], i > 0 ? I[i-1] : 0);
    for (int i = 0; i < n_it + 2; i++) K[i] = op(w, 3, I[i], J[i], J[i+1]);
    for (int i = 0; i < n_it + 2; i++) L[i] = op(w, 4, J[i], K[i], i > 0 ? K[i-1] : 0);
    for (int i = 0; i < n_it + 2; i++) A[i] = op(w, 5, K[i], L[i], i > 0 ? L[i-1] : 0);
    for (int m = 0; m < n_it; m++) begin
      // engine iteration m delivers index m-2, stored at m+2
      d = op(w, 6, 0, L[m+2], A[m+1]);
      a = op(w, 7, 0, A[m+2], 0);
      ref_o[c][l][m][0] = d; ref_o[c][l][m][1] = a;
      if (l + 1 < NLVL) begin
        ref_in[c][l+1][ref_nin[c][l+1]] = a;
        ref_nin[c][l+1]++;
      end
    end
  endtask

  // captured engine outputs
  int got [NCH][NLVL][MAXN][2];
  int ngot[NCH][NLVL];
  int per_runs [NPER+1][NLVL];
  int period = 0, cur_p = 0, valid_cyc = 0, gated_cyc = 0, sleep_cyc = 0, sleep_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      got[out_ch][out_lvl][ngot[out_ch][out_lvl]][0] = int'(out_d);
      got[out_ch][out_lvl][ngot[out_ch][out_lvl]][1] = int'(out_a);
      ngot[out_ch][out_lvl]++;
      per_runs[cur_p][out_lvl]++;
      valid_cyc = valid_cyc + 1;
    end
    if (busy && !cg_en) gated_cyc++;
    if (pg_sleep) begin
      sleep_cyc++;
      if (cur_p % 2 == 0) sleep_bad++;
    end
    if (sample_tick) cur_p++;
  end

  // watchdog
  initial begin
    repeat (NPER * PER + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1;
  initial begin
    for (int c = 0; c < NCH; c++) wv[c] = (c % 2) ? WV_D2 : WV_HAAR;
    for (int c = 0; c < NCH; c++) for (int l = 0; l < NLVL; l++) begin ref_nin[c][l] = 0; ngot[c][l] = 0; end
    for (int p = 0; p <= NPER; p++) for (int l = 0; l < NLVL; l++) per_runs[p][l] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 1; p <= NPER; p++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        in_we = 1; in_ch = 2'(c);
        in_data = dwt_data_t'($urandom_range(0, 799)) - 10'sd400;
        ref_in[c][0][ref_nin[c][0]] = int'(in_data);
        ref_nin[c][0]++;
      end
      @(negedge clk); in_we = 0;
      sample_tick = 1; period = p; t0 = $time;
      @(negedge clk); sample_tick = 0;
      // first result of channel 0 level 1 at the end of its 10-cycle slot
      if (p % 2 == 0) begin
        @(posedge clk iff out_valid);
        t1 = $time;
        check((t1 - t0) / 10 == DWT_IT_CYC, $sformatf("iteration latency %0d", (t1 - t0) / 10));
        @(negedge clk);
        repeat (PER - NCH - 2 - DWT_IT_CYC) @(negedge clk);
      end else begin
        repeat (PER - NCH - 1) @(negedge clk);
      end
    end
    repeat (PER) @(negedge clk);
    // early tick -> overrun
    @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    repeat (20) @(negedge clk); sample_tick = 1; @(negedge clk); sample_tick = 0;
    check(overrun, "overrun flagged on an early tick");

    // schedule: level l runs in period p iff 2^(l+1) divides p, once per channel
    for (int p = 1; p <= NPER; p++)
      for (int l = 0; l < NLVL; l++)
        check(per_runs[p][l] == ((p % (1 << (l + 1)) == 0) ? NCH : 0),
              $sformatf("period %0d level %0d runs %0d", p, l + 1, per_runs[p][l]));
    // data
    for (int c = 0; c < NCH; c++)
      for (int l = 0; l < NLVL; l++) begin
        run_ref(c, l, c % 2);
        check(ngot[c][l] == ref_nin[c][l] / 2, $sformatf("ch%0d L%0d count %0d", c, l + 1, ngot[c][l]));
        for (int m = 0; m < ngot[c][l]; m++) begin
          check(got[c][l][m][0] == ref_o[c][l][m][0] && got[c][l][m][1] == ref_o[c][l][m][1],
                $sformatf("ch%0d L%0d it%0d d=%0d/%0d a=%0d/%0d", c, l + 1, m,
                          got[c][l][m][0], ref_o[c][l][m][0], got[c][l][m][1], ref_o[c][l][m][1]));
        end
      end
    check(sleep_cyc > 0 && sleep_bad == 0, "power gating only in odd periods");
    check(gated_cyc > 0, "clock gating happened");
    $display("gated cycles %0d, sleep cycles %0d, iterations %0d", gated_cyc, sleep_cyc, valid_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
