// tb_neuro_microsystem_top: end-to-end test of the whole microsystem at
// its default parameters.
//
// The testbench plays the MCU firmware through the MCU's u-SPI back-end
// and drives the 16 AFE outputs. Sequence:
//  1. DC inputs; after two frames the MCU reads the 16-channel frame from
//     Die-1 (READ, CRC) and every code is compared with the code expected
//     from its input voltage (two channels sit just above a coarse-block
//     boundary so the coarse offset forces a re-comparison).
//  2. The MCU broadcasts the wavelet choice to both DWT dies (even
//     channels Haar, odd channels D2) and writes to an absent node, which
//     must go unacknowledged.
//  3. 32 rounds, with inputs that change every frame: the MCU passes the
//     M/S flag to Die-1, Die-1 pushes its latest frame to the two DWT dies
//     and passes the flag back, then the MCU drains the four result queues
//     (READ bursts, CRC, alternately with CAC).
// Checks: frame codes; that each DWT level produced the number of results
// its schedule gives for 32 periods; the level-1 Haar details against a
// reference computed from the samples seen entering the DWT dies; the
// channel sampling period (4 x CONV_CYCLES clocks); no NAKs on pushes, no
// bus conflicts, overruns or queue overflows. Each named mechanism must
// have occurred: ADC re-comparison, DWT clock gating, DWT power gating,
// master passing, broadcast, CRC, CAC, NAK.
module tb_neuro_microsystem_top;
  import neuro_pkg::*;
  localparam int OFFSET = 1092, ROUNDS = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  volt_t afe_in [16];
  logic acq_en = 1;
  logic mcu_req_valid = 0; uspi_req_t mcu_req = '0; logic mcu_req_ready;
  logic [15:0] mcu_tx_data; logic mcu_tx_pop, mcu_rx_valid; logic [15:0] mcu_rx_data;
  logic mcu_done, mcu_ack, mcu_crc_err, mcu_wr_valid;
  logic [31:0] mcu_wr_addr, mcu_rd_addr; logic [15:0] mcu_wr_data, mcu_rd_data;
  logic [3:0] ms_flags; logic adc_done [4]; adc_code_t adc_code [4]; logic adc_recmp [4];
  logic [15:0] frame_cnt, push_cnt, nak_cnt;
  logic [3:0] dwt_pg_sleep, dwt_cg_en, dwt_overrun, dwt_q_ovf; logic [1:0] dwt_crc_err;
  logic bus_conflict;

  neuro_microsystem_top dut (.*);

  // MCU back-end memories
  logic [15:0] txq [64]; int txh = 0;
  logic [15:0] rxq [256]; int nrx = 0;
  assign mcu_tx_data = txq[txh % 64];
  assign mcu_rd_data = 16'h0;
  always @(posedge clk) begin
    if (rst_n && mcu_tx_pop) txh++;
    if (rst_n && mcu_rx_valid) begin rxq[nrx % 256] = mcu_rx_data; nrx++; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_recmp = 0, n_cg = 0, n_pg = 0, n_pass = 0, n_bcast = 0, n_crc = 0, n_cac = 0, n_nak = 0;
  int n_conflict = 0, n_fs = 0, fs_last = -1, fs_bad = 0;
  logic ms1_q = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) if (adc_done[k] && adc_recmp[k]) n_recmp++;
    if (dut.g_fpga[0].u_die.g_eng[0].u_dwt.busy && !dwt_cg_en[0]) n_cg++;
    if (dwt_pg_sleep[0]) n_pg++;
    if (ms_flags[1] && !ms1_q) n_pass++;
    ms1_q <= ms_flags[1];
    if (bus_conflict) n_conflict++;
    if (dut.u_seq.frame_start) begin
      int t;
      t = int'($time / 10);
      if (fs_last >= 0 && t - fs_last != 400) fs_bad++;
      fs_last = t; n_fs++;
    end
  end

  // ---------------- samples entering the DWT dies ----------------
  int xin [16][64]; int nx [16];
  always @(posedge clk) if (rst_n) begin
    if (dut.g_fpga[0].u_die.wr_valid && dut.g_fpga[0].u_die.wr_addr < 8) begin
      int c;
      c = int'(dut.g_fpga[0].u_die.wr_addr);
      xin[c][nx[c]] = (int'(dut.g_fpga[0].u_die.wr_data[10:0]) - 1024) >>> 1; nx[c]++;
    end
    if (dut.g_fpga[1].u_die.wr_valid && dut.g_fpga[1].u_die.wr_addr < 8) begin
      int c;
      c = 8 + int'(dut.g_fpga[1].u_die.wr_addr);
      xin[c][nx[c]] = (int'(dut.g_fpga[1].u_die.wr_data[10:0]) - 1024) >>> 1; nx[c]++;
    end
  end

  // ---------------- MCU operations ----------------
  function automatic uspi_req_t mk(uspi_mode_e mode, bit bc, int bl, int amode, bit crc, bit cac,
                                   int ssel, int smask, int addr);
    uspi_req_t r;
    r = '0;
    r.h1.mode = mode; r.h1.bcast = bc; r.h1.bl = 4'(bl); r.h1.amode = 2'(amode);
    r.h1.crc = crc; r.h1.cac = cac; r.ssel = 4'(ssel); r.smask = 16'(smask); r.addr = 32'(addr);
    return r;
  endfunction

  bit last_ack;
  task automatic mcu(input uspi_req_t r);
    @(negedge clk);
    while (!mcu_req_ready) @(negedge clk);
    mcu_req = r; mcu_req_valid = 1;
    @(negedge clk); mcu_req_valid = 0;
    while (!mcu_done) @(negedge clk);
    last_ack = mcu_ack;
    if (r.h1.bcast) n_bcast++;
    if (r.h1.crc) n_crc++;
    if (r.h1.cac) n_cac++;
    if (r.h1.mode != USPI_READ && !r.h1.bcast && !mcu_ack) n_nak++;
    if (r.h1.mode == USPI_READ && r.h1.crc) check(!mcu_crc_err, "read CRC");
    @(negedge clk);
  endtask

  function automatic int exp_code(int v);
    int blk = v / 8192, cb = (v - OFFSET) < 0 ? 0 : (v - OFFSET) / 8192, fine = (v / 32) % 256;
    if (cb >= blk && fine == 255 && blk < 7) return v / 32 + 1;
    return v / 32;
  endfunction

  function automatic int fl16(int v); return (v >= 0) ? v / 16 : -((-v + 15) / 16); endfunction
  function automatic int sat(int v); return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction

  // results by global channel and kind
  int res [16][6][32]; int nres [16][6];
  task automatic drain(input int die, input int eng, input bit cac);
    int n0 = nrx;
    mcu(mk(USPI_READ, 0, 7, 2, 1, cac, die + 2, 0, (eng + 1) * 256));
    for (int i = n0; i < nrx; i++) begin
      logic [15:0] w = rxq[i % 256];
      if (w != 16'hFFFF) begin
        int c = die * 8 + int'(w[15:13]);
        int k = int'(w[12:10]);
        if (k < 6) begin
          res[c][k][nres[c][k] % 32] = int'($signed(w[9:0]));
          nres[c][k]++;
        end
      end
    end
  endtask

  int vdc [16];
  int seed_v = 0;
  initial begin
    for (int c = 0; c < 16; c++) begin
      nx[c] = 0;
      for (int k = 0; k < 6; k++) nres[c][k] = 0;
      vdc[c] = 2000 + c * 3900 + 11;
    end
    vdc[5]  = 3 * 8192 + 300;          // inside the coarse offset band
    vdc[12] = 6 * 8192 + 500;
    for (int c = 0; c < 16; c++) afe_in[c] = volt_t'(vdc[c]);
    for (int i = 0; i < 64; i++) txq[i] = 16'(i % 4);   // wavelet codes: 0 1 0 1 ...
    for (int i = 0; i < 64; i++) if (i % 2 == 1) txq[i] = 16'd1; else txq[i] = 16'd0;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. read a DC frame
    wait (frame_cnt >= 2);
    nrx = 0;
    mcu(mk(USPI_READ, 0, 15, 1, 1, 0, 1, 0, 0));
    check(nrx == 16, $sformatf("frame words %0d", nrx));
    for (int c = 0; c < 16; c++)
      check(int'(rxq[c]) == exp_code(vdc[c]),
            $sformatf("ch%0d code %0d expected %0d", c, rxq[c], exp_code(vdc[c])));

    // 2. broadcast wavelet selection, then a write to an absent node
    mcu(mk(USPI_WRITE, 1, 7, 1, 1, 0, 0, 'b1100, 'h20));
    check(dut.g_fpga[0].u_die.wv[1] == WV_D2 && dut.g_fpga[1].u_die.wv[0] == WV_HAAR &&
          dut.g_fpga[1].u_die.wv[7] == WV_D2,
          $sformatf("wavelets configured by broadcast (%0d %0d %0d, ack %0d)", dut.g_fpga[0].u_die.wv[1],
                    dut.g_fpga[1].u_die.wv[0], dut.g_fpga[1].u_die.wv[7], last_ack));
    mcu(mk(USPI_WRITE, 0, 0, 1, 0, 0, 7, 0, 0));
    check(!last_ack, "absent node does not acknowledge");

    // 3. streaming rounds with changing inputs
    fork
      forever begin
        @(posedge clk iff dut.u_seq.frame_start);
        seed_v++;
        for (int c = 0; c < 16; c++) afe_in[c] = volt_t'(8192 + ((seed_v * 7919 + c * 104729) % 49152));
      end
    join_none
    for (int r = 0; r < ROUNDS; r++) begin
      mcu(mk(USPI_PASS, 0, 0, 0, 0, 0, 1, 0, 0));
      check(last_ack, "pass to Die-1 acknowledged");
      while (!ms_flags[0]) @(negedge clk);
      for (int die = 0; die < 2; die++)
        for (int eng = 0; eng < 2; eng++) drain(die, eng, r % 2);
    end
    repeat (400) @(negedge clk);
    for (int k = 0; k < 3; k++)
      for (int die = 0; die < 2; die++)
        for (int eng = 0; eng < 2; eng++) drain(die, eng, 0);

    // ---------------- checks ----------------
    check(push_cnt == 16'(ROUNDS) && nak_cnt == 0, $sformatf("pushes %0d naks %0d", push_cnt, nak_cnt));
    for (int c = 0; c < 16; c++) begin
      check(nx[c] == ROUNDS, $sformatf("ch%0d received %0d samples", c, nx[c]));
      for (int l = 0; l < 5; l++)
        check(nres[c][l] == ROUNDS >> (l + 1), $sformatf("ch%0d L%0d results %0d", c, l + 1, nres[c][l]));
      check(nres[c][5] == 1, $sformatf("ch%0d approximation results %0d", c, nres[c][5]));
    end
    // level-1 Haar details: iteration m carries the pair m-2
    for (int c = 0; c < 16; c += 2)
      for (int m = 0; m < ROUNDS / 2; m++) begin
        int e;
        e = (m < 2) ? 0 : sat(fl16(11 * sat(xin[c][2*(m-2)+1] - xin[c][2*(m-2)])));
        check(res[c][0][m] == e, $sformatf("ch%0d Haar d1[%0d] %0d expected %0d", c, m, res[c][0][m], e));
      end
    check(dwt_overrun == 0 && dwt_q_ovf == 0 && dwt_crc_err == 0,
          $sformatf("no overrun (%b), overflow (%b) or CRC error (%b)", dwt_overrun, dwt_q_ovf, dwt_crc_err));
    check(n_conflict == 0, "no bus conflict");
    check(n_fs > 10 && fs_bad == 0, $sformatf("frame period 400 cycles (%0d bad)", fs_bad));
    check(n_recmp > 0, "ADC re-comparison happened");
    check(n_cg > 0, "DWT clock gating happened");
    check(n_pg > 0, "DWT power gating happened");
    check(n_pass == ROUNDS, $sformatf("master passing happened %0d times", n_pass));
    check(n_bcast > 0 && n_crc > 0 && n_cac > 0 && n_nak > 0, "broadcast, CRC, CAC and NAK happened");
    $display("recmp %0d, clock-gated cycles %0d, power-gated cycles %0d, passes %0d, bcast %0d, crc %0d, cac %0d, nak %0d",
             n_recmp, n_cg, n_pg, n_pass, n_bcast, n_crc, n_cac, n_nak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
