// tb_die1_wrapper: self-checking test of the acquisition die's u-SPI
// wrapper.
//
// The testbench plays the four ADCs and the sequencer (a code for each of
// the 16 channels every frame, then frame_start), an MCU u-SPI master
// (node 0) and two u-SPI slaves standing in for the DWT dies (nodes 2, 3),
// all on one bus with the wrapper (node 1). The test:
//  * reads the 16-word frame, the frame counter and the control register
//    and compares them with the codes of the last complete frame;
//  * passes the M/S flag to the wrapper four times, with CRC only and with
//    CRC and CAC set in the control register; each time the wrapper must
//    push the next complete frame, channels 0-7 to node 2 and 8-15 to node
//    3 at addresses 0-7, and hand the flag back to node 0, with its push
//    counter advancing and no NAK;
//  * checks that the frame buffer does not change while a push is under
//    way (the pushed words all come from one frame).
// Frames are about 530 clocks apart so that the 16-word read, started
// right after a frame completes, ends before the next one.
module tb_die1_wrapper;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic sclk_o [N], sclk_oe [N], ss_n_o [N], ss_oe [N], d_oe [N];
  logic [3:0] d_o [N];
  logic sclk, ss_n, conflict; logic [3:0] d;
  uspi_bus #(.N(N), .LANES(4)) u_bus (.*);

  logic adc_done [4] = '{default: 0}; adc_code_t adc_code [4] = '{default: 0};
  logic [1:0] conv_ch = 0; logic frame_start = 0;
  logic ms1; logic [15:0] frame_cnt, push_cnt, nak_cnt;
  die1_wrapper dut (
    .clk, .rst_n, .adc_done, .adc_code, .conv_ch, .frame_start,
    .sclk_o(sclk_o[1]), .sclk_oe(sclk_oe[1]), .ss_n_o(ss_n_o[1]), .ss_oe(ss_oe[1]),
    .d_o(d_o[1]), .d_oe(d_oe[1]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d),
    .ms_flag(ms1), .frame_cnt, .push_cnt, .nak_cnt);

  // MCU master
  logic req_valid = 0, req_ready, tx_pop, rx_valid, m_done, m_ack, m_crc_err, ms0;
  uspi_req_t req = '0; logic [15:0] tx_data = '0, rx_data;
  uspi_node #(.LANES(4), .NODE_ID(4'd0), .MS_INIT(1'b1)) u_mcu (
    .clk, .rst_n, .sclk_o(sclk_o[0]), .sclk_oe(sclk_oe[0]), .ss_n_o(ss_n_o[0]), .ss_oe(ss_oe[0]),
    .d_o(d_o[0]), .d_oe(d_oe[0]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d), .ms_flag(ms0),
    .req_valid, .req, .req_ready, .tx_data, .tx_pop, .rx_valid, .rx_data, .m_done, .m_ack,
    .m_crc_err, .wr_valid(), .wr_addr(), .wr_data(), .rd_req(), .rd_req_addr(), .rd_addr(),
    .rd_data(16'h0), .s_crc_err(), .s_pass());

  // stand-ins for the DWT dies
  logic wv [2]; logic [31:0] wa [2]; logic [15:0] wd [2]; logic serr [2];
  for (genvar k = 0; k < 2; k++) begin : g_dwt
    uspi_node #(.LANES(4), .NODE_ID(4'(k + 2)), .MS_CAPABLE(1'b0)) u_n (
      .clk, .rst_n, .sclk_o(sclk_o[k+2]), .sclk_oe(sclk_oe[k+2]), .ss_n_o(ss_n_o[k+2]),
      .ss_oe(ss_oe[k+2]), .d_o(d_o[k+2]), .d_oe(d_oe[k+2]), .sclk_i(sclk), .ss_n_i(ss_n),
      .d_i(d), .ms_flag(), .req_valid(1'b0), .req('0), .req_ready(), .tx_data(16'h0),
      .tx_pop(), .rx_valid(), .rx_data(), .m_done(), .m_ack(), .m_crc_err(),
      .wr_valid(wv[k]), .wr_addr(wa[k]), .wr_data(wd[k]), .rd_req(), .rd_req_addr(), .rd_addr(),
      .rd_data(16'h0), .s_crc_err(serr[k]), .s_pass());
  end

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

  // ADC and sequencer: frame f gives channel c the code 64*f + 3*c (mod 2048)
  function automatic int code_of(int f, int c); return (64 * f + 3 * c) % 2048; endfunction
  int fno = 0;
  int frames_done = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      for (int s = 0; s < 4; s++) begin
        repeat (100) @(negedge clk);
        conv_ch = 2'(s);
        for (int k = 0; k < 4; k++) begin adc_done[k] = 1; adc_code[k] = adc_code_t'(code_of(fno, 4 * k + s)); end
        @(negedge clk);
        for (int k = 0; k < 4; k++) adc_done[k] = 0;
      end
      repeat (30) @(negedge clk);
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      frames_done = fno + 1;
      fno++;
    end
  end

  // words written into the two stand-ins
  int got [2][8]; int ngot [2];
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < 2; k++)
      if (wv[k]) begin
        if (wa[k] < 8) got[k][wa[k][2:0]] = int'(wd[k]);
        ngot[k]++;
      end

  // the frame a push carries: the one captured when the push leaves P_WAIT
  int pushed_f = -1;
  always @(posedge clk) if (rst_n && dut.ps == dut.P_WAIT && dut.frame_new) pushed_f = frames_done - 1;

  logic [15:0] rxq [32]; int nrx = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin rxq[nrx % 32] = rx_data; nrx++; end

  task automatic mcu(uspi_mode_e mode, int bl, int addr, logic [15:0] wdata);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req = '0;
    req.h1.mode = mode; req.h1.bl = 4'(bl); req.h1.amode = 2'd1; req.h1.crc = 1'b1;
    req.ssel = 4'd1; req.addr = 32'(addr);
    tx_data = wdata; nrx = 0;
    req_valid = 1;
    @(negedge clk) req_valid = 0;
    while (!m_done) @(negedge clk);
    check(m_ack || mode == USPI_READ, "MCU request acknowledged");
    check(!m_crc_err, "MCU read CRC");
  endtask

  initial begin
    ngot[0] = 0; ngot[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames_done == 2);
    mcu(USPI_READ, 15, 0, 0);
    for (int c = 0; c < 16; c++)
      check(int'(rxq[c]) == code_of(1, c), $sformatf("frame ch%0d %0d expected %0d", c, rxq[c], code_of(1, c)));
    mcu(USPI_READ, 1, 'h10, 0);
    check(int'(rxq[0]) >= 2, $sformatf("frame counter %0d", rxq[0]));
    check(rxq[1] == 0, "push counter starts at 0");

    for (int r = 0; r < 4; r++) begin
      int n0;
      mcu(USPI_WRITE, 0, 'h20, (r < 2) ? 16'd1 : 16'd3);     // CRC, then CRC+CAC
      mcu(USPI_READ, 0, 'h20, 0);
      check(rxq[0] == ((r < 2) ? 16'd1 : 16'd3), $sformatf("control register %0d", rxq[0]));
      n0 = ngot[0];
      mcu(USPI_PASS, 0, 0, 0);
      check(!ms0, "MCU gave up the M/S flag");
      while (!ms0) @(negedge clk);
      check(ngot[0] == n0 + 8 && ngot[1] == ngot[0], $sformatf("push %0d wrote %0d/%0d words", r, ngot[0] - n0, ngot[1]));
      // the frame pushed is the first one completed after the pass
      check(pushed_f >= 2, "a fresh frame was pushed");
      for (int c = 0; c < 16; c++)
        check(got[c / 8][c % 8] == code_of(pushed_f, c),
              $sformatf("push %0d ch%0d %0d expected %0d", r, c, got[c / 8][c % 8], code_of(pushed_f, c)));
      check(int'(push_cnt) == r + 1 && nak_cnt == 0, $sformatf("push counter %0d, NAKs %0d", push_cnt, nak_cnt));
    end
    check(!conflict && !serr[0] && !serr[1], "no bus conflict or CRC error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
