// tb_dwt_die: self-checking test of one DWT die behind its u-SPI slave.
//
// A u-SPI master node (node 0) and the die (node 2) share a two-node bus.
// The test:
//  * reads the eight wavelet registers back after a burst write that sets
//    channels 0-3 to Haar and 4-7 to D2, and reads the status register;
//  * checks that an empty result queue reads 0xFFFF;
//  * for 32 sampling periods writes eight 11-bit samples (one 8-word burst
//    to 0x00-0x07, which closes the period) and drains both result queues
//    with 16-word READ bursts (CRC on, CAC on every other period);
//  * checks that every channel and level produced the number of results
//    its schedule gives for 32 periods (16, 8, 4, 2, 1 details and one
//    level-5 approximation), and compares every level-1 Haar detail with
//    sat(floor(11 * sat(x[2m-3] - x[2m-4]) / 16)) computed here from the
//    samples written (a detail leaves the die two periods after the pair
//    it belongs to was completed, the first two are zero);
//  * checks that no overrun, queue overflow or CRC error was flagged.
// Timing: one period per sample burst plus the drains, well above the
// engine's 200-cycle period.
module tb_dwt_die;
  import neuro_pkg::*;
  localparam int PERIODS = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk_o [2], sclk_oe [2], ss_n_o [2], ss_oe [2], d_oe [2];
  logic [3:0] d_o [2];
  logic sclk, ss_n, conflict; logic [3:0] d;
  uspi_bus #(.N(2), .LANES(4)) u_bus (.*);

  logic [1:0] pg_sleep, cg_en, overrun, q_ovf; logic crc_err;
  dwt_die #(.NODE_ID(4'd2)) dut (
    .clk, .rst_n, .sclk_o(sclk_o[1]), .sclk_oe(sclk_oe[1]), .ss_n_o(ss_n_o[1]), .ss_oe(ss_oe[1]),
    .d_o(d_o[1]), .d_oe(d_oe[1]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d),
    .pg_sleep, .cg_en, .overrun, .q_ovf, .crc_err);

  logic req_valid = 0, req_ready, tx_pop, rx_valid, m_done, m_ack, m_crc_err, ms_flag;
  uspi_req_t req = '0; logic [15:0] tx_data, rx_data;
  uspi_node #(.LANES(4), .NODE_ID(4'd0), .MS_INIT(1'b1)) u_master (
    .clk, .rst_n, .sclk_o(sclk_o[0]), .sclk_oe(sclk_oe[0]), .ss_n_o(ss_n_o[0]), .ss_oe(ss_oe[0]),
    .d_o(d_o[0]), .d_oe(d_oe[0]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d), .ms_flag,
    .req_valid, .req, .req_ready, .tx_data, .tx_pop, .rx_valid, .rx_data, .m_done, .m_ack,
    .m_crc_err, .wr_valid(), .wr_addr(), .wr_data(), .rd_req(), .rd_req_addr(), .rd_addr(),
    .rd_data(16'h0), .s_crc_err(), .s_pass());

  logic [15:0] txq [8]; int txh = 0;
  logic [15:0] rxq [64]; int nrx = 0;
  assign tx_data = txq[txh % 8];
  always @(posedge clk) if (rst_n) begin
    if (tx_pop) txh++;
    if (rx_valid) begin rxq[nrx % 64] = rx_data; nrx++; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(uspi_mode_e mode, int bl, int amode, bit cac, int addr);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req = '0;
    req.h1.mode = mode; req.h1.bl = 4'(bl); req.h1.amode = 2'(amode);
    req.h1.crc = 1'b1; req.h1.cac = cac; req.ssel = 4'd2; req.addr = 32'(addr);
    txh = 0; nrx = 0;
    req_valid = 1;
    @(negedge clk) req_valid = 0;
    while (!m_done) @(negedge clk);
    if (mode == USPI_WRITE) check(m_ack, $sformatf("write to 0x%0h acknowledged", addr));
    else check(!m_crc_err, $sformatf("read of 0x%0h CRC", addr));
  endtask

  function automatic int fl16(int v); return v >>> 4; endfunction
  function automatic int sat(int v); return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction

  int xin [8][PERIODS];
  int res [8][6][PERIODS]; int nres [8][6];
  task automatic drain(int eng, bit cac);
    xfer(USPI_READ, 15, 2, cac, (eng + 1) * 256);
    for (int i = 0; i < nrx; i++)
      if (rxq[i] != 16'hFFFF) begin
        int c, k;
        c = int'(rxq[i][15:13]); k = int'(rxq[i][12:10]);
        check(k < 6 && c / 4 == eng, $sformatf("result word %h from queue %0d", rxq[i], eng));
        if (k < 6) begin
          res[c][k][nres[c][k] % PERIODS] = int'($signed(rxq[i][9:0]));
          nres[c][k]++;
        end
      end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) for (int k = 0; k < 6; k++) nres[c][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wavelet registers
    for (int c = 0; c < 8; c++) txq[c] = (c < 4) ? 16'd0 : 16'd1;
    xfer(USPI_WRITE, 7, 1, 0, 'h20);
    xfer(USPI_READ, 7, 1, 0, 'h20);
    for (int c = 0; c < 8; c++)
      check(rxq[c] == ((c < 4) ? 16'd0 : 16'd1), $sformatf("wavelet register %0d reads %0d", c, rxq[c]));
    xfer(USPI_READ, 0, 1, 0, 'h10);
    check(rxq[0][5:2] == 4'b0, $sformatf("status %h", rxq[0]));
    xfer(USPI_READ, 1, 2, 0, 'h100);
    check(rxq[0] == 16'hFFFF && rxq[1] == 16'hFFFF, "empty queue reads 0xFFFF");

    for (int p = 0; p < PERIODS; p++) begin
      for (int c = 0; c < 8; c++) begin
        int code;
        code = int'($urandom_range(2047));
        txq[c] = 16'(code);
        xin[c][p] = (code - 1024) >>> 1;
      end
      xfer(USPI_WRITE, 7, 1, p % 2, 'h00);
      drain(0, p % 2);
      drain(1, p % 2);
    end
    repeat (400) @(negedge clk);
    repeat (2) begin drain(0, 0); drain(1, 0); end

    for (int c = 0; c < 8; c++) begin
      for (int l = 0; l < 5; l++)
        check(nres[c][l] == PERIODS >> (l + 1), $sformatf("ch%0d L%0d results %0d", c, l + 1, nres[c][l]));
      check(nres[c][5] == 1, $sformatf("ch%0d approximations %0d", c, nres[c][5]));
    end
    for (int c = 0; c < 4; c++)
      for (int m = 0; m < PERIODS / 2; m++) begin
        int e;
        e = (m < 2) ? 0 : sat(fl16(11 * sat(xin[c][2*(m-2)+1] - xin[c][2*(m-2)])));
        check(res[c][0][m] == e, $sformatf("ch%0d Haar d1[%0d] %0d expected %0d", c, m, res[c][0][m], e));
      end
    check(overrun == 0 && q_ovf == 0 && !crc_err && !conflict,
          $sformatf("flags: overrun %b overflow %b crc %b", overrun, q_ovf, crc_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
