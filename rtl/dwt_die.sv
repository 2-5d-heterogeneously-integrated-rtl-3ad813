// dwt_die: one feature-extraction die (low-power FPGA) with two 4-channel
// DWT engines behind a u-SPI slave.
//
// Sixteen channels are covered by four time-multiplexed 4-channel DWTs on
// two FPGA dies, so each die holds two dwt_engine instances (channels 0-3
// and 4-7 of the die) and one u-SPI node. The split follows the source;
// the register map and the data formats below are this design's own.
//
// Writes (u-SPI WRITE):
//   0x00-0x07  new 11-bit ADC sample of die channel 0..7; it enters the
//              DWT as the 10-bit signed value (code - 1024) >>> 1. Writing
//              address 0x07 closes the sampling period: one cycle later
//              both engines get sample_tick.
//   0x20-0x27  mother wavelet of channel 0..7 (0 Haar, 1 D2, 2 Sym4, 3 Sym6)
//   0x40-0x7F  coefficient memory of both engines: bits [5:4] wavelet,
//              [3:1] step, [0] Di/Dj; data bits [5:0] the coefficient x16
// Reads (u-SPI READ):
//   0x100-0x1FF  pop the result queue of engine A (channels 0-3)
//   0x200-0x2FF  pop the result queue of engine B (channels 4-7)
//                word = {ch[2:0], kind[2:0], value[9:0]}: kind 0-4 is the
//                detail of level 1-5, kind 5 the level-5 approximation;
//                0xFFFF when the queue is empty
//   0x10         status {10'b0, ovfB, ovfA, overrunB, overrunA, busy, sleep}
//   0x20-0x27    wavelet registers
// Power gating of the engines is reported on pg_sleep; on the FPGA it is
// the device's power-saving mode.
// The die is a slave only (its node is built without master capability),
// so the SCLK and SS drivers of its node stay disabled: synthesis reduces
// those outputs to constants, and the top's M/S flags of nodes 2 and 3 are
// constant 0 for the same reason.
module dwt_die
  import neuro_pkg::*;
#(
  parameter logic [3:0]  NODE_ID   = 4'd2,
  parameter int unsigned LANES     = 4,
  parameter int unsigned SCLK_HALF = 2,
  parameter int unsigned NLVL      = 5,
  parameter int unsigned QDEPTH    = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             sclk_o,
  output logic             sclk_oe,
  output logic             ss_n_o,
  output logic             ss_oe,
  output logic [LANES-1:0] d_o,
  output logic             d_oe,
  input  logic             sclk_i,
  input  logic             ss_n_i,
  input  logic [LANES-1:0] d_i,
  output logic [1:0]       pg_sleep,
  output logic [1:0]       cg_en,
  output logic [1:0]       overrun,
  output logic [1:0]       q_ovf,
  output logic             crc_err
);
  localparam int W = 16;

  logic wr_valid, rd_req;
  logic [USPI_AW-1:0] wr_addr, rd_addr, rd_req_addr;
  logic [W-1:0] wr_data, rd_data;

  uspi_node #(.LANES(LANES), .NODE_ID(NODE_ID), .MS_INIT(1'b0), .MS_CAPABLE(1'b0),
              .SCLK_HALF(SCLK_HALF), .WORD_W(W), .NDEV(16)) u_spi (
    .clk, .rst_n, .sclk_o, .sclk_oe, .ss_n_o, .ss_oe, .d_o, .d_oe, .sclk_i, .ss_n_i, .d_i,
    .ms_flag(),
    .req_valid(1'b0), .req('0), .req_ready(), .tx_data('0), .tx_pop(), .rx_valid(), .rx_data(),
    .m_done(), .m_ack(), .m_crc_err(),
    .wr_valid, .wr_addr, .wr_data, .rd_req, .rd_req_addr, .rd_addr, .rd_data,
    .s_crc_err(crc_err), .s_pass());

  // ---------------- register writes ----------------
  wavelet_e wv [8];
  logic tick;
  logic [1:0] in_we;
  dwt_data_t in_data;
  logic cw_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 8; c++) wv[c] <= WV_HAAR;
      tick <= 1'b0;
    end else begin
      tick <= wr_valid && wr_addr == 32'h07;
      if (wr_valid && wr_addr[31:3] == 29'h4) wv[wr_addr[2:0]] <= wavelet_e'(wr_data[1:0]);
    end
  end

  assign in_data = dwt_data_t'(($signed({1'b0, wr_data[10:0]}) - 12'sd1024) >>> 1);
  assign in_we[0] = wr_valid && wr_addr[31:2] == 30'h0;
  assign in_we[1] = wr_valid && wr_addr[31:2] == 30'h1;
  assign cw_we    = wr_valid && wr_addr[31:6] == 26'h1;

  // ---------------- engines and result queues ----------------
  logic       o_valid [2];
  logic [1:0] o_ch [2];
  logic [2:0] o_lvl [2];
  dwt_data_t  o_d [2], o_a [2];
  logic       busy [2];
  logic       a_pend [2];
  logic [W-1:0] a_word [2];
  logic       q_push [2], q_pop [2], q_empty [2];
  logic [W-1:0] q_din [2], q_dout [2];

  for (genvar e = 0; e < 2; e++) begin : g_eng
    wavelet_e wv_e [4];
    for (genvar c = 0; c < 4; c++) begin : g_wv
      assign wv_e[c] = wv[e*4 + c];
    end

    dwt_engine #(.NCH(4), .NLVL(NLVL)) u_dwt (
      .clk, .rst_n, .in_we(in_we[e]), .in_ch(wr_addr[1:0]), .in_data, .sample_tick(tick),
      .wv(wv_e), .cw_we, .cw_wv(wavelet_e'(wr_addr[5:4])), .cw_step(wr_addr[3:1]),
      .cw_sel(wr_addr[0]), .cw_data(dwt_coef_t'(wr_data[5:0])),
      .out_valid(o_valid[e]), .out_ch(o_ch[e]), .out_lvl(o_lvl[e]), .out_d(o_d[e]), .out_a(o_a[e]),
      .busy(busy[e]), .cg_en(cg_en[e]), .pg_sleep(pg_sleep[e]), .overrun(overrun[e]));

    // the top level's approximation follows its detail one cycle later
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_pend[e] <= 1'b0;
        a_word[e] <= '0;
      end else begin
        a_pend[e] <= o_valid[e] && o_lvl[e] == 3'(NLVL - 1);
        a_word[e] <= {1'(e), o_ch[e], 3'(NLVL), o_a[e]};
      end
    end

    assign q_push[e] = o_valid[e] || a_pend[e];
    assign q_din[e]  = o_valid[e] ? {1'(e), o_ch[e], o_lvl[e], o_d[e]} : a_word[e];
    assign q_pop[e]  = rd_req && rd_req_addr[31:8] == 24'(e + 1);

    sync_fifo #(.W(W), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .push(q_push[e]), .din(q_din[e]), .pop(q_pop[e]), .dout(q_dout[e]),
      .empty(q_empty[e]), .full(), .count(), .ovf(q_ovf[e]));
  end

  // ---------------- register reads ----------------
  always_comb begin
    rd_data = '0;
    if (rd_addr[31:8] == 24'd1)      rd_data = q_empty[0] ? 16'hFFFF : q_dout[0];
    else if (rd_addr[31:8] == 24'd2) rd_data = q_empty[1] ? 16'hFFFF : q_dout[1];
    else if (rd_addr == 32'h10)
      rd_data = {10'b0, q_ovf[1], q_ovf[0], overrun[1], overrun[0], busy[0] | busy[1],
                 pg_sleep[0] & pg_sleep[1]};
    else if (rd_addr[31:3] == 29'h4) rd_data = {14'b0, wv[rd_addr[2:0]]};
  end
endmodule
