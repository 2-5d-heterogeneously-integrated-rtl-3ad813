// neuro_microsystem_top: the four dies of the 2.5D neural-sensing
// microsystem joined by the u-SPI on-interposer bus.
//
// Die-1 (acquisition): 16 AFE outputs enter four groups of four; an analog
// multiplexer per group feeds one 11-bit hybrid ADC (delay-line coarse
// tune + lifted SAR fine tune with re-comparison). acq_sequencer steps the
// multiplexers at 4x the channel rate and starts the conversions;
// die1_wrapper gathers the codes into 16-channel frames and serves them on
// the bus, or pushes them to the DWT dies when it is handed the M/S flag.
// Die-2 and Die-3 (feature extraction): each a dwt_die with two 4-channel,
// 5-level lifting DWT engines. Die-4 (MCU): the controller core is outside
// this design; its u-SPI master/slave module is here and its back-end
// interface is brought out as the mcu_* ports. At reset the MCU node holds
// the M/S flag. Node addresses: MCU 0, Die-1 1, Die-2 2, Die-3 3.
//
// The analog front ends are outside the design: afe_in are their output
// voltages (16-bit fractions of VDD). The analog multiplexers and the
// analog half of each ADC are behavioural models; everything else is
// synthesizable. One clock drives all dies (800 kHz gives the source's
// 2 kHz per channel with the default CONV_CYCLES = 100 and a
// 200 kHz u-SPI clock; the source runs the bus at 100 kHz and the FPGA
// and MCU at 400 kHz, which a second clock would restore).
module neuro_microsystem_top
  import neuro_pkg::*;
#(
  parameter int unsigned LANES       = 4,
  parameter int unsigned SCLK_HALF   = 2,
  parameter int unsigned CONV_CYCLES = 100,
  parameter int unsigned NLVL        = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  volt_t              afe_in [16],
  input  logic               acq_en,
  // MCU u-SPI back-end, master side
  input  logic               mcu_req_valid,
  input  uspi_req_t          mcu_req,
  output logic               mcu_req_ready,
  input  logic [15:0]        mcu_tx_data,
  output logic               mcu_tx_pop,
  output logic               mcu_rx_valid,
  output logic [15:0]        mcu_rx_data,
  output logic               mcu_done,
  output logic               mcu_ack,
  output logic               mcu_crc_err,
  // MCU u-SPI back-end, slave side
  output logic               mcu_wr_valid,
  output logic [USPI_AW-1:0] mcu_wr_addr,
  output logic [15:0]        mcu_wr_data,
  output logic [USPI_AW-1:0] mcu_rd_addr,
  input  logic [15:0]        mcu_rd_data,
  // status
  output logic [3:0]         ms_flags,
  output logic               adc_done [4],
  output adc_code_t          adc_code [4],
  output logic               adc_recmp [4],
  output logic [15:0]        frame_cnt,
  output logic [15:0]        push_cnt,
  output logic [15:0]        nak_cnt,
  output logic [3:0]         dwt_pg_sleep,
  output logic [3:0]         dwt_cg_en,
  output logic [3:0]         dwt_overrun,
  output logic [3:0]         dwt_q_ovf,
  output logic [1:0]         dwt_crc_err,
  output logic               bus_conflict
);
  localparam int N = 4;

  // ---------------- u-SPI bus ----------------
  logic sclk_o [N], sclk_oe [N], ss_n_o [N], ss_oe [N], d_oe [N];
  logic [LANES-1:0] d_o [N];
  logic sclk, ss_n;
  logic [LANES-1:0] d;

  uspi_bus #(.N(N), .LANES(LANES)) u_bus (
    .clk, .rst_n, .sclk_o, .sclk_oe, .ss_n_o, .ss_oe, .d_o, .d_oe,
    .sclk, .ss_n, .d, .conflict(bus_conflict));

  // ---------------- Die-4: MCU u-SPI module ----------------
  uspi_node #(.LANES(LANES), .NODE_ID(4'd0), .MS_INIT(1'b1), .MS_CAPABLE(1'b1),
              .SCLK_HALF(SCLK_HALF), .WORD_W(16), .NDEV(16)) u_mcu_spi (
    .clk, .rst_n, .sclk_o(sclk_o[0]), .sclk_oe(sclk_oe[0]), .ss_n_o(ss_n_o[0]), .ss_oe(ss_oe[0]),
    .d_o(d_o[0]), .d_oe(d_oe[0]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d), .ms_flag(ms_flags[0]),
    .req_valid(mcu_req_valid), .req(mcu_req), .req_ready(mcu_req_ready),
    .tx_data(mcu_tx_data), .tx_pop(mcu_tx_pop), .rx_valid(mcu_rx_valid), .rx_data(mcu_rx_data),
    .m_done(mcu_done), .m_ack(mcu_ack), .m_crc_err(mcu_crc_err),
    .wr_valid(mcu_wr_valid), .wr_addr(mcu_wr_addr), .wr_data(mcu_wr_data),
    .rd_req(), .rd_req_addr(), .rd_addr(mcu_rd_addr), .rd_data(mcu_rd_data),
    .s_crc_err(), .s_pass());

  // ---------------- Die-1: acquisition ----------------
  logic [1:0] mux_sel, conv_ch;
  logic conv_start, frame_start;

  acq_sequencer #(.NMUX(4), .CONV_CYCLES(CONV_CYCLES), .SETTLE(4)) u_seq (
    .clk, .rst_n, .en(acq_en), .mux_sel, .conv_start, .conv_ch, .frame_start);

  for (genvar k = 0; k < 4; k++) begin : g_adc
    volt_t grp [4];
    volt_t vmux;
    logic coarse_start, coarse_valid, tdc_sample, dac_sample, cmp_req, cmp_done, cmp_out;
    logic [TDC_TAPS-1:0] tdc;
    logic [COARSE_BITS-1:0] coarse_q, lift;
    logic [FINE_BITS-1:0] trial;

    for (genvar j = 0; j < 4; j++) begin : g_grp
      assign grp[j] = afe_in[k*4 + j];
    end

    analog_mux_model #(.NIN(4), .SETTLE(2)) u_mux (
      .clk, .rst_n, .afe(grp), .sel(mux_sel), .out(vmux));

    hadc_analog_model u_ana (
      .clk, .rst_n, .vin(vmux), .coarse_start, .tdc, .tdc_sample,
      .lift, .trial, .dac_sample, .cmp_req, .cmp_done, .cmp_out);

    hadc_coarse_encoder u_enc (
      .clk, .rst_n, .sample(tdc_sample), .tdc, .q(coarse_q), .valid(coarse_valid));

    hadc_sar_ctrl u_sar (
      .clk, .rst_n, .start(conv_start), .coarse_start, .coarse_valid, .coarse_q,
      .lift, .trial, .dac_sample, .cmp_req, .cmp_done, .cmp_out,
      .busy(), .done(adc_done[k]), .code(adc_code[k]), .recmp(adc_recmp[k]));
  end

  die1_wrapper #(.NADC(4), .NMUX(4), .NODE_ID(4'd1), .HOME_ID(4'd0), .DWT_A_ID(4'd2),
                 .DWT_B_ID(4'd3), .LANES(LANES), .SCLK_HALF(SCLK_HALF)) u_die1 (
    .clk, .rst_n, .adc_done, .adc_code, .conv_ch, .frame_start,
    .sclk_o(sclk_o[1]), .sclk_oe(sclk_oe[1]), .ss_n_o(ss_n_o[1]), .ss_oe(ss_oe[1]),
    .d_o(d_o[1]), .d_oe(d_oe[1]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d),
    .ms_flag(ms_flags[1]), .frame_cnt, .push_cnt, .nak_cnt);

  // ---------------- Die-2 and Die-3: DWT ----------------
  for (genvar f = 0; f < 2; f++) begin : g_fpga
    dwt_die #(.NODE_ID(4'(f + 2)), .LANES(LANES), .SCLK_HALF(SCLK_HALF), .NLVL(NLVL),
              .QDEPTH(32)) u_die (
      .clk, .rst_n,
      .sclk_o(sclk_o[f+2]), .sclk_oe(sclk_oe[f+2]), .ss_n_o(ss_n_o[f+2]), .ss_oe(ss_oe[f+2]),
      .d_o(d_o[f+2]), .d_oe(d_oe[f+2]), .sclk_i(sclk), .ss_n_i(ss_n), .d_i(d),
      .pg_sleep(dwt_pg_sleep[2*f +: 2]), .cg_en(dwt_cg_en[2*f +: 2]),
      .overrun(dwt_overrun[2*f +: 2]), .q_ovf(dwt_q_ovf[2*f +: 2]), .crc_err(dwt_crc_err[f]));
    assign ms_flags[f+2] = 1'b0;
  end
endmodule
