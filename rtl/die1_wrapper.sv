// die1_wrapper: u-SPI wrapper of the acquisition die.
//
// Collects the 11-bit codes of the four hybrid ADCs into a 16-channel
// frame (ADC k converts channels 4k..4k+3, one per multiplexer slot) and
// makes the frame available on the u-SPI bus in two ways:
//  * as a slave: the MCU reads the last complete frame at addresses
//    0x00-0x0F (one channel per word), the frame counter at 0x10 and the
//    number of frames pushed at 0x11; the control register at 0x20
//    (bit 0 CRC, bit 1 CAC for pushed packets) is read/write;
//  * as a master: when the MCU passes it the M/S flag, it waits for the
//    next complete frame, writes channels 0-7 to the first DWT die and
//    channels 8-15 to the second (addresses 0x00-0x07 on each, 8-word
//    bursts with a 1-byte address), then passes the flag back to node
//    HOME_ID. A push that is not acknowledged is counted in nak_cnt.
// The source names this wrapper only; everything here beyond "ADC results
// onto the u-SPI bus" is this design's own.
//
// A frame is complete at frame_start, when the multiplexers return to
// channel 0; the codes converted since the previous frame_start are then
// copied into the frame buffer. While a push is under way the buffer is
// frozen and a frame that completes meanwhile is skipped (frame_cnt counts
// captured frames), so a push carries one coherent frame: the first one
// completed after the flag arrived. A slave burst read is not frozen: the
// MCU reads a coherent frame by starting right after frame_cnt advances
// (a 16-word read takes about 300 clocks, a frame 4 x CONV_CYCLES).
module die1_wrapper
  import neuro_pkg::*;
#(
  parameter int unsigned NADC      = 4,
  parameter int unsigned NMUX      = 4,
  parameter logic [3:0]  NODE_ID   = 4'd1,
  parameter logic [3:0]  HOME_ID   = 4'd0,
  parameter logic [3:0]  DWT_A_ID  = 4'd2,
  parameter logic [3:0]  DWT_B_ID  = 4'd3,
  parameter int unsigned LANES     = 4,
  parameter int unsigned SCLK_HALF = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // ADCs and sequencer
  input  logic             adc_done [NADC],
  input  adc_code_t        adc_code [NADC],
  input  logic [$clog2(NMUX)-1:0] conv_ch,
  input  logic             frame_start,
  // u-SPI PHY
  output logic             sclk_o,
  output logic             sclk_oe,
  output logic             ss_n_o,
  output logic             ss_oe,
  output logic [LANES-1:0] d_o,
  output logic             d_oe,
  input  logic             sclk_i,
  input  logic             ss_n_i,
  input  logic [LANES-1:0] d_i,
  // status
  output logic             ms_flag,
  output logic [15:0]      frame_cnt,
  output logic [15:0]      push_cnt,
  output logic [15:0]      nak_cnt
);
  localparam int NCH = NADC * NMUX;
  localparam int W = 16;

  adc_code_t live  [NCH];
  adc_code_t frame [NCH];
  logic      frame_new;
  logic [1:0] ctrl;

  // slave back-end
  logic wr_valid, rd_req;
  logic [USPI_AW-1:0] wr_addr, rd_addr, rd_req_addr;
  logic [W-1:0] wr_data, rd_data;
  // master back-end
  logic req_valid, req_ready, tx_pop, m_done, m_ack;
  uspi_req_t req;
  logic [W-1:0] tx_data;
  logic [3:0] tx_idx;

  typedef enum logic [2:0] {P_IDLE, P_WAIT, P_A, P_B, P_PASS, P_DONE} push_e;
  push_e ps;

  uspi_node #(.LANES(LANES), .NODE_ID(NODE_ID), .MS_INIT(1'b0), .MS_CAPABLE(1'b1),
              .SCLK_HALF(SCLK_HALF), .WORD_W(W), .NDEV(16)) u_spi (
    .clk, .rst_n, .sclk_o, .sclk_oe, .ss_n_o, .ss_oe, .d_o, .d_oe, .sclk_i, .ss_n_i, .d_i,
    .ms_flag,
    .req_valid, .req, .req_ready, .tx_data, .tx_pop, .rx_valid(), .rx_data(),
    .m_done, .m_ack, .m_crc_err(),
    .wr_valid, .wr_addr, .wr_data, .rd_req, .rd_req_addr, .rd_addr, .rd_data,
    .s_crc_err(), .s_pass());

  // frame capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin live[c] <= '0; frame[c] <= '0; end
      frame_cnt <= '0;
      frame_new <= 1'b0;
      ctrl      <= 2'b01;
    end else begin
      for (int k = 0; k < NADC; k++)
        if (adc_done[k]) live[k * NMUX + int'(conv_ch)] <= adc_code[k];
      if (frame_start && ps != P_A && ps != P_B) begin
        for (int c = 0; c < NCH; c++) frame[c] <= live[c];
        frame_cnt <= frame_cnt + 1'b1;
        frame_new <= 1'b1;
      end else if (ps == P_IDLE || (ps == P_WAIT && frame_new)) begin
        frame_new <= 1'b0;
      end
      if (wr_valid && wr_addr == 32'h20) ctrl <= wr_data[1:0];
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr < 32'(NCH))      rd_data = W'(frame[rd_addr[$clog2(NCH)-1:0]]);
    else if (rd_addr == 32'h10)  rd_data = frame_cnt;
    else if (rd_addr == 32'h11)  rd_data = push_cnt;
    else if (rd_addr == 32'h20)  rd_data = W'(ctrl);
  end

  // push sequence while holding the M/S flag
  function automatic uspi_req_t push_req(input logic [3:0] dst, input logic [1:0] c);
    uspi_req_t r;
    r = '0;
    r.h1.mode  = USPI_WRITE;
    r.h1.bl    = 4'd7;                 // 8 words
    r.h1.amode = 2'd1;                 // 1 address byte
    r.h1.crc   = c[0];
    r.h1.cac   = c[1];
    r.ssel     = dst;
    return r;
  endfunction

  logic issued;
  always_comb begin
    req = '0;
    req_valid = 1'b0;
    unique case (ps)
      P_A:    begin req = push_req(DWT_A_ID, ctrl); req_valid = req_ready && !issued; end
      P_B:    begin req = push_req(DWT_B_ID, ctrl); req_valid = req_ready && !issued; end
      P_PASS: begin
        req.h1.mode = USPI_PASS;
        req.ssel    = HOME_ID;
        req_valid   = req_ready && !issued;
      end
      default: ;
    endcase
  end

  assign tx_data = W'(frame[tx_idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= P_IDLE; tx_idx <= '0; push_cnt <= '0; nak_cnt <= '0; issued <= 1'b0;
    end else begin
      if (tx_pop) tx_idx <= tx_idx + 1'b1;
      if (req_valid) issued <= 1'b1;
      unique case (ps)
        P_IDLE: if (ms_flag) ps <= P_WAIT;
        P_WAIT: if (frame_new) begin ps <= P_A; tx_idx <= '0; end
        P_A, P_B: if (issued && m_done) begin
          issued <= 1'b0;
          if (!m_ack) nak_cnt <= nak_cnt + 1'b1;
          ps <= (ps == P_A) ? P_B : P_PASS;
        end
        P_PASS: if (issued && m_done) begin
          issued <= 1'b0;
          push_cnt <= push_cnt + 1'b1;
          ps <= P_DONE;
        end
        P_DONE: if (!ms_flag) ps <= P_IDLE;
        default: ps <= P_IDLE;
      endcase
    end
  end
endmodule
