// uspi_node: master/slave module of the u-SPI on-interposer bus.
//
// u-SPI is an SPI-like bus with n bidirectional data lanes D[n-1:0], a
// clock SCLK and a select SS, shared by all dies on the interposer. A
// packet starts with a hierarchical header: a fixed 12-bit first level
// (mode, broadcast, BL mode, burst length BL, address mode, CRC, CAC) that
// tells the receivers how long the variable second level is (S-Sel-1, a
// 4-bit slave address, or S-Sel-2, a broadcast bit mask; the 8-bit burst
// multiplier BLM when BL mode is set; 0, 1, 2 or 4 address bytes). The
// header fields and widths follow the source.
//
// Every node holds a master header encoder and a slave header decoder; the
// M/S flag chooses which one owns the PHY. Exactly one node has the flag
// set. It drives SCLK and SS and starts packets from its back-end request
// port. A USPI_PASS packet hands the flag to the addressed node (pseudo
// multi-master by master passing): the addressed node acknowledges, and at
// the end of the packet the old master clears its flag and the new one
// sets it.
//
// Packet layout after the header, this design's own (the source gives only
// the header): WRITE: master sends (BL+1)*(BLM+1) words of WORD_W bits, a
// CRC byte if CRC is set, then, unless broadcast, one turnaround beat and
// one ACK beat driven by the slave (all lanes 1 = received correctly;
// nobody driving reads as 0 = not acknowledged). READ: a turnaround beat,
// then the selected slave sends the words and the CRC byte. PASS: a
// turnaround beat and the ACK beat. With CAC set, data and CRC beats use
// only the even lanes and hold the odd lanes at 0, so no two adjacent
// wires switch in opposite directions (shielding crosstalk avoidance).
//
// PHY (this design's choice): all nodes run from one system clock. SCLK is
// generated by the master as clk/(2*SCLK_HALF), low when idle; each beat
// starts with SCLK low, the sender changes data at the start of the beat,
// the slave samples on the rising edge and the master samples at the end
// of the beat. A slave registers SCLK, SS and D once and acts on the
// registered edges, so SCLK_HALF must be at least 2. Lines are never
// driven high-impedance: every node has *_o/*_oe pairs and uspi_bus
// resolves them.
//
// Fields go most significant bit first; a beat carries LANES bits, the
// first on lane LANES-1. LANES must divide 4 (1, 2 or 4; CAC needs 2 or
// 4).
module uspi_node
  import neuro_pkg::*;
#(
  parameter int unsigned LANES      = 4,
  parameter logic [3:0]  NODE_ID    = 4'd0,
  parameter bit          MS_INIT    = 1'b0,
  parameter bit          MS_CAPABLE = 1'b1,
  parameter int unsigned SCLK_HALF  = 2,
  parameter int unsigned WORD_W     = 16,
  parameter int unsigned NDEV       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // PHY
  output logic              sclk_o,
  output logic              sclk_oe,
  output logic              ss_n_o,
  output logic              ss_oe,
  output logic [LANES-1:0]  d_o,
  output logic              d_oe,
  input  logic              sclk_i,
  input  logic              ss_n_i,
  input  logic [LANES-1:0]  d_i,
  output logic              ms_flag,
  // master back-end
  input  logic              req_valid,
  input  uspi_req_t         req,
  output logic              req_ready,
  input  logic [WORD_W-1:0] tx_data,
  output logic              tx_pop,
  output logic              rx_valid,
  output logic [WORD_W-1:0] rx_data,
  output logic              m_done,
  output logic              m_ack,
  output logic              m_crc_err,
  // slave back-end
  output logic              wr_valid,
  output logic [USPI_AW-1:0] wr_addr,
  output logic [WORD_W-1:0] wr_data,
  output logic              rd_req,      // a word was taken from rd_data at rd_req_addr
  output logic [USPI_AW-1:0] rd_req_addr,
  output logic [USPI_AW-1:0] rd_addr,
  input  logic [WORD_W-1:0] rd_data,
  output logic              s_crc_err,
  output logic              s_pass
);
  localparam int unsigned SW   = 32;
  localparam int unsigned HALF = (LANES >= 2) ? LANES / 2 : 1;
  localparam int unsigned BPW  = (SCLK_HALF >= 2) ? SCLK_HALF : 2;

  typedef enum logic [3:0] {F_H1, F_SEL, F_BLM, F_ADDR, F_DATA, F_CRC, F_TURN, F_ACK, F_END} field_e;

  // ---------------- packet structure, shared by both sides ----------------
  function automatic field_e first_payload(input uspi_h1_t h);
    case (h.mode)
      USPI_WRITE: return F_DATA;
      USPI_READ,
      USPI_PASS:  return h.bcast ? F_END : F_TURN;
      default:    return F_END;
    endcase
  endfunction

  function automatic field_e after_data(input uspi_h1_t h);
    return (h.mode == USPI_WRITE && !h.bcast) ? F_TURN : F_END;
  endfunction

  function automatic field_e next_field(input field_e f, input uspi_h1_t h, input logic more);
    case (f)
      F_H1:   return F_SEL;
      F_SEL:  return h.blm_en ? F_BLM : (h.amode != 2'd0 ? F_ADDR : first_payload(h));
      F_BLM:  return h.amode != 2'd0 ? F_ADDR : first_payload(h);
      F_ADDR: return first_payload(h);
      F_DATA: return more ? F_DATA : (h.crc ? F_CRC : after_data(h));
      F_CRC:  return after_data(h);
      F_TURN: return (h.mode == USPI_READ) ? F_DATA : F_ACK;
      default: return F_END;
    endcase
  endfunction

  function automatic int unsigned field_len(input field_e f, input uspi_h1_t h);
    case (f)
      F_H1:   return 12;
      F_SEL:  return h.bcast ? NDEV : 4;
      F_BLM:  return 8;
      F_ADDR: return 8 * uspi_addr_bytes(h.amode);
      F_DATA: return WORD_W;
      F_CRC:  return 8;
      F_TURN, F_ACK: return LANES;
      default: return 0;
    endcase
  endfunction

  function automatic logic is_cac(input field_e f, input uspi_h1_t h);
    return h.cac && LANES >= 2 && (f == F_DATA || f == F_CRC);
  endfunction

  function automatic logic master_drives(input field_e f, input uspi_h1_t h);
    case (f)
      F_H1, F_SEL, F_BLM, F_ADDR: return 1'b1;
      F_DATA, F_CRC: return h.mode == USPI_WRITE;
      default: return 1'b0;
    endcase
  endfunction

  // beat of lanes from the top of a left-aligned shift register
  function automatic logic [LANES-1:0] pack(input logic [SW-1:0] sh, input logic cac);
    logic [LANES-1:0] l;
    l = sh[SW-1 -: LANES];
    if (cac) begin
      l = '0;
      for (int k = 0; k < int'(HALF); k++) l[2*k] = sh[SW-int'(HALF)+k];
    end
    return l;
  endfunction

  // append the bits of a beat to a right-aligned receive register
  function automatic logic [SW-1:0] unpack(input logic [SW-1:0] rx, input logic [LANES-1:0] l,
                                           input logic cac);
    logic [SW-1:0] r;
    if (cac) begin
      r = rx << HALF;
      for (int k = 0; k < int'(HALF); k++) r[k] = l[2*k];
    end else begin
      r = (rx << LANES) | SW'(l);
    end
    return r;
  endfunction

  function automatic logic [SW-1:0] left(input logic [SW-1:0] v, input int unsigned len);
    return (len == 0) ? '0 : v << (SW - len);
  endfunction

  function automatic logic [5:0] bpb(input logic cac);
    return cac ? 6'(HALF) : 6'(LANES);
  endfunction

  // ============================ master side ============================
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_LAST} mstate_e;
  mstate_e   m_st;
  uspi_req_t m_rq;
  field_e    m_f;
  logic [SW-1:0] m_sh, m_rx;
  logic [5:0]    m_left;                  // bits left in the field
  logic [12:0]   m_wleft;                 // words left after the current one
  logic [$clog2(2*BPW)-1:0] m_ph;
  logic [7:0]    m_crc, m_crc_nx;
  logic [WORD_W-1:0] m_crc_word;
  logic          m_acked;
  logic          m_cac;
  logic [LANES-1:0] m_bits;
  logic [SW-1:0] m_rxv;
  logic [LANES-1:0] m_do;
  logic          m_doe;

  uspi_crc8 #(.DW(WORD_W)) u_mcrc (.crc_in(m_crc), .data(m_crc_word), .crc_out(m_crc_nx));

  assign req_ready = ms_flag && m_st == M_IDLE;
  assign m_cac     = is_cac(m_f, m_rq.h1);
  assign m_bits    = d_i;
  assign m_rxv     = unpack(m_rx, m_bits, m_cac);
  // word folded into the master CRC: the word being sent, or the word just received
  assign m_crc_word = (m_rq.h1.mode == USPI_WRITE) ? tx_data : m_rxv[WORD_W-1:0];

  // value loaded into the master shift register at the start of a field
  function automatic logic [SW-1:0] m_field_value(input field_e f, input uspi_req_t r,
                                                  input logic [WORD_W-1:0] w, input logic [7:0] c);
    case (f)
      F_H1:   return left(SW'(r.h1), 12);
      F_SEL:  return r.h1.bcast ? left(SW'(r.smask[NDEV-1:0]), NDEV) : left(SW'(r.ssel), 4);
      F_BLM:  return left(SW'(r.blm), 8);
      F_ADDR: return left(r.addr, 8 * uspi_addr_bytes(r.h1.amode));
      F_DATA: return left(SW'(w), WORD_W);
      F_CRC:  return left(SW'(c), 8);
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_st <= M_IDLE; m_rq <= '0; m_f <= F_END; m_sh <= '0; m_rx <= '0;
      m_left <= '0; m_wleft <= '0; m_ph <= '0; m_crc <= '0; m_acked <= 1'b0;
      sclk_o <= 1'b0; ss_n_o <= 1'b1; m_do <= '0; m_doe <= 1'b0;
      tx_pop <= 1'b0; rx_valid <= 1'b0; rx_data <= '0;
      m_done <= 1'b0; m_ack <= 1'b0; m_crc_err <= 1'b0;
    end else begin
      tx_pop <= 1'b0; rx_valid <= 1'b0; m_done <= 1'b0;
      unique case (m_st)
        M_IDLE: begin
          sclk_o <= 1'b0; ss_n_o <= 1'b1; m_doe <= 1'b0;
          if (req_valid && ms_flag) begin
            m_rq    <= req;
            m_f     <= F_H1;
            m_sh    <= left(SW'(req.h1), 12) << LANES;
            m_left  <= 6'd12;
            m_crc   <= '0;
            m_acked <= 1'b0;
            m_crc_err <= 1'b0;
            m_wleft <= 13'(uspi_words(req.h1, req.blm) - 1);
            m_ph    <= '0;
            ss_n_o  <= 1'b0;
            m_do     <= pack(left(SW'(req.h1), 12), 1'b0);
            m_doe    <= 1'b1;
            m_st    <= M_RUN;
          end
        end
        M_RUN: begin
          m_ph <= m_ph + 1'b1;
          if (m_ph == $bits(m_ph)'(SCLK_HALF - 1)) sclk_o <= 1'b1;
          if (m_ph == $bits(m_ph)'(2 * SCLK_HALF - 1)) begin
            // end of a beat
            logic [SW-1:0] rxv;
            logic [5:0] nleft;
            field_e nf;
            logic [SW-1:0] nval;
            m_ph   <= '0;
            sclk_o <= 1'b0;
            rxv    = m_rxv;
            if (!master_drives(m_f, m_rq.h1)) m_rx <= rxv;
            nleft  = m_left - bpb(m_cac);
            m_left <= nleft;
            if (nleft != 0) begin
              // next beat of the same field
              if (master_drives(m_f, m_rq.h1)) begin
                m_do  <= pack(m_sh, m_cac);
                m_sh <= m_sh << bpb(m_cac);
              end
            end else begin
              // field complete
              if (m_f == F_DATA && m_rq.h1.mode == USPI_READ) begin
                rx_valid <= 1'b1;
                rx_data  <= rxv[WORD_W-1:0];
                m_crc    <= m_crc_nx;
              end
              if (m_f == F_CRC && m_rq.h1.mode == USPI_READ) m_crc_err <= (rxv[7:0] != m_crc);
              if (m_f == F_ACK) m_acked <= &rxv[LANES-1:0];
              nf = next_field(m_f, m_rq.h1, m_f == F_DATA && m_wleft != 0);
              if (m_f == F_DATA && nf == F_DATA) m_wleft <= m_wleft - 1'b1;
              m_f    <= nf;
              m_rx   <= '0;
              m_left <= 6'(field_len(nf, m_rq.h1));
              // the word to send next is the back-end's current head; a
              // pop of the previous word lands this same cycle
              // a data word is taken from the back-end when its field
              // starts, and folded into the CRC at the same time
              nval = m_field_value(nf, m_rq, tx_data, m_crc);
              if (nf == F_DATA && m_rq.h1.mode == USPI_WRITE) begin
                tx_pop <= 1'b1;
                m_crc  <= m_crc_nx;
              end
              m_doe <= master_drives(nf, m_rq.h1);
              m_do  <= pack(nval, is_cac(nf, m_rq.h1));
              m_sh <= nval << bpb(is_cac(nf, m_rq.h1));
              if (nf == F_END) begin
                m_doe   <= 1'b0;
                ss_n_o <= 1'b1;
                m_st   <= M_LAST;
              end
            end
          end
        end
        M_LAST: begin
          m_done <= 1'b1;
          m_ack  <= m_acked;
          m_st   <= M_IDLE;
        end
        default: m_st <= M_IDLE;
      endcase
    end
  end

  // ============================ slave side =============================
  logic sclk_q, sclk_qq, ss_q;
  logic [LANES-1:0] d_q;
  logic rise, fall;
  logic s_act, s_sel, s_pass_pend;
  field_e s_f;
  uspi_h1_t s_h1;
  logic [SW-1:0] s_rx, s_sh;
  logic [5:0] s_left;
  logic [12:0] s_wleft;
  logic [USPI_AW-1:0] s_addr;
  logic [7:0] s_crc, s_crc_nx;
  logic [WORD_W-1:0] s_crc_word;
  logic s_crc_ok;
  logic s_cac;
  logic [LANES-1:0] s_dout;
  logic s_doe;

  assign rise  = sclk_q && !sclk_qq;
  assign fall  = !sclk_q && sclk_qq;
  assign s_cac = is_cac(s_f, s_h1);

  uspi_crc8 #(.DW(WORD_W)) u_scrc (.crc_in(s_crc), .data(s_crc_word), .crc_out(s_crc_nx));
  assign s_crc_word = (s_h1.mode == USPI_WRITE) ? unpack(s_rx, d_q, s_cac)[WORD_W-1:0] : rd_data;
  assign rd_addr    = s_addr;

  function automatic logic slave_drives(input field_e f, input uspi_h1_t h);
    case (f)
      F_DATA, F_CRC: return h.mode == USPI_READ;
      F_ACK:         return 1'b1;
      default:       return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= 1'b0; sclk_qq <= 1'b0; ss_q <= 1'b1; d_q <= '0;
      s_act <= 1'b0; s_sel <= 1'b0; s_pass_pend <= 1'b0; s_f <= F_END; s_h1 <= '0;
      s_rx <= '0; s_sh <= '0; s_left <= '0; s_wleft <= '0; s_addr <= '0;
      s_crc <= '0; s_crc_ok <= 1'b1; s_dout <= '0; s_doe <= 1'b0;
      wr_valid <= 1'b0; wr_addr <= '0; wr_data <= '0; rd_req <= 1'b0; rd_req_addr <= '0;
      s_crc_err <= 1'b0; s_pass <= 1'b0;
      ms_flag <= MS_INIT;
    end else begin
      sclk_q <= sclk_i; sclk_qq <= sclk_q; ss_q <= ss_n_i; d_q <= d_i;
      wr_valid <= 1'b0; rd_req <= 1'b0; s_pass <= 1'b0;

      // master side: give up the flag after an acknowledged PASS
      if (m_st == M_LAST && m_rq.h1.mode == USPI_PASS && m_acked && !m_rq.h1.bcast)
        ms_flag <= 1'b0;

      if (ms_flag || ss_q) begin
        // idle, or this node is the master
        if (s_act && s_pass_pend && !ms_flag) begin
          ms_flag <= 1'b1;
          s_pass  <= 1'b1;
        end
        s_act <= 1'b0; s_pass_pend <= 1'b0; s_doe <= 1'b0;
        s_f <= F_H1; s_left <= 6'd12; s_rx <= '0; s_crc <= '0; s_crc_ok <= 1'b1;
        s_h1 <= '0;
      end else begin
        s_act <= 1'b1;
        if (fall) begin
          if (slave_drives(s_f, s_h1) && s_sel && !(s_f == F_ACK && s_sh[SW-1 -: LANES] == '0)) begin
            s_dout <= pack(s_sh, s_cac);
            s_sh   <= s_sh << bpb(s_cac);
            s_doe  <= 1'b1;
          end else begin
            s_doe  <= 1'b0;
          end
        end
        if (rise) begin
          logic [SW-1:0] rxv;
          logic [5:0] nleft;
          field_e nf;
          uspi_h1_t h;
          rxv   = unpack(s_rx, d_q, s_cac);
          s_rx  <= rxv;
          nleft = s_left - bpb(s_cac);
          s_left <= nleft;
          if (nleft == 0) begin
            h = s_h1;
            unique case (s_f)
              F_H1: begin
                h = uspi_h1_t'(rxv[11:0]);
                s_h1 <= h;
                s_wleft <= '0;
              end
              F_SEL: begin
                if (s_h1.bcast) s_sel <= rxv[int'(NODE_ID)];
                else            s_sel <= (rxv[3:0] == NODE_ID);
                if (!s_h1.blm_en) s_wleft <= 13'(uspi_words(s_h1, 8'd0) - 1);
              end
              F_BLM: begin
                s_wleft <= 13'(uspi_words(s_h1, rxv[7:0]) - 1);
              end
              F_ADDR: s_addr <= rxv[USPI_AW-1:0];
              F_DATA: begin
                if (s_h1.mode == USPI_WRITE) begin
                  if (s_sel) begin
                    wr_valid <= 1'b1;
                    wr_addr  <= s_addr;
                    wr_data  <= rxv[WORD_W-1:0];
                  end
                  s_crc  <= s_crc_nx;
                  s_addr <= s_addr + 1'b1;
                end
              end
              F_CRC: begin
                if (s_h1.mode == USPI_WRITE) begin
                  s_crc_ok <= (rxv[7:0] == s_crc);
                  if (s_sel && rxv[7:0] != s_crc) s_crc_err <= 1'b1;
                end
              end
              default: ;
            endcase
            nf = next_field(s_f, h, s_f == F_DATA && s_wleft != 0);
            if (s_f == F_DATA && nf == F_DATA) s_wleft <= s_wleft - 1'b1;
            s_f    <= nf;
            s_rx   <= '0;
            s_left <= 6'(field_len(nf, h));
            // prepare what the slave sends in the coming field
            if (nf == F_DATA && h.mode == USPI_READ) begin
              s_sh   <= left(SW'(rd_data), WORD_W);
              rd_req <= s_sel;
              rd_req_addr <= s_addr;
              s_crc  <= s_crc_nx;
              s_addr <= s_addr + 1'b1;
            end else if (nf == F_CRC && h.mode == USPI_READ) begin
              s_sh <= left(SW'(s_crc), 8);
            end else if (nf == F_ACK) begin
              if (h.mode == USPI_PASS) begin
                s_sh <= (MS_CAPABLE && s_sel) ? '1 : '0;
                s_pass_pend <= MS_CAPABLE && s_sel;
              end else begin
                s_sh <= (s_crc_ok && !(s_f == F_CRC && rxv[7:0] != s_crc)) ? '1 : '0;
              end
            end
          end
        end
      end
    end
  end

  // the slave drives D only; SCLK and SS come from the master
  assign sclk_oe = ms_flag;
  assign ss_oe   = ms_flag;
  assign d_o     = ms_flag ? m_do  : s_dout;
  assign d_oe    = ms_flag ? m_doe : s_doe;
endmodule
