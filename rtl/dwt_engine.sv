// dwt_engine: time-multiplexed multi-channel, multi-level lifting DWT with
// clock gating and power gating.
//
// One computation core (dwt_cc) is shared by NCH channels and NLVL levels.
// A 1-level iteration takes 10 cycles: a read cycle that gathers the new
// input pair and the stored lifting state of that channel and level, 8
// computation cycles (one lifting step each, coefficients from
// dwt_coeff_mem selected by the channel's wavelet and the cycle counter),
// and a write cycle that stores the state back and emits the detail and
// approximation. These follow the source description.
//
// Schedule (one sampling period, started by sample_tick): the period has
// NCH*NLVL slots of 10 cycles, channel-major (CH1 L1..L5, CH2 L1..L5, ...).
// Periods are numbered 1,2,3,...; level L runs in period p when p is a
// multiple of 2^L, so level 1 runs every even period, level 2 every 4th,
// and so on. Odd periods run nothing: the whole period is clock gated and
// power gated (pg_sleep high). In even periods a slot whose level is not
// due is clock gated only (cg_en low for its 10 cycles). The clock enable
// cg_en gates every datapath register; on silicon it would drive an
// integrated clock-gating cell. State kept through power gating (input
// buffers, level buffer) is treated as retained.
//
// Level inputs: level 1 takes the odd-period sample as f and the
// even-period sample as h. A higher level takes as f the approximation its
// lower level produced one pair earlier (kept in a pending buffer) and as
// h the approximation just produced (the a_temp register).
//
// Causal lifting schedule (this design's own; the backbone has two
// one-sample advances): per iteration n, with ' = one iteration old,
//   1 H=h+D0 f   2 I'=f'+D1 H'+D2 H   3 J'=H'+D3 I'+D4 I''
//   4 K''=I''+D5 J''+D6 J'   5 L''=J''+D7 K''+D8 K'''
//   6 a''=K''+D9 L''+D10 L'''   7 d''=k L''+k D11 a'''   8 a=(1/k) a''
// so results are two iterations behind their inputs.
//
// Interface: in_we/in_ch/in_data write the multi-channel input buffer at
// any time; sample_tick starts a period (must come at least
// NCH*NLVL*10 cycles apart, otherwise overrun is raised and the tick is
// dropped). out_valid pulses in the write cycle of each iteration.
module dwt_engine
  import neuro_pkg::*;
#(
  parameter int unsigned NCH  = 4,
  parameter int unsigned NLVL = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_we,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  dwt_data_t  in_data,
  input  logic       sample_tick,
  input  wavelet_e   wv [NCH],
  // coefficient memory write port
  input  logic       cw_we,
  input  wavelet_e   cw_wv,
  input  logic [2:0] cw_step,
  input  logic       cw_sel,
  input  dwt_coef_t  cw_data,
  // results
  output logic       out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic [2:0] out_lvl,
  output dwt_data_t  out_d,
  output dwt_data_t  out_a,
  // status
  output logic       busy,
  output logic       cg_en,
  output logic       pg_sleep,
  output logic       overrun
);
  localparam int unsigned NSLOT = NCH * NLVL;
  localparam int unsigned CW    = $clog2(NCH) > 0 ? $clog2(NCH) : 1;

  typedef struct packed {
    dwt_data_t f1, h1, i2, j2, k3, l3, a3;   // f', H', I'', J'', K''', L''', a'''
  } lstate_t;

  // buffers
  dwt_data_t in_buf [NCH];                   // multi-channel input buffer
  dwt_data_t f_in   [NCH];                   // odd-period sample per channel
  dwt_data_t h_in   [NCH];                   // even-period sample per channel
  lstate_t   st     [NCH][NLVL];             // multi-level/multi-channel buffer
  dwt_data_t pend   [NCH][NLVL];             // first approximation of a pair
  dwt_data_t a_temp;

  // control
  logic [NLVL-1:0] pcount;                   // period number modulo 2^NLVL
  logic       running;
  logic [$clog2(NSLOT)-1:0] slot;
  logic [3:0] cyc;
  logic [CW-1:0] s_ch;
  logic [2:0] s_lvl;
  logic       due;

  // working registers (buffer of the computation core)
  dwt_data_t w_f, w_h, w_H, w_I, w_J, w_K, w_L, w_A, w_d;
  lstate_t   w_st;

  // core operands
  dwt_data_t x, y, z, cc_out;
  dwt_coef_t ci, cj;

  assign s_ch  = CW'(slot / NLVL);
  assign s_lvl = 3'(slot % NLVL);

  // level L (0-based l) is due when pcount is a multiple of 2^(l+1)
  always_comb begin
    due = 1'b1;
    for (int b = 0; b < NLVL; b++)
      if (b <= int'(s_lvl) && pcount[b]) due = 1'b0;
  end

  assign busy     = running;
  assign pg_sleep = running && pcount[0];
  assign cg_en    = running && due;

  dwt_coeff_mem u_coef (
    .clk, .rst_n,
    .wv(wv[s_ch]), .step(3'(cyc - 4'd1)), .ci, .cj,
    .we(cw_we), .wwv(cw_wv), .wstep(cw_step), .wsel(cw_sel), .wdata(cw_data)
  );

  dwt_cc u_cc (.x, .y, .z, .ci, .cj, .out(cc_out));

  // operand selection per computation cycle
  always_comb begin
    x = '0; y = '0; z = '0;
    unique case (cyc)
      4'd1: begin x = w_h;      y = w_f;      z = '0;       end
      4'd2: begin x = w_st.f1;  y = w_st.h1;  z = w_H;      end
      4'd3: begin x = w_st.h1;  y = w_I;      z = w_st.i2;  end
      4'd4: begin x = w_st.i2;  y = w_st.j2;  z = w_J;      end
      4'd5: begin x = w_st.j2;  y = w_K;      z = w_st.k3;  end
      4'd6: begin x = w_K;      y = w_L;      z = w_st.l3;  end
      4'd7: begin x = '0;       y = w_L;      z = w_st.a3;  end
      4'd8: begin x = '0;       y = w_A;      z = '0;       end
      default: ;
    endcase
  end

  // input buffer, always on
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) in_buf[c] <= '0;
    end else if (in_we) begin
      in_buf[in_ch] <= in_data;
    end
  end

  // period control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcount  <= '0;
      running <= 1'b0;
      slot    <= '0;
      cyc     <= '0;
      overrun <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        f_in[c] <= '0;
        h_in[c] <= '0;
      end
    end else begin
      if (running) begin
        if (cyc == 4'(DWT_IT_CYC - 1)) begin
          cyc <= '0;
          if (slot == $bits(slot)'(NSLOT - 1)) begin
            slot    <= '0;
            running <= 1'b0;
          end else begin
            slot <= slot + 1'b1;
          end
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
      if (sample_tick) begin
        if (running && !(cyc == 4'(DWT_IT_CYC - 1) && slot == $bits(slot)'(NSLOT - 1))) begin
          overrun <= 1'b1;
        end else begin
          pcount  <= pcount + 1'b1;
          running <= 1'b1;
          slot    <= '0;
          cyc     <= '0;
          // next period odd (pcount+1 odd): keep sample as f; even: as h
          for (int c = 0; c < NCH; c++) begin
            if (!pcount[0]) f_in[c] <= in_buf[c];
            else            h_in[c] <= in_buf[c];
          end
        end
      end
    end
  end

  // datapath, clock gated by cg_en
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {w_f, w_h, w_H, w_I, w_J, w_K, w_L, w_A, w_d} <= '0;
      w_st   <= '0;
      a_temp <= '0;
      for (int c = 0; c < NCH; c++)
        for (int l = 0; l < NLVL; l++) begin
          st[c][l]   <= '0;
          pend[c][l] <= '0;
        end
    end else if (cg_en) begin
      unique case (cyc)
        4'd0: begin                                    // read
          w_st <= st[s_ch][s_lvl];
          if (s_lvl == 3'd0) begin
            w_f <= f_in[s_ch];
            w_h <= h_in[s_ch];
          end else begin
            w_f <= pend[s_ch][s_lvl];
            w_h <= a_temp;
          end
        end
        4'd1: w_H <= cc_out;
        4'd2: w_I <= cc_out;
        4'd3: w_J <= cc_out;
        4'd4: w_K <= cc_out;
        4'd5: w_L <= cc_out;
        4'd6: w_A <= cc_out;
        4'd7: w_d <= cc_out;
        4'd8: a_temp <= cc_out;
        4'd9: begin                                    // write
          st[s_ch][s_lvl] <= '{f1: w_f, h1: w_H, i2: w_I, j2: w_J,
                                k3: w_K, l3: w_L, a3: w_A};
          // first approximation of a pair waits for the next level
          if (int'(s_lvl) < NLVL - 1 && pcount[s_lvl + 3'd1])
            pend[s_ch][s_lvl + 3'd1] <= a_temp;
        end
        default: ;
      endcase
    end
  end

  assign out_valid = cg_en && cyc == 4'(DWT_IT_CYC - 1);
  assign out_ch    = s_ch;
  assign out_lvl   = s_lvl;
  assign out_d     = w_d;
  assign out_a     = a_temp;
endmodule
