// dwt_coeff_mem: coefficient memory of the configurable lifting DWT.
//
// The DWT datapath is a fixed backbone of lifting steps sized for Sym6; a
// mother wavelet is chosen only by the coefficients fed to the computation
// core. This memory holds, for each of the four wavelets (Haar, D2, Sym4,
// Sym6) and each of the 8 computation cycles, the pair (Di, Dj) given to
// the core. Read is combinational on (wavelet, step). A write port lets a
// controller load or replace any entry at run time.
//
// Step meaning (this design's causal schedule of the backbone, see
// dwt_engine): 1 H=h+D0*f, 2 I=f'+D1*H'+D2*H, 3 J=H'+D3*I+D4*I'',
// 4 K=I''+D5*J''+D6*J, 5 L=J''+D7*K+D8*K''', 6 a'=K+D9*L+D10*L''',
// 7 d=k*L+(k*D11)*a''', 8 a=(1/k)*a'.
// Reset contents: Haar and D2 come from their standard lifting
// factorisations quantised to 6 bits (x16); these numbers are this
// design's, the source gives no coefficient values. Sym4 and Sym6 entries
// reset to zero and must be written before those wavelets are used.
module dwt_coeff_mem
  import neuro_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // read
  input  wavelet_e  wv,
  input  logic [2:0] step,        // 0..7 = lifting steps 1..8
  output dwt_coef_t ci,
  output dwt_coef_t cj,
  // write
  input  logic      we,
  input  wavelet_e  wwv,
  input  logic [2:0] wstep,
  input  logic      wsel,         // 0 = Di, 1 = Dj
  input  dwt_coef_t wdata
);
  dwt_coef_t mem [4][DWT_STEPS][2];

  // default table, coefficient * 16
  function automatic dwt_coef_t dflt(input int w, input int s, input int j);
    dwt_coef_t t[2][DWT_STEPS][2];
    t[0] = '{'{-6'sd16, 6'sd0}, '{6'sd8, 6'sd0}, '{6'sd0, 6'sd0}, '{6'sd0, 6'sd0},
             '{6'sd0, 6'sd0}, '{6'sd0, 6'sd0}, '{6'sd11, 6'sd0}, '{6'sd23, 6'sd0}};
    t[1] = '{'{-6'sd28, 6'sd0}, '{6'sd7, -6'sd1}, '{6'sd0, 6'sd16}, '{6'sd0, 6'sd0},
             '{6'sd0, 6'sd0}, '{6'sd0, 6'sd0}, '{6'sd31, 6'sd0}, '{6'sd8, 6'sd0}};
    if (w < 2) return t[w][s][j];
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < 4; w++)
        for (int s = 0; s < DWT_STEPS; s++)
          for (int j = 0; j < 2; j++)
            mem[w][s][j] <= dflt(w, s, j);
    end else if (we) begin
      mem[wwv][wstep][wsel] <= wdata;
    end
  end

  assign ci = mem[wv][step][0];
  assign cj = mem[wv][step][1];
endmodule
