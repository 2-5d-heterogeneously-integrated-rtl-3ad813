// dwt_cc: computation core of the lifting-based DWT.
//
// Every lifting step of the configurable DWT has the form
//   OUT = X + Di*Y + Dj*Z
// so one core with two multipliers and one three-term adder serves all of
// them. X, Y, Z are 10-bit two's-complement words; Di, Dj are 6-bit
// coefficients scaled by 16. Each product is scaled back by a hard-wired
// arithmetic shift right by 4 (rounding toward minus infinity), X is sign
// extended to the product width, and the three terms are summed. The word
// sizes, the two-multiplier/one-adder structure and the shift follow the
// source description. This design widens the adder by one carry bit and
// saturates the result to 10 bits, rather than letting it wrap, so an
// overflow in one lifting step cannot flip the sign of later ones.
// Purely combinational; the caller registers OUT.
module dwt_cc
  import neuro_pkg::*;
(
  input  dwt_data_t x,
  input  dwt_data_t y,
  input  dwt_data_t z,
  input  dwt_coef_t ci,
  input  dwt_coef_t cj,
  output dwt_data_t out
);
  localparam int PW = DWT_DW + DWT_CW;      // 16-bit product
  localparam int SW = PW - DWT_CFRAC + 1;   // 12-bit terms + carry

  logic signed [PW-1:0] py, pz;
  logic signed [SW-2:0] ty, tz, tx;         // 12-bit terms
  logic signed [SW-1:0] sum;

  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (DWT_DW-1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 <<< (DWT_DW-1));

  always_comb begin
    py  = PW'(y) * PW'(ci);
    pz  = PW'(z) * PW'(cj);
    ty  = (SW-1)'(py >>> DWT_CFRAC);
    tz  = (SW-1)'(pz >>> DWT_CFRAC);
    tx  = (SW-1)'(x);
    sum = SW'(tx) + SW'(ty) + SW'(tz);
    if (sum > MAXV)      out = DWT_DW'(MAXV);
    else if (sum < MINV) out = DWT_DW'(MINV);
    else                 out = DWT_DW'(sum);
  end
endmodule
