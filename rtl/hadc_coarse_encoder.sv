// hadc_coarse_encoder: encoder of the delay-line (coarse-tune) ADC.
//
// The coarse stage of the hybrid ADC races the input-controlled N-type and
// P-type delay lines against vernier reference lines; 7 flip-flops (3 on
// the N line, sensitive to 0.9-1.8 V, 4 on the P line, sensitive to
// 0-0.9 V) latch whether each stage was reached first. Together they form
// a thermometer code over 8 voltage blocks, which this encoder turns into
// the 3 MSBs of the 11-bit result. The encoder counts ones, so a single
// bubble in the thermometer code moves the result by at most one block,
// which the re-comparison step of the fine tune can absorb. The 7-tap,
// 8-block structure follows the source; counting ones is this design's
// choice. Registered: q is loaded one clock after sample is high.
module hadc_coarse_encoder
  import neuro_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sample,
  input  logic [TDC_TAPS-1:0]     tdc,     // bit k: input above block boundary k+1
  output logic [COARSE_BITS-1:0]  q,
  output logic                    valid
);
  logic [COARSE_BITS-1:0] ones;
  always_comb begin
    ones = '0;
    for (int k = 0; k < TDC_TAPS; k++) ones = ones + COARSE_BITS'(tdc[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) q <= ones;
    end
  end
endmodule
