// hadc_analog_model: behavioural model (not synthesizable logic) of the
// analog half of one 11-bit hybrid ADC: the voltage-to-time converter and
// vernier delay lines of the coarse tune, and the lifted split-capacitor
// DAC plus comparator of the fine tune.
//
// Coarse tune: when coarse_start is seen, tdc is set to the thermometer
// code of (Vin - OFFSET) over 8 equal blocks of VDD and tdc_sample pulses
// one clk later. OFFSET models the designed downward offset of the 8
// detection blocks (30 mV in the source text; its figure marks a 50 mV
// PVT band), which makes the coarse code one block low near a boundary,
// never high. Fine tune: with the DAC lifted to block `lift`, the
// comparator decides Vin >= (lift*256 + trial) LSB of an 11-bit scale.
// Its decision time in clk cycles is 1 plus 3 more when Vin is within
// 4 LSB of the level, modelling the slower resolution of a self-timed
// comparator on small inputs (this delay law is this model's own).
// Vin is tracked while dac_sample is high and held otherwise.
module hadc_analog_model
  import neuro_pkg::*;
#(
  parameter int unsigned OFFSET = 1092        // 30 mV in units of VDD/65536
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  volt_t                  vin,
  input  logic                   coarse_start,
  output logic [TDC_TAPS-1:0]    tdc,
  output logic                   tdc_sample,
  input  logic [COARSE_BITS-1:0] lift,
  input  logic [FINE_BITS-1:0]   trial,
  input  logic                   dac_sample,
  input  logic                   cmp_req,
  output logic                   cmp_done,
  output logic                   cmp_out
);
  volt_t vhold;
  logic [2:0] cnt;
  logic busy;
  int level, vcode;

  always_comb begin
    level = int'({lift, trial}) * 32;          // 11-bit code -> 16-bit scale
    vcode = int'(vhold);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdc <= '0; tdc_sample <= 1'b0; vhold <= '0;
      cnt <= '0; busy <= 1'b0; cmp_done <= 1'b0; cmp_out <= 1'b0;
    end else begin
      tdc_sample <= coarse_start;
      if (coarse_start) begin
        vhold <= vin;
        for (int k = 0; k < TDC_TAPS; k++)
          tdc[k] <= (int'(vin) - int'(OFFSET)) >= (k + 1) * 8192;
      end
      if (dac_sample) vhold <= vin;
      cmp_done <= 1'b0;
      if (cmp_req && !busy && !cmp_done) begin
        busy <= 1'b1;
        cnt  <= ((vcode - level) < 128 && (level - vcode) < 128) ? 3'd3 : 3'd0;
      end else if (busy) begin
        if (cnt == 0) begin
          busy     <= 1'b0;
          cmp_done <= 1'b1;
          cmp_out  <= vcode >= level;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule
