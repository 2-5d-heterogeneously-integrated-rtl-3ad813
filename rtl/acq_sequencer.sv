// acq_sequencer: clock generator and analog-multiplexer control of the
// acquisition die.
//
// Four AFE channels share one ADC through an analog multiplexer, so each
// multiplexer switches at 4x the per-channel sampling rate (8 kHz for
// 2 kHz channels). This block divides the system clock into conversion
// slots of CONV_CYCLES cycles. At the start of a slot it moves mux_sel to
// the next channel; SETTLE cycles later, once the multiplexer output has
// settled, it pulses conv_start to all ADCs, with conv_ch naming the
// channel being converted. frame_start marks the slot of channel 0, i.e.
// the start of each per-channel sampling period. The 4:1 sharing and the
// 2 kHz / 8 kHz rates follow the source; the system clock (800 kHz, hence
// CONV_CYCLES = 100) and the settling delay are this design's choices.
module acq_sequencer #(
  parameter int unsigned NMUX        = 4,
  parameter int unsigned CONV_CYCLES = 100,
  parameter int unsigned SETTLE      = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  output logic [$clog2(NMUX)-1:0]  mux_sel,
  output logic                     conv_start,
  output logic [$clog2(NMUX)-1:0]  conv_ch,
  output logic                     frame_start
);
  logic [$clog2(CONV_CYCLES)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      mux_sel     <= '0;
      conv_start  <= 1'b0;
      conv_ch     <= '0;
      frame_start <= 1'b0;
    end else begin
      conv_start  <= 1'b0;
      frame_start <= 1'b0;
      if (en) begin
        if (cnt == $bits(cnt)'(CONV_CYCLES - 1)) begin
          cnt     <= '0;
          mux_sel <= (mux_sel == $bits(mux_sel)'(NMUX - 1)) ? '0 : mux_sel + 1'b1;
          if (mux_sel == $bits(mux_sel)'(NMUX - 1)) frame_start <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
        if (cnt == $bits(cnt)'(SETTLE - 1)) begin
          conv_start <= 1'b1;
          conv_ch    <= mux_sel;
        end
      end
    end
  end
endmodule
