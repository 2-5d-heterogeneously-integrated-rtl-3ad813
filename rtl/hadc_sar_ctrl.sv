// hadc_sar_ctrl: control logic of the 11-bit hybrid ADC (3-bit coarse tune
// + 8-bit SAR fine tune with lifting and re-comparison).
//
// A conversion has three phases, one sample-clock period each in the
// source: (1) coarse tune: the delay-line ADC is started and returns the
// 3 MSBs (block b of 8); (2) first fine tune: the negative DAC input is
// lifted to block b and an 8-bit successive approximation resolves the
// position of Vin inside the block; (3) when the fine result is all ones
// (1111'1111), the coarse offset has pointed one block too low, and the
// fine tune is repeated with block b+1 (re-comparison). The output is
// {block, fine}. The phases, the straight-one check and the +1 retry
// follow the source.
//
// The source times each SAR bit by itself (Muller C-elements): the next
// comparison starts as soon as the previous one finishes. Here that is a
// request/done handshake with the comparator, sampled on clk: cmp_req is
// held until cmp_done, so a bit takes as long as the comparator needs.
// This handshake form, the trial-code interface to the DAC and the
// behaviour at block 7 (no retry possible; the all-ones code is kept) are
// this design's choices.
//
// Interface: start (one clk pulse) begins a conversion; busy stays high
// until done pulses with code. recmp reports that the third phase ran.
module hadc_sar_ctrl
  import neuro_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  // coarse tune
  output logic                   coarse_start,
  input  logic                   coarse_valid,
  input  logic [COARSE_BITS-1:0] coarse_q,
  // fine tune DAC and comparator
  output logic [COARSE_BITS-1:0] lift,        // block the DAC lifts V_INN to
  output logic [FINE_BITS-1:0]   trial,       // trial code of the split-cap DAC
  output logic                   dac_sample,  // sample phase of a fine tune
  output logic                   cmp_req,
  input  logic                   cmp_done,
  input  logic                   cmp_out,     // 1: Vin at or above the trial level
  // result
  output logic                   busy,
  output logic                   done,
  output adc_code_t              code,
  output logic                   recmp
);
  typedef enum logic [2:0] {S_IDLE, S_COARSE, S_SAMPLE, S_WAIT, S_VERIFY} state_e;
  state_e st;
  logic [$clog2(FINE_BITS)-1:0] bitn;
  logic [FINE_BITS-1:0] res;
  logic retried;

  assign busy       = (st != S_IDLE);
  assign dac_sample = (st == S_SAMPLE);
  assign cmp_req    = (st == S_WAIT);
  assign coarse_start = (st == S_IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; bitn <= '0; res <= '0; trial <= '0; lift <= '0;
      retried <= 1'b0; done <= 1'b0; code <= '0; recmp <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_COARSE; retried <= 1'b0;
        end
        S_COARSE: if (coarse_valid) begin
          lift <= coarse_q;
          st   <= S_SAMPLE;
        end
        S_SAMPLE: begin
          res   <= '0;
          bitn  <= $bits(bitn)'(FINE_BITS - 1);
          trial <= FINE_BITS'(1) << (FINE_BITS - 1);
          st    <= S_WAIT;
        end
        S_WAIT: if (cmp_done) begin
          logic [FINE_BITS-1:0] r;
          r = res | (cmp_out ? (FINE_BITS'(1) << bitn) : '0);
          res <= r;
          if (bitn == 0) begin
            st <= S_VERIFY;
          end else begin
            trial <= r | (FINE_BITS'(1) << (bitn - 1'b1));
            bitn  <= bitn - 1'b1;
          end
        end
        S_VERIFY: begin
          if (&res && !retried && lift != '1) begin
            lift    <= lift + 1'b1;
            retried <= 1'b1;
            st      <= S_SAMPLE;
          end else begin
            code  <= {lift, res};
            recmp <= retried;
            done  <= 1'b1;
            st    <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
