// analog_mux_model: behavioural model (not synthesizable logic) of the
// 4:1 analog multiplexer between four AFE outputs and one ADC.
//
// The real part is a set of low-impedance analog switches. The model
// passes the selected AFE output to the ADC, but only SETTLE clk cycles
// after the selection last changed; until then it holds the previous
// output, standing in for the RC settling of the switch and the ADC input
// capacitance. The settling time is this model's own.
module analog_mux_model
  import neuro_pkg::*;
#(
  parameter int unsigned NIN    = 4,
  parameter int unsigned SETTLE = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  volt_t                   afe [NIN],
  input  logic [$clog2(NIN)-1:0]  sel,
  output volt_t                   out
);
  logic [$clog2(NIN)-1:0] sel_q;
  logic [3:0] age;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0; age <= '0; out <= '0;
    end else begin
      sel_q <= sel;
      if (sel != sel_q) age <= '0;
      else if (age != 4'hF) age <= age + 1'b1;
      if (sel == sel_q && int'(age) + 1 >= int'(SETTLE)) out <= afe[sel];
    end
  end
endmodule
