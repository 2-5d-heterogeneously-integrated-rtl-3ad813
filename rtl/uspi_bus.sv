// uspi_bus: the u-SPI lines on the interposer redistribution layers.
//
// Joins N u-SPI nodes on one SCLK, one active-low SS and LANES data lines.
// The real lines are bidirectional wires; here each node presents a value
// and an output enable per line group and this block resolves them: a
// line is high when any enabled node drives it high (SCLK, D) or low when
// any enabled node pulls it low (SS), and reads as idle (SCLK 0, SS 1,
// D 0) when nobody drives. conflict flags two nodes driving D at once,
// which the protocol never allows outside the hand-over cycle of a master
// pass; an assertion checks it. The wired resolution is this design's way
// of modelling bidirectional wires in two-state logic.
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the assertion's disable condition, which is not
// hardware, so the warning stands.
module uspi_bus #(
  parameter int unsigned N     = 4,
  parameter int unsigned LANES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sclk_o  [N],
  input  logic             sclk_oe [N],
  input  logic             ss_n_o  [N],
  input  logic             ss_oe   [N],
  input  logic [LANES-1:0] d_o     [N],
  input  logic             d_oe    [N],
  output logic             sclk,
  output logic             ss_n,
  output logic [LANES-1:0] d,
  output logic             conflict
);
  int unsigned ndrv;
  always_comb begin
    sclk = 1'b0;
    ss_n = 1'b1;
    d    = '0;
    ndrv = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (sclk_oe[i] && sclk_o[i]) sclk = 1'b1;
      if (ss_oe[i] && !ss_n_o[i]) ss_n = 1'b0;
      if (d_oe[i]) begin
        d    = d | d_o[i];
        ndrv = ndrv + 1;
      end
    end
    conflict = ndrv > 1;
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("u-SPI: more than one node drives D");
endmodule
