// tb_uspi_bus: self-checking test of the shared u-SPI wires.
//
// Four nodes drive random values with random output enables. The test
// checks against a reference computed here: SCLK is high when an enabled
// driver drives it high, SS_N is low when an enabled driver pulls it low,
// D is the data of the one node with its data enable (0 with none), and
// conflict is set exactly when two or more nodes enable D. Cases with
// more than one D driver are applied only while reset is asserted, where
// the bus assertion is disabled.
module tb_uspi_bus;
  localparam int N = 4, L = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk_o [N], sclk_oe [N], ss_n_o [N], ss_oe [N], d_oe [N];
  logic [L-1:0] d_o [N];
  logic sclk, ss_n, conflict; logic [L-1:0] d;
  uspi_bus #(.N(N), .LANES(L)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(bit allow_multi);
    logic es, ess; logic [L-1:0] ed; int nd;
    @(negedge clk);
    nd = 0; es = 0; ess = 1; ed = '0;
    for (int i = 0; i < N; i++) begin
      sclk_o[i] = 1'($urandom); sclk_oe[i] = 1'($urandom);
      ss_n_o[i] = 1'($urandom); ss_oe[i] = 1'($urandom);
      d_o[i] = L'($urandom);
      d_oe[i] = allow_multi ? 1'($urandom) : (($urandom % N) == 0 && nd == 0);
      if (sclk_oe[i] && sclk_o[i]) es = 1;
      if (ss_oe[i] && !ss_n_o[i]) ess = 0;
      if (d_oe[i]) begin ed = ed | d_o[i]; nd++; end
    end
    #1;
    check(sclk == es && ss_n == ess, "SCLK and SS_N resolution");
    check(conflict == (nd > 1), $sformatf("conflict with %0d drivers", nd));
    if (nd <= 1) check(d == ed, $sformatf("D %h expected %h", d, ed));
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      sclk_o[i] = 0; sclk_oe[i] = 0; ss_n_o[i] = 1; ss_oe[i] = 0; d_o[i] = '0; d_oe[i] = 0;
    end
    #1 check(sclk == 0 && ss_n == 1 && d == '0 && !conflict, "idle bus");
    repeat (300) apply(1);               // reset held: conflicts allowed
    @(negedge clk) begin
      for (int i = 0; i < N; i++) d_oe[i] = 0;
      rst_n = 1;
    end
    repeat (1000) apply(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
