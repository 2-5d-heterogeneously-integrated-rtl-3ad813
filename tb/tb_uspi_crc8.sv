// tb_uspi_crc8: self-checking test of the u-SPI CRC-8 (polynomial
// x^8 + x^2 + x + 1, MSB first, no reflection, no final XOR).
//
// Checks the standard check value 0xF4 of the ASCII string "123456789"
// with an 8-bit instance chained byte by byte, then compares the 16-bit
// instance used for u-SPI words with a bit-serial reference written here
// for 2000 random (crc_in, data) pairs, and checks that a 16-bit step
// equals two chained 8-bit steps.
module tb_uspi_crc8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] c8_in, d8, c8_out;
  logic [7:0] c16_in, c16_out; logic [15:0] d16;
  uspi_crc8 #(.DW(8))  u8  (.crc_in(c8_in),  .data(d8),  .crc_out(c8_out));
  uspi_crc8 #(.DW(16)) u16 (.crc_in(c16_in), .data(d16), .crc_out(c16_out));

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

  function automatic logic [7:0] ref_crc(logic [7:0] c, logic [15:0] d, int n);
    for (int i = n - 1; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ d[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  initial begin
    string s;
    logic [7:0] c;
    s = "123456789";
    c = 8'h00;
    for (int i = 0; i < s.len(); i++) begin
      c8_in = c; d8 = s[i];
      #1 c = c8_out;
    end
    check(c == 8'hF4, $sformatf("check value %h", c));
    repeat (2000) begin
      logic [7:0] e;
      c16_in = 8'($urandom); d16 = 16'($urandom);
      #1;
      e = ref_crc(c16_in, d16, 16);
      check(c16_out == e, $sformatf("crc %h data %h: %h expected %h", c16_in, d16, c16_out, e));
      c8_in = c16_in; d8 = d16[15:8];
      #1 c8_in = c8_out; d8 = d16[7:0];
      #1 check(c8_out == c16_out, "16-bit step equals two 8-bit steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
